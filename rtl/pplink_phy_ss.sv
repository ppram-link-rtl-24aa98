// pplink_phy_ss: PPRAM-Link physical layer of one node, source-synchronous
// method.
//
// Each chip has its own clock source. The sender forwards its clock on
// `tx_clk_pad` next to the 17 data lines, and the receiver captures the data
// on the falling edge of the received clock (the inverted reference clock).
// The link comes up in a single de-skew state (see phy_ctrl_ss). The sender
// toggles every data line each cycle, and each line's Fine DLL (33 elements
// of 1 ns, one clock period) moves that line's edges onto the reference
// clock's rising edge. This removes the skew between the lines. Afterwards
// the sender sends `tx_word` (one cycle after it is presented), and the
// receiver writes each captured word, in the reference-clock domain, into
// the elastic buffer. The node's own clock reads it out on `rx_word` with
// `rx_valid`.
//
// The receive-side controller and the DLL counters run on the received
// reference clock. Because that is the sender's clock, they stay in step
// with the sender's controller. Reset reaches that domain through a
// two-flop synchronizer. There is no separate transmitter block: the line
// multiplexer is the few lines below.
//
// This is a behavioural model because of the DLL delay lines; all logic
// around them is synthesizable. The forwarded clock line, the toggle
// pattern and the buffer depth are this design's reading of the method;
// 17 Fine DLLs of 33 elements and the elastic buffer follow the standard.
`timescale 1ps / 1ps
module pplink_phy_ss
  import pplink_pkg::*;
#(
  parameter int FINE_ELEM     = 33,
  parameter int FINE_TD_PS    = 1000,
  parameter int FINE_CHANGES  = 16,
  parameter int SETTLE        = 8,
  parameter int RESET_CYCLES  = 16,
  parameter int DESKEW_CYCLES = 256,
  parameter int GUARD         = 16,
  parameter int EB_DEPTH      = 16,
  localparam int FSEL_W = $clog2(FINE_ELEM + 1)
) (
  input  logic                          clk,          // node's own clock
  input  logic                          rst_n,
  // logical layer side
  input  link_word_t                    tx_word,
  output link_word_t                    rx_word,
  output logic                          rx_valid,
  output logic                          link_ready,   // sender side is in SS_RUN
  output ss_phase_e                     phase,
  // link lines
  output link_word_t                    tx_pad,
  output logic                          tx_clk_pad,   // forwarded reference clock
  input  link_word_t                    rx_pad,
  input  logic                          rx_clk_pad,
  // status
  output logic [LINK_W-1:0][FSEL_W-1:0] fine_tap,
  output cmp_e [LINK_W-1:0]             fine_cmp,
  output logic [LINK_W-1:0]             fine_locked,
  output logic                          fine_exhausted,
  output logic                          eb_overflow,
  output logic                          eb_underflow
);

  // ---------------- transmit side (own clock) ----------------
  logic       tx_start_unused, tx_adjust_unused;
  link_word_t data_q;

  phy_ctrl_ss #(.RESET_CYCLES(RESET_CYCLES), .DESKEW_CYCLES(DESKEW_CYCLES), .GUARD(GUARD)) u_ctrl_tx (
    .clk(clk), .rst_n(rst_n), .phase(phase), .fine_start(tx_start_unused),
    .fine_adjust(tx_adjust_unused), .link_ready(link_ready));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                     data_q <= '0;
    else if (phase == SS_SIG_DESKEW) data_q <= ~data_q;
    else if (phase == SS_RUN)        data_q <= tx_word;
    else                            data_q <= '0;
  end

  assign tx_pad     = data_q;
  assign tx_clk_pad = clk;

  // ---------------- receive side (reference clock) ----------------
  logic       rclk;
  logic       rrst_meta, rrst_n;
  ss_phase_e  rx_phase;
  logic       fine_start, fine_adjust, rx_ready;
  link_word_t q, q_pos;
  logic [LINK_W-1:0] exh;

  assign rclk = rx_clk_pad;

  always_ff @(posedge rclk or negedge rst_n) begin
    if (!rst_n) begin
      rrst_meta <= 1'b0;
      rrst_n    <= 1'b0;
    end else begin
      rrst_meta <= 1'b1;
      rrst_n    <= rrst_meta;
    end
  end

  phy_ctrl_ss #(.RESET_CYCLES(RESET_CYCLES), .DESKEW_CYCLES(DESKEW_CYCLES), .GUARD(GUARD)) u_ctrl_rx (
    .clk(rclk), .rst_n(rrst_n), .phase(rx_phase), .fine_start(fine_start),
    .fine_adjust(fine_adjust), .link_ready(rx_ready));

  for (genvar i = 0; i < LINK_W; i++) begin : g_fine
    fine_dll #(.N_ELEM(FINE_ELEM), .TD_PS(FINE_TD_PS), .MAX_CHANGES(FINE_CHANGES),
               .SETTLE(SETTLE), .SOURCE_SYNC(1'b1)) u_fine (
      .clk(rclk), .rst_n(rrst_n), .din(rx_pad[i]), .start(fine_start),
      .adjust(fine_adjust), .q(q[i]), .tap(fine_tap[i]), .locked(fine_locked[i]),
      .exhausted(exh[i]), .cmp(fine_cmp[i]));
  end
  assign fine_exhausted = |exh;

  // Words captured on the falling edge move to the rising edge for the buffer.
  always_ff @(posedge rclk) q_pos <= q;

  elastic_buffer #(.WIDTH(LINK_W), .DEPTH(EB_DEPTH)) u_eb (
    .wclk(rclk), .wrst_n(rrst_n), .wvalid(rx_ready), .wdata(q_pos), .overflow(eb_overflow),
    .rclk(clk), .rrst_n(rst_n), .rvalid(rx_valid), .rdata(rx_word), .underflow(eb_underflow));

  // rx_phase is kept for debugging in simulation; the rx side needs only the strobes.
  logic rx_phase_unused;
  assign rx_phase_unused = ^rx_phase;

endmodule

// phy_rx_cc: receiver of the common-clocking physical layer.
//
// This is a behavioural model, because it contains the DLL delay lines; all
// of its control is synthesizable RTL. It holds the 33 DLLs of the reference
// receiver: a Coarse DLL on each of the 16 symbol lines, followed by a Fine
// DLL on each of the 17 lines. Every line is captured by the receiver's own
// clock at the Fine DLL output. The flag line has no Coarse DLL and is the
// reference for inter-signal de-skew; it is delayed two register stages so
// that it matches the symbol lines, whose Coarse DLLs sit at two elements
// (two cycles) when set to "0". Controls come from phy_ctrl_cc:
// `fine_start`/`fine_adjust` drive all Fine DLLs, `coarse_start`/
// `sig_enable` the Coarse DLLs through sync_deskew. `rx_word` is the
// received {flag, symbol}, meaningful once the link is ready.
`timescale 1ps / 1ps
module phy_rx_cc
  import pplink_pkg::*;
#(
  parameter int FINE_ELEM     = 66,
  parameter int FINE_TD_PS    = 1000,
  parameter int FINE_CHANGES  = 16,
  parameter int SETTLE        = 8,
  parameter int COARSE_ELEM   = 3,
  parameter int COARSE_TD_PS  = 20000,
  parameter int COARSE_CHANGES = 2,
  localparam int FSEL_W = $clog2(FINE_ELEM + 1),
  localparam int CSEL_W = $clog2(COARSE_ELEM + 1)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  link_word_t                    pad,
  input  logic                          fine_start,
  input  logic                          fine_adjust,
  input  logic                          coarse_start,
  input  logic                          sig_enable,
  output link_word_t                    rx_word,
  output logic [LINK_W-1:0][FSEL_W-1:0]   fine_tap,
  output logic [SYMBOL_W-1:0][CSEL_W-1:0] coarse_tap,
  output cmp_e [LINK_W-1:0]             fine_cmp,
  output logic [LINK_W-1:0]             fine_locked,
  output logic                          fine_exhausted,
  output logic [SYMBOL_W-1:0]           coarse_early,
  output logic [SYMBOL_W-1:0]           coarse_late,
  output logic                          sig_aligned,
  output logic                          sig_measured
);

  link_word_t          line;        // after the Coarse DLLs
  link_word_t          q;           // captured at clk
  logic [LINK_W-1:0]   exh;
  logic [1:0]          flag_d;

  for (genvar i = 0; i < SYMBOL_W; i++) begin : g_coarse
    coarse_dll #(.N_ELEM(COARSE_ELEM), .TD_PS(COARSE_TD_PS),
                 .MAX_CHANGES(COARSE_CHANGES)) u_coarse (
      .clk(clk), .rst_n(rst_n), .din(pad[i]), .start(coarse_start),
      .early(coarse_early[i]), .late(coarse_late[i]),
      .dout(line[i]), .tap(coarse_tap[i]));
  end
  assign line[FLAG_BIT] = pad[FLAG_BIT];

  for (genvar i = 0; i < LINK_W; i++) begin : g_fine
    fine_dll #(.N_ELEM(FINE_ELEM), .TD_PS(FINE_TD_PS),
               .MAX_CHANGES(FINE_CHANGES), .SETTLE(SETTLE)) u_fine (
      .clk(clk), .rst_n(rst_n), .din(line[i]), .start(fine_start),
      .adjust(fine_adjust), .q(q[i]), .tap(fine_tap[i]),
      .locked(fine_locked[i]), .exhausted(exh[i]), .cmp(fine_cmp[i]));
  end
  assign fine_exhausted = |exh;

  // Flag line: two stages to stand for the Coarse DLLs' "0" setting.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) flag_d <= '0;
    else        flag_d <= {flag_d[0], q[FLAG_BIT]};
  end
  assign rx_word = {flag_d[1], q[SYMBOL_W-1:0]};

  sync_deskew u_sync (
    .clk(clk), .rst_n(rst_n), .enable(sig_enable), .rx(rx_word),
    .early(coarse_early), .late(coarse_late),
    .aligned(sig_aligned), .measured(sig_measured));

endmodule

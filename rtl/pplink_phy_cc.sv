// pplink_phy_cc: PPRAM-Link physical layer of one node, common-clocking method.
//
// All chips on the board share one 50 MHz clock source. After the link is
// reset, the node brings its receive side up in three timer-driven phases
// (see phy_ctrl_cc) while its transmit side sends the matching patterns to
// the node downstream: its own clock on all lines (inter-clock de-skew A),
// the sync pattern (inter-signal de-skew), the clock again (inter-clock
// de-skew B). Then `link_ready` rises, `tx_word` is sent on `tx_pad` one
// cycle after it is presented, and words received on `rx_pad` appear on
// `rx_word`. A link is 17 lines: 16-bit symbol plus flag. Both ends of a
// link must leave reset in the same cycle. This is a behavioural model
// because its receiver holds DLL delay lines; everything else is RTL.
// Status outputs expose the DLL settings for bring-up and test.
`timescale 1ps / 1ps
module pplink_phy_cc
  import pplink_pkg::*;
#(
  parameter int FINE_ELEM      = 66,
  parameter int FINE_TD_PS     = 1000,
  parameter int FINE_CHANGES   = 16,
  parameter int SETTLE         = 8,
  parameter int COARSE_ELEM    = 3,
  parameter int COARSE_TD_PS   = 20000,
  parameter int COARSE_CHANGES = 2,
  parameter int RESET_CYCLES   = 16,
  parameter int CLK_A_CYCLES   = 256,
  parameter int SIG_CYCLES     = 96,
  parameter int CLK_B_CYCLES   = 256,
  parameter int GUARD          = 16,
  localparam int FSEL_W = $clog2(FINE_ELEM + 1),
  localparam int CSEL_W = $clog2(COARSE_ELEM + 1)
) (
  input  logic                            clk,
  input  logic                            rst_n,
  // logical layer side
  input  link_word_t                      tx_word,
  output link_word_t                      rx_word,
  output logic                            link_ready,
  output cc_phase_e                       phase,
  // link lines
  output link_word_t                      tx_pad,
  input  link_word_t                      rx_pad,
  // status
  output logic [LINK_W-1:0][FSEL_W-1:0]   fine_tap,
  output logic [SYMBOL_W-1:0][CSEL_W-1:0] coarse_tap,
  output cmp_e [LINK_W-1:0]               fine_cmp,
  output logic [LINK_W-1:0]               fine_locked,
  output logic                            fine_exhausted,
  output logic [SYMBOL_W-1:0]             coarse_early,
  output logic [SYMBOL_W-1:0]             coarse_late,
  output logic                            sig_aligned,
  output logic                            sig_measured
);

  logic fine_start, fine_adjust, coarse_start, sig_enable;

  phy_ctrl_cc #(
    .RESET_CYCLES(RESET_CYCLES), .CLK_A_CYCLES(CLK_A_CYCLES),
    .SIG_CYCLES(SIG_CYCLES), .CLK_B_CYCLES(CLK_B_CYCLES), .GUARD(GUARD)
  ) u_ctrl (
    .clk(clk), .rst_n(rst_n), .phase(phase), .fine_start(fine_start),
    .fine_adjust(fine_adjust), .coarse_start(coarse_start),
    .sig_enable(sig_enable), .link_ready(link_ready));

  phy_tx_cc u_tx (
    .clk(clk), .rst_n(rst_n), .phase(phase), .tx_word(tx_word), .pad(tx_pad));

  phy_rx_cc #(
    .FINE_ELEM(FINE_ELEM), .FINE_TD_PS(FINE_TD_PS), .FINE_CHANGES(FINE_CHANGES),
    .SETTLE(SETTLE), .COARSE_ELEM(COARSE_ELEM), .COARSE_TD_PS(COARSE_TD_PS),
    .COARSE_CHANGES(COARSE_CHANGES)
  ) u_rx (
    .clk(clk), .rst_n(rst_n), .pad(rx_pad), .fine_start(fine_start),
    .fine_adjust(fine_adjust), .coarse_start(coarse_start),
    .sig_enable(sig_enable), .rx_word(rx_word), .fine_tap(fine_tap),
    .coarse_tap(coarse_tap), .fine_cmp(fine_cmp), .fine_locked(fine_locked),
    .fine_exhausted(fine_exhausted), .coarse_early(coarse_early),
    .coarse_late(coarse_late), .sig_aligned(sig_aligned),
    .sig_measured(sig_measured));

endmodule

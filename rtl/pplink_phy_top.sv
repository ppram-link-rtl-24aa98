// pplink_phy_top: a node's PPRAM-Link physical layer with one port of each
// clocking method.
//
// The standard defines two ways to clock a link. `cc_*` is a common-clocking
// port (pplink_phy_cc): both chips run from the shared board clock `cc_clk`.
// `ss_*` is a source-synchronous port (pplink_phy_ss): the node sends its own
// clock `ss_clk` with the data and receives its neighbour's clock. A node
// would use the first towards a neighbour on the same clock tree and the
// second towards one with its own clock source. The two ports are
// independent and share only the reset. All sizes are the reference-design
// defaults of the sub-blocks.
`timescale 1ps / 1ps
module pplink_phy_top
  import pplink_pkg::*;
(
  input  logic                      rst_n,
  // common-clocking port
  input  logic                      cc_clk,
  input  link_word_t                cc_tx_word,
  output link_word_t                cc_rx_word,
  output logic                      cc_link_ready,
  output cc_phase_e                 cc_phase,
  output link_word_t                cc_tx_pad,
  input  link_word_t                cc_rx_pad,
  output logic [LINK_W-1:0][6:0]    cc_fine_tap,
  output logic [SYMBOL_W-1:0][1:0]  cc_coarse_tap,
  output cmp_e [LINK_W-1:0]         cc_fine_cmp,
  output logic [LINK_W-1:0]         cc_fine_locked,
  output logic                      cc_fine_exhausted,
  output logic [SYMBOL_W-1:0]       cc_coarse_early,
  output logic [SYMBOL_W-1:0]       cc_coarse_late,
  output logic                      cc_sig_aligned,
  output logic                      cc_sig_measured,
  // source-synchronous port
  input  logic                      ss_clk,
  input  link_word_t                ss_tx_word,
  output link_word_t                ss_rx_word,
  output logic                      ss_rx_valid,
  output logic                      ss_link_ready,
  output ss_phase_e                 ss_phase,
  output link_word_t                ss_tx_pad,
  output logic                      ss_tx_clk_pad,
  input  link_word_t                ss_rx_pad,
  input  logic                      ss_rx_clk_pad,
  output logic [LINK_W-1:0][5:0]    ss_fine_tap,
  output cmp_e [LINK_W-1:0]         ss_fine_cmp,
  output logic [LINK_W-1:0]         ss_fine_locked,
  output logic                      ss_fine_exhausted,
  output logic                      ss_eb_overflow,
  output logic                      ss_eb_underflow
);

  pplink_phy_cc u_cc (
    .clk(cc_clk), .rst_n(rst_n), .tx_word(cc_tx_word), .rx_word(cc_rx_word),
    .link_ready(cc_link_ready), .phase(cc_phase), .tx_pad(cc_tx_pad), .rx_pad(cc_rx_pad),
    .fine_tap(cc_fine_tap), .coarse_tap(cc_coarse_tap), .fine_cmp(cc_fine_cmp),
    .fine_locked(cc_fine_locked), .fine_exhausted(cc_fine_exhausted),
    .coarse_early(cc_coarse_early), .coarse_late(cc_coarse_late),
    .sig_aligned(cc_sig_aligned), .sig_measured(cc_sig_measured));

  pplink_phy_ss u_ss (
    .clk(ss_clk), .rst_n(rst_n), .tx_word(ss_tx_word), .rx_word(ss_rx_word),
    .rx_valid(ss_rx_valid), .link_ready(ss_link_ready), .phase(ss_phase),
    .tx_pad(ss_tx_pad), .tx_clk_pad(ss_tx_clk_pad), .rx_pad(ss_rx_pad),
    .rx_clk_pad(ss_rx_clk_pad), .fine_tap(ss_fine_tap), .fine_cmp(ss_fine_cmp),
    .fine_locked(ss_fine_locked), .fine_exhausted(ss_fine_exhausted),
    .eb_overflow(ss_eb_overflow), .eb_underflow(ss_eb_underflow));

endmodule

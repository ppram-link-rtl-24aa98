// phy_tx_cc: transmitter of the common-clocking physical layer.
//
// A plain selector in front of the 17 output lines. In the inter-clock
// de-skew phases it puts the node's own clock on every line (a parallel
// clock signal), in the inter-signal de-skew phase it sends the sync
// pattern (all lines high for one cycle every SYNC_PERIOD cycles), and in
// PH_KEEP it sends the logical layer's words, registered once. Data words
// change on the rising edge of `clk`, the same edge the clock pattern rises
// on, which is what lets the receiver lock on the pattern and then sample
// data mid-bit. In PH_RESET the lines are low. The selector follows the
// reference design; the sync pattern is this design's own.
`timescale 1ps / 1ps
module phy_tx_cc
  import pplink_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  cc_phase_e  phase,
  input  link_word_t tx_word,   // from the logical layer, used in PH_KEEP
  output link_word_t pad        // to the 17 output lines
);

  localparam int SC_W = $clog2(SYNC_PERIOD);

  link_word_t     data_q;
  logic [SC_W-1:0] sync_cnt;
  logic            clk_sel;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      data_q   <= '0;
      sync_cnt <= '0;
    end else begin
      sync_cnt <= (phase == PH_SIG_DESKEW) ? sync_cnt + 1'b1 : '0;
      unique case (phase)
        PH_SIG_DESKEW: data_q <= (sync_cnt == '0) ? '1 : '0;
        PH_KEEP:       data_q <= tx_word;
        default:       data_q <= '0;
      endcase
    end
  end

  assign clk_sel = (phase == PH_CLK_DESKEW_A) || (phase == PH_CLK_DESKEW_B);
  assign pad     = clk_sel ? {LINK_W{clk}} : data_q;

endmodule

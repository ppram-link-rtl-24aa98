// phy_ctrl_cc: timer-driven phase controller of the common-clocking method.
//
// After the link is reset both ends of a link run the same timer from the
// same clock, so they step through the start-up phases together:
//   PH_RESET        RESET_CYCLES
//   PH_CLK_DESKEW_A CLK_A_CYCLES  sender: own clock on all 17 lines;
//                                 receiver: Fine DLLs lock
//   PH_SIG_DESKEW   SIG_CYCLES    sender: sync pattern; receiver: Coarse DLLs
//   PH_CLK_DESKEW_B CLK_B_CYCLES  as A, Fine DLLs correct the phase error the
//                                 coarse step brought
//   PH_KEEP         until reset   DLL set points held, data flows
// Inside each de-skew phase the receiver's adjustment starts GUARD cycles
// late, so the words still in flight from the previous phase have drained
// from the line and the DLLs. `fine_start`/`coarse_start` pulse when it
// starts. Phase order and the timer control follow the reference design;
// all cycle counts are this design's choice (16 changes x 8-cycle settle
// plus margin for each Fine phase).
`timescale 1ps / 1ps
module phy_ctrl_cc
  import pplink_pkg::*;
#(
  parameter int RESET_CYCLES = 16,
  parameter int CLK_A_CYCLES = 256,
  parameter int SIG_CYCLES   = 96,
  parameter int CLK_B_CYCLES = 256,
  parameter int GUARD        = 16
) (
  input  logic      clk,
  input  logic      rst_n,
  output cc_phase_e phase,
  output logic      fine_start,
  output logic      fine_adjust,
  output logic      coarse_start,
  output logic      sig_enable,
  output logic      link_ready
);

  localparam int TMR_W = 16;
  logic [TMR_W-1:0] timer;
  logic [TMR_W-1:0] phase_len;

  always_comb begin
    unique case (phase)
      PH_RESET:        phase_len = TMR_W'(RESET_CYCLES);
      PH_CLK_DESKEW_A: phase_len = TMR_W'(CLK_A_CYCLES);
      PH_SIG_DESKEW:   phase_len = TMR_W'(SIG_CYCLES);
      PH_CLK_DESKEW_B: phase_len = TMR_W'(CLK_B_CYCLES);
      default:         phase_len = '1;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= PH_RESET;
      timer <= '0;
    end else if (phase != PH_KEEP) begin
      if (timer == phase_len - 1'b1) begin
        timer <= '0;
        unique case (phase)
          PH_RESET:        phase <= PH_CLK_DESKEW_A;
          PH_CLK_DESKEW_A: phase <= PH_SIG_DESKEW;
          PH_SIG_DESKEW:   phase <= PH_CLK_DESKEW_B;
          default:         phase <= PH_KEEP;
        endcase
      end else begin
        timer <= timer + 1'b1;
      end
    end
  end

  logic in_fine, in_sig, past_guard;
  assign in_fine    = (phase == PH_CLK_DESKEW_A) || (phase == PH_CLK_DESKEW_B);
  assign in_sig     = (phase == PH_SIG_DESKEW);
  assign past_guard = timer >= TMR_W'(GUARD);

  assign fine_start   = in_fine && (timer == TMR_W'(GUARD));
  assign fine_adjust  = in_fine && past_guard;
  assign coarse_start = in_sig && (timer == TMR_W'(GUARD));
  assign sig_enable   = in_sig && past_guard;
  assign link_ready   = (phase == PH_KEEP);

endmodule

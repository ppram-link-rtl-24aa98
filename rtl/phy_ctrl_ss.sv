// phy_ctrl_ss: timer-driven phase controller of the source-synchronous method.
//
// The source-synchronous method has a single start-up state. After reset
// the timer stays RESET_CYCLES in SS_RESET, then DESKEW_CYCLES in
// SS_SIG_DESKEW (the sender toggles every data line each cycle; the
// receiver's Fine DLLs align each line's edges to the reference clock),
// then SS_RUN for good. Inside SS_SIG_DESKEW the adjustment window opens
// GUARD cycles late, with a one-cycle `fine_start` pulse. One copy runs on
// the sender's clock to pick what the lines carry, one on the received
// reference clock to steer the receiver, so the two stay in step. The
// single state follows the standard; the cycle counts are this design's.
`timescale 1ps / 1ps
module phy_ctrl_ss
  import pplink_pkg::*;
#(
  parameter int RESET_CYCLES  = 16,
  parameter int DESKEW_CYCLES = 256,
  parameter int GUARD         = 16
) (
  input  logic      clk,
  input  logic      rst_n,
  output ss_phase_e phase,
  output logic      fine_start,
  output logic      fine_adjust,
  output logic      link_ready
);

  localparam int TMR_W = 16;
  logic [TMR_W-1:0] timer;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= SS_RESET;
      timer <= '0;
    end else if (phase == SS_RESET) begin
      if (timer == TMR_W'(RESET_CYCLES - 1)) begin
        phase <= SS_SIG_DESKEW;
        timer <= '0;
      end else timer <= timer + 1'b1;
    end else if (phase == SS_SIG_DESKEW) begin
      if (timer == TMR_W'(DESKEW_CYCLES - 1)) begin
        phase <= SS_RUN;
        timer <= '0;
      end else timer <= timer + 1'b1;
    end
  end

  assign fine_start  = (phase == SS_SIG_DESKEW) && (timer == TMR_W'(GUARD));
  assign fine_adjust = (phase == SS_SIG_DESKEW) && (timer >= TMR_W'(GUARD));
  assign link_ready  = (phase == SS_RUN);

endmodule

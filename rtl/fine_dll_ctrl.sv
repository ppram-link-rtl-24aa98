// fine_dll_ctrl: the N-bit tap counter of a Fine DLL.
//
// The counter chooses how many delay elements are in the data path. It
// starts in the middle of the line (N_ELEM/2) so the DLL can move either
// way. While `adjust` is high it waits SETTLE cycles after each decision so
// the delay line and the comparator pipeline settle, then follows the
// comparator: CMP_INC adds one element, CMP_DEC removes one, CMP_LOCK holds
// and sets `locked`. `start` (one cycle, at the beginning of a de-skew
// phase) clears the change budget: at most MAX_CHANGES changes are allowed
// per phase; a phase that uses them all without lock raises `exhausted`.
// Outside adjustment the tap is kept (the DLL set point is held).
// The counter, the middle start and the budget of 16 changes follow the
// reference design; SETTLE is this design's choice.
`timescale 1ps / 1ps
module fine_dll_ctrl
  import pplink_pkg::*;
#(
  parameter int N_ELEM      = 66,
  parameter int MAX_CHANGES = 16,
  parameter int SETTLE      = 8,
  localparam int SEL_W = $clog2(N_ELEM + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,    // new de-skew phase: reset budget
  input  logic             adjust,   // de-skew phase active
  input  cmp_e             cmp,
  output logic [SEL_W-1:0] tap,
  output logic             locked,
  output logic             exhausted
);

  localparam int CNT_W = $clog2(MAX_CHANGES + 1);
  localparam int TMR_W = $clog2(SETTLE + 1);
  localparam logic [SEL_W-1:0] TAP_MID = SEL_W'(N_ELEM / 2);
  localparam logic [SEL_W-1:0] TAP_MAX = SEL_W'(N_ELEM);

  logic [CNT_W-1:0] changes;
  logic [TMR_W-1:0] timer;
  logic             budget_ok;

  assign budget_ok = changes < CNT_W'(MAX_CHANGES);
  assign exhausted = !budget_ok && !locked;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tap     <= TAP_MID;
      changes <= '0;
      timer   <= '0;
      locked  <= 1'b0;
    end else if (start) begin
      changes <= '0;
      timer   <= '0;
      locked  <= 1'b0;
    end else if (adjust) begin
      if (timer != TMR_W'(SETTLE - 1)) begin
        timer <= timer + 1'b1;
      end else begin
        timer <= '0;
        unique case (cmp)
          CMP_LOCK: locked <= 1'b1;
          CMP_INC: if (budget_ok && tap != TAP_MAX) begin
            tap     <= tap + 1'b1;
            changes <= changes + 1'b1;
            locked  <= 1'b0;
          end
          CMP_DEC: if (budget_ok && tap != '0) begin
            tap     <= tap - 1'b1;
            changes <= changes + 1'b1;
            locked  <= 1'b0;
          end
          default: ;
        endcase
      end
    end
  end

endmodule

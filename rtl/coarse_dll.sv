// coarse_dll: Coarse DLL of one received data line.
//
// This is a behavioural model, because its delay line is an analogue part
// (see delay_line); the register that sets it is ordinary logic. The line
// runs through N_ELEM elements of one clock cycle each (20 ns at 50 MHz).
// The path length is 2 elements at reset, which the receiver treats as
// "0 cycles"; a pulse on `early` (the bit arrived a cycle before the flag
// bit) adds one element, a pulse on `late` removes one, so the setting is
// -1 / 0 / +1 cycle. At most MAX_CHANGES changes are accepted after `start`.
// The element count (3), element delay and change budget (2) follow the
// reference design; mapping -1/0/+1 to 1/2/3 elements is this design's own.
`timescale 1ps / 1ps
module coarse_dll #(
  parameter int N_ELEM      = 3,
  parameter int TD_PS       = 20000,
  parameter int MAX_CHANGES = 2,
  localparam int SEL_W = $clog2(N_ELEM + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             din,
  input  logic             start,
  input  logic             early,  // add one cycle of delay
  input  logic             late,   // remove one cycle of delay
  output logic             dout,
  output logic [SEL_W-1:0] tap
);

  localparam logic [SEL_W-1:0] TAP_MID = SEL_W'((N_ELEM + 1) / 2);
  localparam int CNT_W = $clog2(MAX_CHANGES + 1);

  logic [CNT_W-1:0] changes;
  logic             budget_ok;

  assign budget_ok = changes < CNT_W'(MAX_CHANGES);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tap     <= TAP_MID;
      changes <= '0;
    end else if (start) begin
      changes <= '0;
    end else if (budget_ok) begin
      if (early && !late && tap != SEL_W'(N_ELEM)) begin
        tap     <= tap + 1'b1;
        changes <= changes + 1'b1;
      end else if (late && !early && tap != SEL_W'(1)) begin
        tap     <= tap - 1'b1;
        changes <= changes + 1'b1;
      end
    end
  end

  delay_line #(.N_ELEM(N_ELEM), .TD_PS(TD_PS)) u_line (
    .din(din), .sel(tap), .dout(dout));

endmodule

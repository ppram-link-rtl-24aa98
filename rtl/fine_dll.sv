// fine_dll: closed-loop digital Fine DLL of one received line.
//
// This is a behavioural model, because its delay line and its comparator
// delay element are analogue parts (see delay_line); the control inside it
// (phase_comparator, fine_dll_ctrl) is synthesizable RTL. The received line
// `din` runs through a chain of N_ELEM equal elements; the tap counter
// moves the tap one element at a time until the sampling clock `clk` sits
// in anti-phase with the received clock pattern, then holds. `q` is the
// received bit captured at `clk` through the chosen tap. Default sizes are
// the common-clocking Fine DLL of the reference design: 66 elements of
// 1 ns, at most 16 changes per de-skew phase, dt_comp = one element. With
// SOURCE_SYNC set (and 33 elements, the source-synchronous size) `clk` is
// the received reference clock, the comparator is phase_comparator_ss and
// `q` is captured on the falling edge of `clk`.
`timescale 1ps / 1ps
module fine_dll
  import pplink_pkg::*;
#(
  parameter int N_ELEM      = 66,
  parameter int TD_PS       = 1000,
  parameter int MAX_CHANGES = 16,
  parameter int SETTLE      = 8,
  parameter bit SOURCE_SYNC = 1'b0,  // 1: comparator and capture of the source-synchronous method
  localparam int SEL_W = $clog2(N_ELEM + 1)
) (
  input  logic             clk,     // Sample_In
  input  logic             rst_n,
  input  logic             din,     // line from the pad (or Coarse DLL)
  input  logic             start,
  input  logic             adjust,
  output logic             q,
  output logic [SEL_W-1:0] tap,
  output logic             locked,
  output logic             exhausted,
  output cmp_e             cmp
);

  logic d_dly, clk_cmp;

  delay_line #(.N_ELEM(N_ELEM), .TD_PS(TD_PS)) u_line (
    .din(din), .sel(tap), .dout(d_dly));

  // dt_comp: one element of the same kind on the sampling clock
  delay_line #(.N_ELEM(1), .TD_PS(TD_PS)) u_comp (
    .din(clk), .sel(1'b1), .dout(clk_cmp));

  if (SOURCE_SYNC) begin : g_ss
    phase_comparator_ss u_cmp (
      .clk(clk), .clk_cmp(clk_cmp), .rst_n(rst_n), .d(d_dly), .q(q), .cmp(cmp));
  end else begin : g_cc
    phase_comparator u_cmp (
      .clk(clk), .clk_cmp(clk_cmp), .rst_n(rst_n), .d(d_dly), .q(q), .cmp(cmp));
  end

  fine_dll_ctrl #(.N_ELEM(N_ELEM), .MAX_CHANGES(MAX_CHANGES), .SETTLE(SETTLE)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .start(start), .adjust(adjust), .cmp(cmp),
    .tap(tap), .locked(locked), .exhausted(exhausted));

endmodule

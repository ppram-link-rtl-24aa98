// phase_comparator: early/late detector of a Fine DLL (common-clocking method).
//
// The sender drives its own clock onto the data line. The receiver wants its
// sampling clock (Sample_In, here `clk`) in anti-phase with the received,
// delayed clock: the received clock must fall at the rising edge of `clk`,
// which puts every later data edge half a cycle away from the sampling
// point. Two flip-flops sample the delayed line, one at `clk` and one at
// `clk_cmp`, which is `clk` passed through one delay element (dt_comp).
//   s0 s1 = 1 0 : falling edge inside the window      -> CMP_LOCK
//   s0 s1 = 1 1 : line still high, its fall is later  -> CMP_DEC (less delay)
//   s0 s1 = 0 x : line low, its fall is earlier       -> CMP_INC (more delay)
// The sample at `clk_cmp` is re-timed into the `clk` domain, and the `clk`
// sample is delayed one cycle to pair with it, so `cmp` is the decision on
// the samples of two cycles ago (latency 2 cycles after the edge). The
// sampling flops and the window follow the reference design; the decision
// table is this design's own. `q` is the sampled data bit (the receiver's
// capture flip-flop), valid one cycle after the edge it was taken on.
`timescale 1ps / 1ps
module phase_comparator
  import pplink_pkg::*;
(
  input  logic clk,      // Sample_In: receiver's own clock
  input  logic clk_cmp,  // Sample_In delayed by dt_comp
  input  logic rst_n,
  input  logic d,        // delayed received line
  output logic q,        // line sampled at clk
  output cmp_e cmp       // decision, registered
);

  logic s1_raw, s1, s0_d, valid;

  always_ff @(posedge clk) q <= d;
  always_ff @(posedge clk_cmp) s1_raw <= d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s0_d  <= 1'b0;
      s1    <= 1'b0;
      valid <= 1'b0;
      cmp   <= CMP_HOLD;
    end else begin
      s0_d  <= q;
      s1    <= s1_raw;
      valid <= 1'b1;
      if (!valid)               cmp <= CMP_HOLD;
      else if (s0_d && !s1)     cmp <= CMP_LOCK;
      else if (s0_d && s1)      cmp <= CMP_DEC;
      else                      cmp <= CMP_INC;
    end
  end

endmodule

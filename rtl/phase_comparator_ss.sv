// phase_comparator_ss: early/late detector of a Fine DLL in the
// source-synchronous method.
//
// Here the sampling signal (Sample_In, `clk`) is the reference clock sent
// along with the data, and data are captured on its falling edge (the
// inverted reference clock), which is mid-bit when every data edge sits at
// the reference clock's rising edge. During de-skew the sender toggles all
// data lines every cycle, so each delayed line must change between `clk`
// rising and `clk_cmp` rising (one delay element later). Three samples:
// `m` at the previous falling edge (the capture flop), `s0` at the rising
// edge, `s1` one element after it.
//   s0 != s1          : edge inside the window             -> CMP_LOCK
//   s0 == s1, s0 != m : the edge came before the window    -> CMP_INC
//   s0 == s1 == m     : the edge has not come yet          -> CMP_DEC
// `cmp` is registered on `clk` two cycles after the samples; `q` is the
// captured bit, updated on each falling edge. Sampling on the inverted
// reference clock follows the standard; the toggle pattern and the decision
// table are this design's own.
`timescale 1ps / 1ps
module phase_comparator_ss
  import pplink_pkg::*;
(
  input  logic clk,      // Sample_In: received reference clock
  input  logic clk_cmp,  // Sample_In delayed by dt_comp
  input  logic rst_n,
  input  logic d,        // delayed data line
  output logic q,        // line captured at the falling edge of clk
  output cmp_e cmp
);

  logic s0, m0, s1_raw, s1, m_d, s0_d, valid;

  always_ff @(negedge clk) q <= d;
  always_ff @(posedge clk) begin
    s0 <= d;
    m0 <= q;  // capture from the falling edge just before this rising edge
  end
  always_ff @(posedge clk_cmp) s1_raw <= d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1    <= 1'b0;
      s0_d  <= 1'b0;
      m_d   <= 1'b0;
      valid <= 1'b0;
      cmp   <= CMP_HOLD;
    end else begin
      s1    <= s1_raw;  // sample taken one element after the edge at which s0 was taken
      s0_d  <= s0;
      m_d   <= m0;
      valid <= 1'b1;
      if (!valid)            cmp <= CMP_HOLD;
      else if (s0_d != s1)   cmp <= CMP_LOCK;
      else if (s0_d != m_d)  cmp <= CMP_INC;
      else                   cmp <= CMP_DEC;
    end
  end

endmodule

// phase_comparator_ss_tb: checks the source-synchronous comparator's
// decision against the position of the data edges.
//
// The reference clock has a 20 ns period and clk_cmp follows it by 1 ns.
// The line toggles once per cycle, `off` ps after each rising edge of the
// reference clock. Expected result, worked out from the waveform:
//   - off in [0, 1000) -> LOCK (the edge lies between the two samples);
//   - off in [1000, 10000) -> DEC (the edge is late: the line matches at the
//     falling edge before and at both samples);
//   - off in [10000, 20000) -> INC (the edge came after the falling edge
//     before but before the rising edge).
// Each offset is held for 8 cycles and the decision is read after 5. The
// falling-edge capture `q` must equal the line value at that edge.
`timescale 1ps / 1ps
module phase_comparator_ss_tb;
  import pplink_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0, clk_cmp, rst_n = 1'b0, d, q;
  cmp_e cmp;
  int   off = 500;   // falling edge of d, ps after rising clk

  always #10000 clk = ~clk;
  always @(clk) clk_cmp <= #1000 clk;

  // d toggles `off` ps after each rising clk edge.
  always @(posedge clk) begin
    automatic int o = off;
    fork begin
      #(o) d = ~d;
    end join_none
  end

  // Line value at each falling edge, for the capture check.
  logic d_at_fall;
  always @(negedge clk) d_at_fall <= d;

  phase_comparator_ss dut (.clk(clk), .clk_cmp(clk_cmp), .rst_n(rst_n), .d(d), .q(q), .cmp(cmp));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic cmp_e expected(input int o);
    int m = ((o % 20000) + 20000) % 20000;
    if (m < 1000)  return CMP_LOCK;
    if (m < 10000) return CMP_DEC;
    return CMP_INC;
  endfunction

  int offs [12] = '{500, 300, 2500, 7000, 9500, 10700, 14000, 19500, 900, 1500, 12500, 18800};
  int n_lock = 0, n_inc = 0, n_dec = 0;

  initial begin
    d = 1'b1;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    #2000;
    check(cmp == CMP_HOLD, "no decision right after reset");
    foreach (offs[k]) begin
      off = offs[k];
      repeat (5) @(posedge clk);
      #2000;
      check(cmp == expected(off), $sformatf("decision for offset %0d ps: %0d", off, cmp));
      check(q == d_at_fall, "falling-edge capture");
      unique case (cmp)
        CMP_LOCK: n_lock++;
        CMP_INC:  n_inc++;
        CMP_DEC:  n_dec++;
        default: ;
      endcase
    end
    check(n_lock > 0 && n_inc > 0 && n_dec > 0, "all three decisions seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

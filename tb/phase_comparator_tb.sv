// phase_comparator_tb: checks the comparator's decision against the position
// of the received clock's falling edge.
//
// The sampling clock has a 20 ns period and clk_cmp follows it by 1 ns. The
// line carries the same 20 ns clock shifted so that its falling edge lands
// `off` ps after the rising edge of clk. Expected result, worked out from
// the waveform: off in [0, 1000) -> LOCK (line high at clk, low at clk_cmp),
// off in [1000, 10000) -> DEC (high at both), otherwise INC (line low at
// clk). Each offset is held for 8 cycles and the decision is read after 5.
`timescale 1ps / 1ps
module phase_comparator_tb;
  import pplink_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0, clk_cmp, rst_n = 1'b0, d, q;
  cmp_e cmp;
  int   off = 500;   // falling edge of d, ps after rising clk

  always #10000 clk = ~clk;
  always @(clk) clk_cmp <= #1000 clk;

  // d: 20 ns clock whose falling edge is `off` ps after each rising clk edge.
  always @(posedge clk) begin
    automatic int o = off;
    fork begin
      #(o);          d = 1'b0;
      #(10000);      d = 1'b1;
    end join_none
  end

  phase_comparator dut (.clk(clk), .clk_cmp(clk_cmp), .rst_n(rst_n), .d(d), .q(q), .cmp(cmp));

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

  int offs [12] = '{500, 300, 2500, 7000, 9500, 10500, 14000, 19500, 900, 1500, 12500, 18800};
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
      // The capture flop took the line 2 ns ago at the edge: line state there.
      check(q == (((off % 20000) < 10000) ? 1'b1 : 1'b0), "captured bit");
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

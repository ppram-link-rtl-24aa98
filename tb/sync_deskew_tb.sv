// sync_deskew_tb: skew detection on the sync pattern.
//
// Words are built here as the receiver would capture them: the sync marker
// (all ones) every 8 cycles, with each symbol bit shifted by its own skew of
// -1, 0 or +1 cycle against the flag bit. Expected: on the first marker,
// `early` holds the bits with skew -1, `late` those with +1; the next marker
// is skipped; once the skews are cleared the next measurement reports
// `aligned`. Nothing is reported while `enable` is low.
`timescale 1ps / 1ps
module sync_deskew_tb;
  import pplink_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, enable = 1'b0;
  link_word_t rx = '0;
  logic [SYMBOL_W-1:0] early, late;
  logic aligned, measured;
  int skew [SYMBOL_W];
  int cyc = 0;

  always #10000 clk = ~clk;

  sync_deskew dut (.clk(clk), .rst_n(rst_n), .enable(enable), .rx(rx),
                   .early(early), .late(late), .aligned(aligned), .measured(measured));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // Drive the pattern: flag high when cyc % 8 == 4, bit i when (cyc - skew) % 8 == 4.
  always @(posedge clk) begin
    link_word_t w;
    cyc <= cyc + 1;
    w[FLAG_BIT] = ((cyc + 1) % SYNC_PERIOD) == 4;
    for (int i = 0; i < SYMBOL_W; i++) w[i] = ((cyc + 1 - skew[i]) % SYNC_PERIOD) == 4;
    rx <= w;
  end

  int n_meas = 0;
  logic [SYMBOL_W-1:0] exp_e, exp_l;

  initial begin
    foreach (skew[i]) skew[i] = 0;
    skew[2] = -1; skew[5] = 1; skew[9] = -1; skew[15] = 1;
    exp_e = '0; exp_l = '0;
    exp_e[2] = 1; exp_e[9] = 1; exp_l[5] = 1; exp_l[15] = 1;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (20) begin
      @(negedge clk);
      check(!measured && early == '0 && late == '0, "quiet while disabled");
    end
    enable = 1'b1;
    // First measurement.
    while (!measured) @(negedge clk);
    check(early == exp_e, $sformatf("early %h", early));
    check(late == exp_l, $sformatf("late %h", late));
    check(!aligned, "not aligned yet");
    foreach (skew[i]) skew[i] = 0;   // the Coarse DLLs act
    // The next marker must be skipped.
    repeat (SYNC_PERIOD) begin
      @(negedge clk);
      check(!measured, "marker after a correction skipped");
    end
    while (!measured) @(negedge clk);
    check(early == '0 && late == '0, "no skew left");
    check(aligned, "aligned");
    // Steady state: every marker measured.
    repeat (3 * SYNC_PERIOD) begin
      @(negedge clk);
      if (measured) n_meas++;
    end
    check(n_meas == 3, "every marker measured once aligned");
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

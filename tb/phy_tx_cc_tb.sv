// phy_tx_cc_tb: output of the transmitter in each phase.
//
// The phase input is stepped through the start-up order. Checks, all at
// fixed points of the clock: in PH_RESET the lines are low; in the clock
// phases every line equals the clock, sampled in both clock halves; in
// PH_SIG_DESKEW the lines are all ones in exactly one cycle of every 8 and
// zero otherwise; in PH_KEEP each word presented appears on the lines one
// cycle later.
`timescale 1ps / 1ps
module phy_tx_cc_tb;
  import pplink_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  cc_phase_e phase = PH_RESET;
  link_word_t tx_word = '0, pad, prev_word;

  always #10000 clk = ~clk;

  phy_tx_cc dut (.clk(clk), .rst_n(rst_n), .phase(phase), .tx_word(tx_word), .pad(pad));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    int ones, zeros, gap;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (3) begin @(posedge clk); #5000; check(pad == '0, "low in reset"); end
    @(negedge clk) phase = PH_CLK_DESKEW_A;
    repeat (10) begin
      @(posedge clk); #5000; check(pad == '1, "clock pattern high half");
      @(negedge clk); #5000; check(pad == '0, "clock pattern low half");
    end
    @(negedge clk) phase = PH_SIG_DESKEW;
    @(posedge clk);
    ones = 0; zeros = 0; gap = -1;
    for (int c = 0; c < 8 * SYNC_PERIOD; c++) begin
      @(posedge clk); #5000;
      if (pad == '1) begin
        ones++;
        if (gap >= 0) check(gap == SYNC_PERIOD, $sformatf("marker spacing %0d", gap));
        gap = 0;
      end else begin
        check(pad == '0, "sync pattern between markers is zero");
        zeros++;
      end
      if (gap >= 0) gap++;
    end
    check(ones == 8 && zeros == 7 * 8, "one marker per period");
    @(negedge clk) phase = PH_CLK_DESKEW_B;
    repeat (4) begin
      @(posedge clk); #5000; check(pad == '1, "clock pattern again (B)");
      @(negedge clk); #5000; check(pad == '0, "clock pattern low (B)");
    end
    @(negedge clk) phase = PH_KEEP;
    for (int n = 0; n < 50; n++) begin
      tx_word = link_word_t'($urandom);
      prev_word = tx_word;
      @(posedge clk); #5000;
      check(pad == prev_word, "data word one cycle after it is presented");
      @(negedge clk);
    end
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

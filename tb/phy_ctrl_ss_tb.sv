// phy_ctrl_ss_tb: checks the source-synchronous phase controller with short
// phase lengths (RESET 5, DESKEW 40, GUARD 6).
//
// For each cycle after reset the expected phase, fine_start, fine_adjust
// and link_ready are computed from the cycle number and compared. A second
// reset in the middle of the de-skew state must restart the sequence.
`timescale 1ps / 1ps
module phy_ctrl_ss_tb;
  import pplink_pkg::*;

  localparam int RC = 5, DC = 40, G = 6;

  logic clk = 1'b0, rst_n = 1'b0;
  always #10000 clk = ~clk;

  ss_phase_e phase;
  logic      fstart, fadj, ready;

  phy_ctrl_ss #(.RESET_CYCLES(RC), .DESKEW_CYCLES(DC), .GUARD(G)) dut (
    .clk(clk), .rst_n(rst_n), .phase(phase), .fine_start(fstart),
    .fine_adjust(fadj), .link_ready(ready));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic run(input int ncyc);
    for (int c = 0; c < ncyc; c++) begin
      ss_phase_e ep;
      int        t;
      if (c < RC) begin ep = SS_RESET; t = c; end
      else if (c < RC + DC) begin ep = SS_SIG_DESKEW; t = c - RC; end
      else begin ep = SS_RUN; t = 0; end
      check(phase == ep, $sformatf("phase at cycle %0d", c));
      check(fstart == (ep == SS_SIG_DESKEW && t == G), $sformatf("fine_start at cycle %0d", c));
      check(fadj == (ep == SS_SIG_DESKEW && t >= G), $sformatf("fine_adjust at cycle %0d", c));
      check(ready == (ep == SS_RUN), $sformatf("link_ready at cycle %0d", c));
      @(posedge clk);
      #1000;
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1000 rst_n = 1'b1;
    run(RC + DC + 20);
    rst_n = 1'b0;
    #1000;
    check(phase == SS_RESET && !ready, "reset returns to SS_RESET");
    @(posedge clk);
    #1000 rst_n = 1'b1;
    run(RC + 10);
    rst_n = 1'b0;
    @(posedge clk);
    #1000 rst_n = 1'b1;
    run(RC + DC + 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100us;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

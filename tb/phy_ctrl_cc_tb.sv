// phy_ctrl_cc_tb: phase sequence and timing of the start-up controller.
//
// With small phase lengths the test follows the controller from reset and
// checks, every cycle, the phase against a schedule computed here (RESET
// for 5 cycles, A for 40, SIG for 24, B for 40, then KEEP for good) and the
// control outputs derived from it: adjust windows open GUARD cycles into a
// phase, start pulses last one cycle at that point, link_ready only in KEEP.
`timescale 1ps / 1ps
module phy_ctrl_cc_tb;
  import pplink_pkg::*;

  localparam int R = 5, A = 40, S = 24, B = 40, G = 6;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  cc_phase_e phase;
  logic fine_start, fine_adjust, coarse_start, sig_enable, link_ready;

  always #10000 clk = ~clk;

  phy_ctrl_cc #(.RESET_CYCLES(R), .CLK_A_CYCLES(A), .SIG_CYCLES(S),
                .CLK_B_CYCLES(B), .GUARD(G)) dut (
    .clk(clk), .rst_n(rst_n), .phase(phase), .fine_start(fine_start),
    .fine_adjust(fine_adjust), .coarse_start(coarse_start),
    .sig_enable(sig_enable), .link_ready(link_ready));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  int n_fs = 0, n_cs = 0;

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int c = 0; c < R + A + S + B + 60; c++) begin
      cc_phase_e ep;
      int t;
      if (c < R)                     begin ep = PH_RESET;        t = c; end
      else if (c < R + A)            begin ep = PH_CLK_DESKEW_A; t = c - R; end
      else if (c < R + A + S)        begin ep = PH_SIG_DESKEW;   t = c - R - A; end
      else if (c < R + A + S + B)    begin ep = PH_CLK_DESKEW_B; t = c - R - A - S; end
      else                           begin ep = PH_KEEP;         t = 0; end
      check(phase == ep, $sformatf("cycle %0d phase %0d expected %0d", c, phase, ep));
      check(fine_adjust == ((ep == PH_CLK_DESKEW_A || ep == PH_CLK_DESKEW_B) && t >= G), "fine_adjust");
      check(fine_start == ((ep == PH_CLK_DESKEW_A || ep == PH_CLK_DESKEW_B) && t == G), "fine_start");
      check(sig_enable == (ep == PH_SIG_DESKEW && t >= G), "sig_enable");
      check(coarse_start == (ep == PH_SIG_DESKEW && t == G), "coarse_start");
      check(link_ready == (ep == PH_KEEP), "link_ready");
      if (fine_start) n_fs++;
      if (coarse_start) n_cs++;
      @(negedge clk);
    end
    check(n_fs == 2 && n_cs == 1, "start pulses: two fine, one coarse");
    // Reset in KEEP returns to the beginning.
    rst_n = 1'b0;
    @(negedge clk) rst_n = 1'b1;
    check(phase == PH_RESET && !link_ready, "reset restarts the sequence");
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

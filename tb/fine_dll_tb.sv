// fine_dll_tb: closed-loop lock of one Fine DLL on a received clock pattern.
//
// The received line is the 20 ns clock delayed by a board delay. For each
// board delay the DLL is reset, adjusted for one de-skew phase (16 changes
// allowed), and then must be locked at the tap the waveform calls for: the
// tap t closest to the middle (33) for which the received falling edge,
// delay + t x 1 ns + 10 ns after the clock's rising edge, falls in the
// 1 ns window after the sampling edge. The number of cycles to lock must
// fit the budget: |t - 33| changes x SETTLE cycles, plus settling.
`timescale 1ps / 1ps
module fine_dll_tb;
  import pplink_pkg::*;

  localparam int SETTLE = 8;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, adjust = 1'b0;
  logic din, q, locked, exhausted;
  logic [6:0] tap;
  cmp_e cmp;
  int board_ps = 3300;

  always #10000 clk = ~clk;
  // Received line: the clock delayed by board_ps (transport).
  always @(clk) begin
    automatic logic v = clk;
    automatic int dl = board_ps;
    fork begin #(dl); din = v; end join_none
  end

  fine_dll #(.SETTLE(SETTLE)) dut (
    .clk(clk), .rst_n(rst_n), .din(din), .start(start), .adjust(adjust),
    .q(q), .tap(tap), .locked(locked), .exhausted(exhausted), .cmp(cmp));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // Expected tap: fall of the line relative to a rising clk edge must be in [0,1000).
  function automatic int expected_tap(input int b);
    int best = -1;
    for (int t = 0; t <= 66; t++) begin
      int fall = ((b + t * 1000 + 10000) % 20000);
      if (fall < 1000 && (best < 0 || (t > 33 ? t - 33 : 33 - t) < (best > 33 ? best - 33 : 33 - best)))
        best = t;
    end
    return best;
  endfunction

  int boards [6] = '{3300, 12700, 500, 17900, 9100, 6400};
  int n_up = 0, n_down = 0;

  initial begin
    din = 1'b0;
    foreach (boards[k]) begin
      int exp_t, cycles;
      board_ps = boards[k];
      rst_n = 1'b0;
      repeat (4) @(posedge clk);
      @(negedge clk) rst_n = 1'b1;
      check(tap == 7'd33, "tap starts in the middle");
      @(negedge clk) start = 1'b1;
      @(negedge clk) begin start = 1'b0; adjust = 1'b1; end
      cycles = 0;
      exp_t = expected_tap(board_ps);
      while (!locked && cycles < 400) begin @(negedge clk); cycles++; end
      repeat (3 * SETTLE) @(negedge clk);
      adjust = 1'b0;
      check(locked, $sformatf("locked for board delay %0d", board_ps));
      check(int'(tap) == exp_t, $sformatf("tap %0d expected %0d for board %0d", tap, exp_t, board_ps));
      check(cycles <= ((exp_t > 33 ? exp_t - 33 : 33 - exp_t) + 2) * SETTLE,
            $sformatf("lock took %0d cycles", cycles));
      check(!exhausted, "budget not used up");
      if (exp_t > 33) n_up++;
      if (exp_t < 33) n_down++;
      // Set point is held with adjust low.
      repeat (20) @(negedge clk);
      check(int'(tap) == exp_t, "tap held");
    end
    check(n_up > 0 && n_down > 0, "locked by moving both ways");
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

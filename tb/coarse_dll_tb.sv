// coarse_dll_tb: setting and delay of the Coarse DLL.
//
// After reset the path is 2 elements (40 ns). Pulses on `early` / `late`
// move it by one 20 ns element, inside 1..3 elements and at most 2 changes
// after `start`. After each step the delay of an edge through the line is
// measured and must be tap x 20 ns.
`timescale 1ps / 1ps
module coarse_dll_tb;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, early = 1'b0, late = 1'b0;
  logic din = 1'b0, dout;
  logic [1:0] tap;

  always #10000 clk = ~clk;

  coarse_dll dut (.clk(clk), .rst_n(rst_n), .din(din), .start(start),
                  .early(early), .late(late), .dout(dout), .tap(tap));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic pulse(input bit e, input bit l);
    @(negedge clk) begin early = e; late = l; end
    @(negedge clk) begin early = 1'b0; late = 1'b0; end
  endtask

  task automatic measure(input int exp_tap);
    longint t0;
    #3000;
    t0 = $time;
    din = ~din;
    @(dout);
    check(tap == 2'(exp_tap), $sformatf("tap %0d expected %0d", tap, exp_tap));
    check($time - t0 == longint'(exp_tap) * 20000, $sformatf("delay %0d ps", $time - t0));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    measure(2);
    pulse(1, 0); measure(3);          // +1 cycle
    pulse(1, 0); measure(3);          // end stop
    pulse(0, 1); measure(2);          // second change
    pulse(0, 1); measure(2);          // budget of 2 used up
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    pulse(0, 1); measure(1);          // -1 cycle
    pulse(0, 1); measure(1);          // end stop
    pulse(1, 1); measure(1);          // both at once: no change
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

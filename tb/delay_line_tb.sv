// delay_line_tb: measures the delay of the delay-line model.
//
// A 66-element, 1 ns line is driven with edges at several tap settings and
// the time from each input edge to the matching output edge must be
// sel x 1 ns. A 3-element, 20 ns line (the Coarse DLL's) must carry a
// 10 ns pulse through 40 ns of delay without losing it.
`timescale 1ps / 1ps
module delay_line_tb;

  int checks = 0, failures = 0;

  logic       din = 1'b0, cin = 1'b0;
  logic [6:0] sel = '0;
  logic [1:0] csel = 2'd2;
  logic       dout, cout;

  delay_line #(.N_ELEM(66), .TD_PS(1000)) u_fine (.din(din), .sel(sel), .dout(dout));
  delay_line #(.N_ELEM(3), .TD_PS(20000)) u_coarse (.din(cin), .sel(csel), .dout(cout));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic measure(input int s);
    longint t0, t1;
    sel = 7'(s);
    #100000;
    t0 = $time;
    din = ~din;
    @(dout);
    t1 = $time;
    check(t1 - t0 == longint'(s) * 1000, $sformatf("fine delay at tap %0d: %0d ps", s, t1 - t0));
    check(dout == din, "fine output level");
  endtask

  int rises = 0, falls = 0;
  longint t_rise, t_fall, t_in;
  always @(posedge cout) begin rises++; t_rise = $time; end
  always @(negedge cout) begin falls++; t_fall = $time; end

  initial begin
    #10000;
    foreach (sel_list[k]) measure(sel_list[k]);
    // Taps above the chain read the last element.
    measure(66);
    // Coarse line: a 10 ns pulse through 2 x 20 ns.
    #50000;
    t_in = $time;
    rises = 0; falls = 0;
    cin = 1'b1; #10000; cin = 1'b0;
    #100000;
    check(rises == 1 && falls == 1, "10 ns pulse passes a 40 ns line");
    check(t_fall - t_rise == 10000, "pulse width kept");
    check(t_rise - t_in == 40000, "pulse delayed by two 20 ns elements");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int sel_list [6] = '{0, 1, 5, 33, 40, 65};

  initial begin
    #10ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

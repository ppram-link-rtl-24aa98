// pplink_phy_ss_tb: end-to-end test of a two-node source-synchronous link.
//
// Nodes A and B run from separate clocks: 20.000 ns and 20.010 ns, a
// 500 ppm offset, with unrelated phase. Each direction has 17 data traces
// and a clock trace of different delays (skews of up to 11 ns between the
// lines). The test checks that every Fine DLL locks in the de-skew state
// without running out of changes, and that the Fine DLLs moved both ways.
// Then 400 pseudo-random words go each way. Each receiver must deliver them
// through its elastic buffer in order, without loss, duplicates, overflow
// or underflow.
`timescale 1ps / 1ps
module pplink_phy_ss_tb;
  import pplink_pkg::*;

  localparam int NWORDS = 400;
  localparam int DLY_AB [LINK_W] = '{7100, 9300, 5200, 11800, 8400, 6600, 10200, 7700,
                                     15500, 6100, 8800, 9900, 4700, 7300, 10800, 8100, 9500};
  localparam int CLK_AB = 8000;
  localparam int DLY_BA [LINK_W] = '{5400, 6900, 8200, 4300, 9700, 7600, 5900, 10400,
                                     6300, 8600, 7100, 4900, 9100, 5600, 6700, 14200, 7900};
  localparam int CLK_BA = 6500;

  logic clk_a = 1'b0, clk_b = 1'b0, rst_n = 1'b0;
  initial begin
    #3700;
    forever #10000 clk_a = ~clk_a;
  end
  initial begin
    #11900;
    forever #10005 clk_b = ~clk_b;
  end

  link_word_t tx_a, tx_b, rx_a, rx_b, pad_a, pad_b, in_a, in_b;
  logic       v_a, v_b, rdy_a, rdy_b, cpad_a, cpad_b, cin_a, cin_b;
  ss_phase_e  ph_a, ph_b;
  logic [LINK_W-1:0][5:0] ftap_a, ftap_b;
  cmp_e [LINK_W-1:0]      fcmp_a, fcmp_b;
  logic [LINK_W-1:0]      flock_a, flock_b;
  logic                   fexh_a, fexh_b, ovf_a, ovf_b, unf_a, unf_b;

  for (genvar i = 0; i < LINK_W; i++) begin : g_board
    board_trace #(.DELAY_PS(DLY_AB[i])) u_ab (.a(pad_a[i]), .y(in_b[i]));
    board_trace #(.DELAY_PS(DLY_BA[i])) u_ba (.a(pad_b[i]), .y(in_a[i]));
  end
  board_trace #(.DELAY_PS(CLK_AB)) u_cab (.a(cpad_a), .y(cin_b));
  board_trace #(.DELAY_PS(CLK_BA)) u_cba (.a(cpad_b), .y(cin_a));

  pplink_phy_ss u_a (
    .clk(clk_a), .rst_n(rst_n), .tx_word(tx_a), .rx_word(rx_a), .rx_valid(v_a),
    .link_ready(rdy_a), .phase(ph_a), .tx_pad(pad_a), .tx_clk_pad(cpad_a),
    .rx_pad(in_a), .rx_clk_pad(cin_a), .fine_tap(ftap_a), .fine_cmp(fcmp_a),
    .fine_locked(flock_a), .fine_exhausted(fexh_a), .eb_overflow(ovf_a), .eb_underflow(unf_a));

  pplink_phy_ss u_b (
    .clk(clk_b), .rst_n(rst_n), .tx_word(tx_b), .rx_word(rx_b), .rx_valid(v_b),
    .link_ready(rdy_b), .phase(ph_b), .tx_pad(pad_b), .tx_clk_pad(cpad_b),
    .rx_pad(in_b), .rx_clk_pad(cin_b), .fine_tap(ftap_b), .fine_cmp(fcmp_b),
    .fine_locked(flock_b), .fine_exhausted(fexh_b), .eb_overflow(ovf_b), .eb_underflow(unf_b));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic link_word_t pattern(input int n, input int seed);
    logic [31:0] x;
    x = 32'(n + 1) * 32'h9E3779B1 + 32'(seed) * 32'h85EBCA6B;
    x = x ^ (x >> 15);
    return link_word_t'(x);
  endfunction

  // Senders: word n on cycle n after the node is ready.
  int n_sent_a = 0, n_sent_b = 0;
  always @(posedge clk_a) begin
    tx_a <= rdy_a ? pattern(n_sent_a, 1) : '0;
    if (rdy_a) n_sent_a <= n_sent_a + 1;
  end
  always @(posedge clk_b) begin
    tx_b <= rdy_b ? pattern(n_sent_b, 2) : '0;
    if (rdy_b) n_sent_b <= n_sent_b + 1;
  end

  // Receivers: find the first sent word, then expect the sequence.
  int exp_b = -1, got_b = 0, exp_a = -1, got_a = 0;
  always @(posedge clk_b) if (v_b && rdy_b) begin
    if (exp_b < 0) begin
      for (int k = 0; k < 16; k++) if (rx_b == pattern(k, 1)) exp_b = k + 1;
    end else begin
      check(rx_b == pattern(exp_b, 1), $sformatf("A->B word %0d rx %h exp %h", exp_b, rx_b, pattern(exp_b, 1)));
      exp_b++;
      got_b++;
    end
  end
  always @(posedge clk_a) if (v_a && rdy_a) begin
    if (exp_a < 0) begin
      for (int k = 0; k < 16; k++) if (rx_a == pattern(k, 2)) exp_a = k + 1;
    end else begin
      check(rx_a == pattern(exp_a, 2), $sformatf("B->A word %0d", exp_a));
      exp_a++;
      got_a++;
    end
  end

  // Mechanisms.
  int n_inc = 0, n_dec = 0, n_lock = 0;
  logic [LINK_W-1:0][5:0] ftap_b_q;
  always @(posedge cin_b) begin
    ftap_b_q <= ftap_b;
    if (rst_n) for (int i = 0; i < LINK_W; i++) begin
      if (ftap_b[i] > ftap_b_q[i]) n_inc++;
      if (ftap_b[i] < ftap_b_q[i]) n_dec++;
      if (fcmp_b[i] == CMP_LOCK) n_lock++;
    end
  end

  initial begin
    tx_a = '0; tx_b = '0;
    #50000 rst_n = 1'b1;
    wait (rdy_a && rdy_b);
    repeat (10) @(posedge clk_a);
    check(flock_a == '1 && flock_b == '1, "all Fine DLLs locked");
    check(!fexh_a && !fexh_b, "no Fine DLL out of changes");
    $display("ready at %0t; B fine taps %p", $time, ftap_b);
    repeat (NWORDS) @(posedge clk_a);
    check(got_b > NWORDS - 40 && got_a > NWORDS - 40, $sformatf("words delivered: %0d / %0d", got_b, got_a));
    check(!ovf_a && !ovf_b && !unf_a && !unf_b, "elastic buffers never over- or underflowed");
    check(n_inc > 0, "Fine DLL stepped up");
    check(n_dec > 0, "Fine DLL stepped down");
    check(n_lock > 0, "Fine DLL reported lock");
    $display("mechanisms: fine_inc=%0d fine_dec=%0d fine_lock=%0d", n_inc, n_dec, n_lock);
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

// phy_rx_cc_tb: receiver alone, fed by a transmitter model written here.
//
// The test drives the 17 lines through board traces with a per-line delay
// and steps the receiver's controls through the start-up phases itself:
// clock pattern with the Fine DLLs adjusting, sync pattern with the Coarse
// DLLs adjusting, clock pattern again, then data. Line 4 is 17 ns later
// and line 11 is 12 ns earlier than the flag line, so the sync measurement
// must report line 4 late and line 11 early and move their Coarse DLLs to
// 1 and 3 elements. Afterwards all Fine DLLs must be locked and 200 random
// words must come out unchanged, in order, with one fixed latency.
`timescale 1ps / 1ps
module phy_rx_cc_tb;
  import pplink_pkg::*;

  localparam int DLY [LINK_W] = '{11200, 12900, 13400, 10100, 29800, 9700, 14100, 12600,
                                  13800, 10900, 11700, 600, 12200, 9300, 13100, 10400, 12500};

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic fine_start = 0, fine_adjust = 0, coarse_start = 0, sig_enable = 0;
  logic send_clk = 1'b0;
  link_word_t data_q = '0, src, pad, rx_word;
  logic [LINK_W-1:0][6:0]   fine_tap;
  logic [SYMBOL_W-1:0][1:0] coarse_tap;
  cmp_e [LINK_W-1:0]        fine_cmp;
  logic [LINK_W-1:0]        fine_locked;
  logic                     fine_exhausted, sig_aligned, sig_measured;
  logic [SYMBOL_W-1:0]      coarse_early, coarse_late;

  always #10000 clk = ~clk;

  assign src = send_clk ? {LINK_W{clk}} : data_q;
  for (genvar i = 0; i < LINK_W; i++) begin : g_line
    board_trace #(.DELAY_PS(DLY[i])) u_tr (.a(src[i]), .y(pad[i]));
  end

  phy_rx_cc dut (
    .clk(clk), .rst_n(rst_n), .pad(pad), .fine_start(fine_start),
    .fine_adjust(fine_adjust), .coarse_start(coarse_start), .sig_enable(sig_enable),
    .rx_word(rx_word), .fine_tap(fine_tap), .coarse_tap(coarse_tap),
    .fine_cmp(fine_cmp), .fine_locked(fine_locked), .fine_exhausted(fine_exhausted),
    .coarse_early(coarse_early), .coarse_late(coarse_late),
    .sig_aligned(sig_aligned), .sig_measured(sig_measured));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic fine_phase();
    @(posedge clk) send_clk <= 1'b1;
    repeat (16) @(posedge clk);
    fine_start <= 1'b1;
    @(posedge clk) begin fine_start <= 1'b0; fine_adjust <= 1'b1; end
    repeat (200) @(posedge clk);
    fine_adjust <= 1'b0;
    send_clk <= 1'b0;
  endtask

  link_word_t sent [0:255];
  int n_early = 0, n_late = 0;
  always @(posedge clk) if (rst_n) begin
    n_early += $countones(coarse_early);
    n_late  += $countones(coarse_late);
  end

  initial begin
    int lat;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    fine_phase();
    check(fine_locked == '1, "Fine DLLs locked after phase A");
    // Inter-signal de-skew: sync pattern.
    for (int c = 0; c < 96; c++) begin
      data_q <= (c % SYNC_PERIOD == 0) ? '1 : '0;
      coarse_start <= (c == 16);
      sig_enable <= (c >= 16);
      @(posedge clk);
    end
    sig_enable <= 1'b0;
    data_q <= '0;
    check(sig_aligned, "sync measurement ends aligned");
    check(coarse_tap[4] == 2'd1 && coarse_tap[11] == 2'd3, "skewed lines moved by one cycle");
    check(n_early == 1 && n_late == 1, $sformatf("one early and one late report (%0d, %0d)", n_early, n_late));
    for (int i = 0; i < SYMBOL_W; i++)
      if (i != 4 && i != 11) check(coarse_tap[i] == 2'd2, "other Coarse DLLs stay at 0");
    fine_phase();
    check(fine_locked == '1, "Fine DLLs locked after phase B");
    check(!fine_exhausted, "no Fine DLL out of changes");
    // Data.
    foreach (sent[n]) sent[n] = link_word_t'($urandom);
    lat = -1;
    for (int n = 0; n < 256; n++) begin
      data_q <= sent[n];
      @(posedge clk); #1000;
      if (n == 40) begin
        for (int l = 1; l < 16 && lat < 0; l++) begin
          if (rx_word == sent[n - l]) lat = l;
        end
        check(lat > 0, "latency found");
      end
      if (n > 40 && lat > 0) check(rx_word == sent[n - lat], $sformatf("word %0d", n));
    end
    $display("latency %0d cycles, coarse taps %p", lat, coarse_tap);
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

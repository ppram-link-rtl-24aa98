// pplink_phy_cc_tb: end-to-end test of a two-node common-clocking link at
// the default (reference-design) sizes.
//
// Nodes A and B share one 50 MHz clock and one reset. A's lines reach B and
// B's lines reach A through board traces with a different delay per line
// (0.4 ns to 29.5 ns), chosen so that the Fine DLLs have to move both ways
// and the inter-signal de-skew has to move a Coarse DLL both ways. The test
// follows the start-up phases, checks that every Fine DLL locks in phase
// A and B and that the sync measurement ends aligned, then sends 300
// pseudo-random words each way and checks that every word arrives
// unchanged and in order with one fixed latency. It counts each mechanism
// (Fine step up, Fine step down, Fine lock, Coarse +1, Coarse -1, each
// phase) and fails if one never happened.
`timescale 1ps / 1ps
module pplink_phy_cc_tb;
  import pplink_pkg::*;

  localparam int NWORDS = 300;
  localparam int FSEL_W = 7;
  localparam int CSEL_W = 2;

  // Board trace delays in ps, index = line (16 = flag).
  localparam int DLY_AB [LINK_W] = '{9110, 11230, 13470, 29530, 10620, 8930, 12080, 410,
                                     14290, 11770, 10050, 9580, 13120, 12660, 8270, 11410, 12370};
  localparam int DLY_BA [LINK_W] = '{28710, 7310, 6420, 9870, 5190, 8640, 7720, 6930,
                                     5570, 8180, 6070, 7440, 9290, 5830, 8760, 6610, 7270};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #10000 clk = ~clk;

  link_word_t tx_a, tx_b, rx_a, rx_b, pad_a, pad_b, in_a, in_b;
  logic       rdy_a, rdy_b;
  cc_phase_e  ph_a, ph_b;
  logic [LINK_W-1:0][FSEL_W-1:0]   ftap_a, ftap_b;
  logic [SYMBOL_W-1:0][CSEL_W-1:0] ctap_a, ctap_b;
  cmp_e [LINK_W-1:0]               fcmp_a, fcmp_b;
  logic [LINK_W-1:0]               flock_a, flock_b;
  logic                            fexh_a, fexh_b;
  logic [SYMBOL_W-1:0]             ce_a, ce_b, cl_a, cl_b;
  logic                            al_a, al_b, ms_a, ms_b;

  for (genvar i = 0; i < LINK_W; i++) begin : g_board
    board_trace #(.DELAY_PS(DLY_AB[i])) u_ab (.a(pad_a[i]), .y(in_b[i]));
    board_trace #(.DELAY_PS(DLY_BA[i])) u_ba (.a(pad_b[i]), .y(in_a[i]));
  end

  pplink_phy_cc u_a (
    .clk(clk), .rst_n(rst_n), .tx_word(tx_a), .rx_word(rx_a), .link_ready(rdy_a),
    .phase(ph_a), .tx_pad(pad_a), .rx_pad(in_a), .fine_tap(ftap_a),
    .coarse_tap(ctap_a), .fine_cmp(fcmp_a), .fine_locked(flock_a),
    .fine_exhausted(fexh_a), .coarse_early(ce_a), .coarse_late(cl_a),
    .sig_aligned(al_a), .sig_measured(ms_a));

  pplink_phy_cc u_b (
    .clk(clk), .rst_n(rst_n), .tx_word(tx_b), .rx_word(rx_b), .link_ready(rdy_b),
    .phase(ph_b), .tx_pad(pad_b), .rx_pad(in_b), .fine_tap(ftap_b),
    .coarse_tap(ctap_b), .fine_cmp(fcmp_b), .fine_locked(flock_b),
    .fine_exhausted(fexh_b), .coarse_early(ce_b), .coarse_late(cl_b),
    .sig_aligned(al_b), .sig_measured(ms_b));

  int checks = 0, failures = 0;
  int n_inc = 0, n_dec = 0, n_lock = 0, n_cearly = 0, n_clate = 0;
  int n_ph [5] = '{0, 0, 0, 0, 0};
  cc_phase_e ph_prev = PH_RESET;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Mechanism counters (fine taps moving, coarse pulses, phase changes).
  logic [LINK_W-1:0][FSEL_W-1:0] ftap_a_q, ftap_b_q;
  always @(posedge clk) begin
    ftap_a_q <= ftap_a;
    ftap_b_q <= ftap_b;
    if (rst_n) begin
      for (int i = 0; i < LINK_W; i++) begin
        if (ftap_a[i] > ftap_a_q[i] || ftap_b[i] > ftap_b_q[i]) n_inc++;
        if (ftap_a[i] < ftap_a_q[i] || ftap_b[i] < ftap_b_q[i]) n_dec++;
        if (fcmp_a[i] == CMP_LOCK || fcmp_b[i] == CMP_LOCK) n_lock++;
      end
      n_cearly += $countones(ce_a) + $countones(ce_b);
      n_clate  += $countones(cl_a) + $countones(cl_b);
      if (ph_a != ph_prev) begin
        n_ph[int'(ph_a)]++;
        check(int'(ph_a) == int'(ph_prev) + 1, "phase order");
        ph_prev <= ph_a;
      end
      check(ph_a == ph_b, "both nodes in the same phase");
    end
  end

  // Sent words, indexed by the cycle they were presented in.
  link_word_t sent_a [0:NWORDS+63];
  link_word_t sent_b [0:NWORDS+63];
  int cyc = 0;

  function automatic link_word_t pattern(input int n, input int seed);
    logic [31:0] x;
    x = 32'(n) * 32'h9E3779B1 + 32'(seed) * 32'h85EBCA6B;
    x = x ^ (x >> 15);
    return link_word_t'(x);
  endfunction

  int lat_ab, lat_ba;

  function automatic int find_latency(input link_word_t hist [0:NWORDS+63],
                                      input link_word_t got [0:15], input int at);
    // got[k] = received word at cycle at+k; find L with got[k]==hist[at+k-L]
    for (int l = 1; l < 16; l++) begin
      bit ok = 1;
      for (int k = 0; k < 16; k++) if (got[k] != hist[at + k - l]) ok = 0;
      if (ok) return l;
    end
    return -1;
  endfunction

  link_word_t got_a [0:15], got_b [0:15];

  initial begin
    tx_a = '0; tx_b = '0;
    repeat (5) @(posedge clk);
    #1000 rst_n = 1'b1;
    // Start-up.
    wait (rdy_a && rdy_b);
    check(flock_a == '1 && flock_b == '1, "all Fine DLLs locked after phase B");
    check(!fexh_a && !fexh_b, "no Fine DLL ran out of changes");
    check(al_a && al_b, "inter-signal de-skew ended aligned");
    check(ctap_b[3] == 2'd1 && ctap_b[7] == 2'd3, "Coarse DLLs moved on the skewed lines A->B");
    check(ctap_a[0] == 2'd1, "Coarse DLL moved on the skewed line B->A");
    $display("ready at %0t; A->B fine taps %p coarse %p", $time, ftap_b, ctap_b);
    // Data transfer.
    for (int n = 0; n < NWORDS + 64; n++) begin
      sent_a[n] = pattern(n, 1);
      sent_b[n] = pattern(n, 2);
    end
    for (cyc = 0; cyc < NWORDS + 32; cyc++) begin
      tx_a <= sent_a[cyc];
      tx_b <= sent_b[cyc];
      @(posedge clk);
      #1000;
      if (cyc >= 16 && cyc < 32) begin
        got_b[cyc-16] = rx_b;
        got_a[cyc-16] = rx_a;
      end
      if (cyc == 32) begin
        lat_ab = find_latency(sent_a, got_b, 16);
        lat_ba = find_latency(sent_b, got_a, 16);
        check(lat_ab > 0, "A->B latency found");
        check(lat_ba > 0, "B->A latency found");
        $display("latency A->B %0d cycles, B->A %0d cycles", lat_ab, lat_ba);
      end
      if (cyc > 32 && lat_ab > 0 && lat_ba > 0) begin
        check(rx_b == sent_a[cyc - lat_ab], "word A->B");
        check(rx_a == sent_b[cyc - lat_ba], "word B->A");
      end
    end
    // Every mechanism must have happened.
    check(n_inc > 0, "Fine DLL stepped up");
    check(n_dec > 0, "Fine DLL stepped down");
    check(n_lock > 0, "Fine DLL comparator reported lock");
    check(n_cearly > 0, "Coarse DLL +1 cycle");
    check(n_clate > 0, "Coarse DLL -1 cycle");
    for (int p = 1; p < 5; p++) check(n_ph[p] == 1, "each start-up phase entered once");
    $display("mechanisms: fine_inc=%0d fine_dec=%0d fine_lock=%0d coarse_plus=%0d coarse_minus=%0d",
             n_inc, n_dec, n_lock, n_cearly, n_clate);
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

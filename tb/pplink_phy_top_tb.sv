// pplink_phy_top_tb: end-to-end test of two nodes joined by both a
// common-clocking link and a source-synchronous link, at the default sizes.
//
// The common-clocking ports share one 50 MHz board clock. Each node's
// source-synchronous port runs from its own clock (20.000 ns and 20.010 ns).
// Every line has its own board delay. The test waits until all four
// directions are ready. It then checks:
//   - every Fine DLL locked without running out of changes;
//   - the common-clocking sync measurement ended aligned;
//   - 300 pseudo-random words pass each direction of both links unchanged
//     and in order;
//   - no elastic buffer over- or underflowed.
// It counts each mechanism and fails if one never happened: Fine step
// up/down and lock on each link, Coarse +1/-1, each common-clocking phase,
// and each source-synchronous phase.
`timescale 1ps / 1ps
module pplink_phy_top_tb;
  import pplink_pkg::*;

  localparam int NWORDS = 300;
  localparam int CC_AB [LINK_W] = '{9110, 11230, 13470, 29530, 10620, 8930, 12080, 410,
                                    14290, 11770, 10050, 9580, 13120, 12660, 8270, 11410, 12370};
  localparam int CC_BA [LINK_W] = '{28710, 7310, 6420, 9870, 5190, 8640, 7720, 6930,
                                    5570, 8180, 6070, 7440, 9290, 5830, 8760, 6610, 7270};
  localparam int SS_AB [LINK_W] = '{7100, 9300, 5200, 11800, 8400, 6600, 10200, 7700,
                                    15500, 6100, 8800, 9900, 4700, 7300, 10800, 8100, 9500};
  localparam int SS_BA [LINK_W] = '{5400, 6900, 8200, 4300, 9700, 7600, 5900, 10400,
                                    6300, 8600, 7100, 4900, 9100, 5600, 6700, 14200, 7900};
  localparam int SCLK_AB = 8000;
  localparam int SCLK_BA = 6500;

  logic cc_clk = 1'b0, sa = 1'b0, sb = 1'b0, rst_n = 1'b0;
  always #10000 cc_clk = ~cc_clk;
  initial begin #3700;  forever #10000 sa = ~sa; end
  initial begin #11900; forever #10005 sb = ~sb; end

  // Per-node signals, index 0 = A, 1 = B.
  link_word_t cc_tx [2], cc_rx [2], cc_pad [2], cc_in [2];
  link_word_t ss_tx [2], ss_rx [2], ss_pad [2], ss_in [2];
  logic       cc_rdy [2], ss_rdy [2], ss_v [2], ss_cpad [2], ss_cin [2];
  cc_phase_e  cc_ph [2];
  ss_phase_e  ss_ph [2];
  logic [LINK_W-1:0][6:0]   cc_ftap [2];
  logic [SYMBOL_W-1:0][1:0] cc_ctap [2];
  logic [LINK_W-1:0][5:0]   ss_ftap [2];
  cmp_e [LINK_W-1:0]        cc_fcmp [2], ss_fcmp [2];
  logic [LINK_W-1:0]        cc_flock [2], ss_flock [2];
  logic [SYMBOL_W-1:0]      cc_ce [2], cc_cl [2];
  logic cc_fexh [2], cc_al [2], cc_ms [2], ss_fexh [2], ss_ovf [2], ss_unf [2];
  logic clk_ss [2];
  assign clk_ss[0] = sa;
  assign clk_ss[1] = sb;

  for (genvar n = 0; n < 2; n++) begin : g_node
    pplink_phy_top u_node (
      .rst_n(rst_n),
      .cc_clk(cc_clk), .cc_tx_word(cc_tx[n]), .cc_rx_word(cc_rx[n]),
      .cc_link_ready(cc_rdy[n]), .cc_phase(cc_ph[n]), .cc_tx_pad(cc_pad[n]),
      .cc_rx_pad(cc_in[n]), .cc_fine_tap(cc_ftap[n]), .cc_coarse_tap(cc_ctap[n]),
      .cc_fine_cmp(cc_fcmp[n]), .cc_fine_locked(cc_flock[n]),
      .cc_fine_exhausted(cc_fexh[n]), .cc_coarse_early(cc_ce[n]),
      .cc_coarse_late(cc_cl[n]), .cc_sig_aligned(cc_al[n]), .cc_sig_measured(cc_ms[n]),
      .ss_clk(clk_ss[n]), .ss_tx_word(ss_tx[n]), .ss_rx_word(ss_rx[n]),
      .ss_rx_valid(ss_v[n]), .ss_link_ready(ss_rdy[n]), .ss_phase(ss_ph[n]),
      .ss_tx_pad(ss_pad[n]), .ss_tx_clk_pad(ss_cpad[n]), .ss_rx_pad(ss_in[n]),
      .ss_rx_clk_pad(ss_cin[n]), .ss_fine_tap(ss_ftap[n]), .ss_fine_cmp(ss_fcmp[n]),
      .ss_fine_locked(ss_flock[n]), .ss_fine_exhausted(ss_fexh[n]),
      .ss_eb_overflow(ss_ovf[n]), .ss_eb_underflow(ss_unf[n]));
  end

  for (genvar i = 0; i < LINK_W; i++) begin : g_board
    board_trace #(.DELAY_PS(CC_AB[i])) u_cab (.a(cc_pad[0][i]), .y(cc_in[1][i]));
    board_trace #(.DELAY_PS(CC_BA[i])) u_cba (.a(cc_pad[1][i]), .y(cc_in[0][i]));
    board_trace #(.DELAY_PS(SS_AB[i])) u_sab (.a(ss_pad[0][i]), .y(ss_in[1][i]));
    board_trace #(.DELAY_PS(SS_BA[i])) u_sba (.a(ss_pad[1][i]), .y(ss_in[0][i]));
  end
  board_trace #(.DELAY_PS(SCLK_AB)) u_kab (.a(ss_cpad[0]), .y(ss_cin[1]));
  board_trace #(.DELAY_PS(SCLK_BA)) u_kba (.a(ss_cpad[1]), .y(ss_cin[0]));

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

  // ---------------- mechanism counters ----------------
  int cc_inc = 0, cc_dec = 0, cc_lock = 0, c_plus = 0, c_minus = 0;
  int ss_inc = 0, ss_dec = 0, ss_lock = 0;
  int cc_phn [5] = '{0, 0, 0, 0, 0};
  int ss_phn [3] = '{0, 0, 0};
  cc_phase_e cc_ph_q = PH_RESET;
  ss_phase_e ss_ph_q = SS_RESET;
  logic [LINK_W-1:0][6:0] cc_ftap_q [2];
  logic [LINK_W-1:0][5:0] ss_ftap_q [2];

  always @(posedge cc_clk) begin
    cc_ftap_q <= cc_ftap;
    if (rst_n) begin
      for (int n = 0; n < 2; n++) for (int i = 0; i < LINK_W; i++) begin
        if (cc_ftap[n][i] > cc_ftap_q[n][i]) cc_inc++;
        if (cc_ftap[n][i] < cc_ftap_q[n][i]) cc_dec++;
        if (cc_fcmp[n][i] == CMP_LOCK) cc_lock++;
      end
      c_plus  += $countones(cc_ce[0]) + $countones(cc_ce[1]);
      c_minus += $countones(cc_cl[0]) + $countones(cc_cl[1]);
      if (cc_ph[0] != cc_ph_q) begin
        cc_phn[int'(cc_ph[0])]++;
        check(int'(cc_ph[0]) == int'(cc_ph_q) + 1, "common-clocking phase order");
        cc_ph_q <= cc_ph[0];
      end
    end
  end

  for (genvar n = 0; n < 2; n++) begin : g_sscount
    always @(posedge ss_cin[n]) begin
      ss_ftap_q[n] <= ss_ftap[n];
      if (rst_n) for (int i = 0; i < LINK_W; i++) begin
        if (ss_ftap[n][i] > ss_ftap_q[n][i]) ss_inc++;
        if (ss_ftap[n][i] < ss_ftap_q[n][i]) ss_dec++;
        if (ss_fcmp[n][i] == CMP_LOCK) ss_lock++;
      end
    end
  end

  always @(posedge sa) if (rst_n && ss_ph[0] != ss_ph_q) begin
    ss_phn[int'(ss_ph[0])]++;
    check(int'(ss_ph[0]) == int'(ss_ph_q) + 1, "source-synchronous phase order");
    ss_ph_q <= ss_ph[0];
  end

  // ---------------- traffic ----------------
  // Senders: word k on the k-th cycle after the port is ready. Receivers
  // lock onto the first recognised word and then expect the sequence.
  int cc_sent [2] = '{0, 0}, ss_sent [2] = '{0, 0};
  int cc_exp [2] = '{-1, -1}, ss_exp [2] = '{-1, -1};
  int cc_got [2] = '{0, 0}, ss_got [2] = '{0, 0};

  for (genvar n = 0; n < 2; n++) begin : g_traffic
    always @(posedge cc_clk) begin
      cc_tx[n] <= cc_rdy[n] ? pattern(cc_sent[n], 10 + n) : '0;
      if (cc_rdy[n]) cc_sent[n] <= cc_sent[n] + 1;
      // node n receives from node 1-n
      if (cc_rdy[n] && cc_sent[n] > 8) begin
        if (cc_exp[n] < 0) begin
          for (int k = 0; k < 16; k++) if (cc_rx[n] == pattern(k, 11 - n)) cc_exp[n] = k + 1;
        end else begin
          check(cc_rx[n] == pattern(cc_exp[n], 11 - n), $sformatf("common-clocking word %0d into node %0d", cc_exp[n], n));
          cc_exp[n]++;
          cc_got[n]++;
        end
      end
    end
    always @(posedge clk_ss[n]) begin
      ss_tx[n] <= ss_rdy[n] ? pattern(ss_sent[n], 20 + n) : '0;
      if (ss_rdy[n]) ss_sent[n] <= ss_sent[n] + 1;
      if (ss_v[n] && ss_rdy[n]) begin
        if (ss_exp[n] < 0) begin
          for (int k = 0; k < 16; k++) if (ss_rx[n] == pattern(k, 21 - n)) ss_exp[n] = k + 1;
        end else begin
          check(ss_rx[n] == pattern(ss_exp[n], 21 - n), $sformatf("source-synchronous word %0d into node %0d", ss_exp[n], n));
          ss_exp[n]++;
          ss_got[n]++;
        end
      end
    end
  end

  initial begin
    cc_tx = '{default: '0};
    ss_tx = '{default: '0};
    #50000 rst_n = 1'b1;
    wait (cc_rdy[0] && cc_rdy[1] && ss_rdy[0] && ss_rdy[1]);
    repeat (10) @(posedge cc_clk);
    for (int n = 0; n < 2; n++) begin
      check(cc_flock[n] == '1 && ss_flock[n] == '1, "all Fine DLLs locked");
      check(!cc_fexh[n] && !ss_fexh[n], "no Fine DLL out of changes");
      check(cc_al[n], "common-clocking sync measurement aligned");
    end
    $display("all links ready at %0t", $time);
    repeat (NWORDS + 20) @(posedge cc_clk);
    for (int n = 0; n < 2; n++) begin
      check(cc_got[n] >= NWORDS, $sformatf("common-clocking words into node %0d: %0d", n, cc_got[n]));
      check(ss_got[n] >= NWORDS, $sformatf("source-synchronous words into node %0d: %0d", n, ss_got[n]));
      check(!ss_ovf[n] && !ss_unf[n], "elastic buffer never over- or underflowed");
    end
    check(cc_inc > 0 && ss_inc > 0, "Fine DLL stepped up on both link types");
    check(cc_dec > 0 && ss_dec > 0, "Fine DLL stepped down on both link types");
    check(cc_lock > 0 && ss_lock > 0, "Fine DLL lock on both link types");
    check(c_plus > 0, "Coarse DLL +1 cycle");
    check(c_minus > 0, "Coarse DLL -1 cycle");
    for (int p = 1; p < 5; p++) check(cc_phn[p] == 1, "each common-clocking phase entered once");
    for (int p = 1; p < 3; p++) check(ss_phn[p] == 1, "each source-synchronous phase entered once");
    $display("mechanisms: cc fine_inc=%0d fine_dec=%0d fine_lock=%0d coarse_plus=%0d coarse_minus=%0d; ss fine_inc=%0d fine_dec=%0d fine_lock=%0d",
             cc_inc, cc_dec, cc_lock, c_plus, c_minus, ss_inc, ss_dec, ss_lock);
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

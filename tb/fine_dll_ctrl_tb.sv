// fine_dll_ctrl_tb: drives the tap counter with comparator decisions and
// compares it, cycle by cycle, with a reference model written here.
//
// Reference: tap starts at N_ELEM/2; while `adjust` is high a decision is
// taken every SETTLE-th cycle; INC/DEC move the tap by one while fewer than
// MAX_CHANGES changes have been made since `start` and the tap is inside
// 0..N_ELEM; LOCK sets `locked`; a change clears it. Phases of random
// decisions, a run that exhausts the budget, a lock and a hold with
// `adjust` low are covered; a small N_ELEM exercises the end stops.
`timescale 1ps / 1ps
module fine_dll_ctrl_tb;
  import pplink_pkg::*;

  localparam int N_ELEM = 12, MAX_CHANGES = 16, SETTLE = 4;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, adjust = 1'b0;
  cmp_e cmp = CMP_HOLD;
  logic [3:0] tap;
  logic locked, exhausted;

  always #10000 clk = ~clk;

  fine_dll_ctrl #(.N_ELEM(N_ELEM), .MAX_CHANGES(MAX_CHANGES), .SETTLE(SETTLE)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .adjust(adjust), .cmp(cmp),
    .tap(tap), .locked(locked), .exhausted(exhausted));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // Reference model.
  int m_tap = N_ELEM / 2, m_chg = 0, m_tmr = 0;
  bit m_lock = 0;
  int n_inc = 0, n_dec = 0, n_lock = 0, n_stop = 0;

  always @(posedge clk) begin
    if (!rst_n) begin
      m_tap = N_ELEM / 2; m_chg = 0; m_tmr = 0; m_lock = 0;
    end else if (start) begin
      m_chg = 0; m_tmr = 0; m_lock = 0;
    end else if (adjust) begin
      if (m_tmr != SETTLE - 1) m_tmr++;
      else begin
        m_tmr = 0;
        if (cmp == CMP_LOCK) begin m_lock = 1; n_lock++; end
        else if (cmp == CMP_INC) begin
          if (m_chg < MAX_CHANGES && m_tap < N_ELEM) begin m_tap++; m_chg++; m_lock = 0; n_inc++; end
          else n_stop++;
        end else if (cmp == CMP_DEC) begin
          if (m_chg < MAX_CHANGES && m_tap > 0) begin m_tap--; m_chg++; m_lock = 0; n_dec++; end
          else n_stop++;
        end
      end
    end
  end

  always @(negedge clk) if (rst_n) begin
    check(int'(tap) == m_tap, $sformatf("tap %0d expected %0d", tap, m_tap));
    check(locked == m_lock, "locked");
    check(exhausted == (m_chg >= MAX_CHANGES && !m_lock), "exhausted");
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // Phase 1: drive up to the end stop.
    @(negedge clk) start = 1'b1;
    @(negedge clk) begin start = 1'b0; adjust = 1'b1; cmp = CMP_INC; end
    repeat (SETTLE * 10) @(negedge clk);
    // then down past the budget
    cmp = CMP_DEC;
    repeat (SETTLE * 20) @(negedge clk);
    check(exhausted, "budget used up");
    // hold with adjust low
    adjust = 1'b0;
    repeat (SETTLE * 4) @(negedge clk);
    // Phase 2: random decisions, then lock
    start = 1'b1;
    @(negedge clk) begin start = 1'b0; adjust = 1'b1; end
    repeat (200) begin
      cmp = cmp_e'($urandom_range(0, 3));
      @(negedge clk);
    end
    cmp = CMP_LOCK;
    repeat (SETTLE * 2) @(negedge clk);
    check(locked, "locked after LOCK decision");
    check(n_inc > 0 && n_dec > 0 && n_lock > 0 && n_stop > 0, "steps up, down, lock and stop all seen");
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

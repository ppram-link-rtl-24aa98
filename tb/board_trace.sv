// board_trace: test-bench model of one circuit-board trace, a pure transport
// delay of DELAY_PS picoseconds. Every edge of `a` is queued with the time
// it is due at `y`, so pulses shorter than the trace delay pass unchanged.
`timescale 1ps / 1ps
module board_trace #(
  parameter int DELAY_PS = 10000
) (
  input  logic a,
  output logic y
);

  typedef struct {
    longint due;
    logic   val;
  } edge_t;

  edge_t pending [$];
  event  pushed;

  initial y = a;

  always @(a) begin
    pending.push_back('{due: longint'($time) + longint'(DELAY_PS), val: a});
    -> pushed;
  end

  initial begin
    forever begin
      if (pending.size() == 0) begin
        @(pushed);
      end else begin
        if (pending[0].due > longint'($time)) #(pending[0].due - longint'($time));
        y = pending[0].val;
        void'(pending.pop_front());
      end
    end
  end

endmodule

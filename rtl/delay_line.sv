// delay_line: behavioural model of the custom-layout delay line used inside
// the Fine and Coarse DLLs.
//
// This is a behavioural model, not synthesizable logic: the real part is a
// linear chain of N_ELEM identical delay elements (series CMOS inverters,
// each followed by a two-input multiplexer that either passes the chain on
// or turns it out to the output), laid out by hand. Selecting tap `sel`
// puts `sel` elements in the path, so the delay is sel x TD_PS picoseconds
// (sel = 0 passes `din` straight through; taps past the end read the last
// element). Equal elements rather than binary-weighted ones follow the
// reference design; TD_PS = 1000 is its typical element (1 ns), 630 / 1670
// its best / worst corners. A Coarse DLL uses the same model with 20 ns
// elements.
//
// The model is a transport delay: every edge of `din` is queued with the
// time it is due at the output, so pulses shorter than the delay (the 10 ns
// halves of the clock pattern in a 20 ns element) pass unchanged. An edge
// takes the delay of the tap selected when it enters; a tap change affects
// the edges that enter after it.
`timescale 1ps / 1ps
module delay_line #(
  parameter int N_ELEM = 66,    // number of delay elements in the chain
  parameter int TD_PS  = 1000,  // delay of one element in ps
  localparam int SEL_W = $clog2(N_ELEM + 1)
) (
  input  logic             din,
  input  logic [SEL_W-1:0] sel,   // number of elements in the path, 0..N_ELEM
  output logic             dout
);

  typedef struct {
    longint due;
    logic   val;
  } edge_t;

  edge_t  pending [$];
  event   pushed;
  int     n_path;
  longint path_ps;

  assign n_path  = (int'(sel) <= N_ELEM) ? int'(sel) : N_ELEM;
  assign path_ps = longint'(n_path) * longint'(TD_PS);

  initial dout = din;

  always @(din) begin
    pending.push_back('{due: longint'($time) + path_ps, val: din});
    -> pushed;
  end

  initial begin
    forever begin
      if (pending.size() == 0) begin
        @(pushed);
      end else begin
        if (pending[0].due > longint'($time)) #(pending[0].due - longint'($time));
        dout = pending[0].val;
        void'(pending.pop_front());
      end
    end
  end

endmodule

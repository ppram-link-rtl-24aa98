// sync_deskew: inter-signal skew detector (the simplified comparator of the
// Coarse DLLs).
//
// During inter-signal de-skew the sender repeats a sync pattern: one word
// with all 17 lines high, then SYNC_PERIOD-1 words of zeros. Every line has
// already been phase-locked by its Fine DLL, so each bit is sampled cleanly
// but possibly in a different clock cycle. This block keeps the last three
// received words. When the flag bit of the middle word is high, a data bit
// that was high one word earlier is early (pulse on `early[i]`), one that is
// high one word later is late (`late[i]`). After a measurement that asked
// for any change, the next marker is skipped so the Coarse DLLs settle.
// `aligned` is set by a measurement that found every bit on the flag's word.
// Outputs are registered; `early`/`late` are one-cycle pulses. The flag bit
// is the reference because it is the one line without a Coarse DLL (33
// DLLs = 17 Fine + 16 Coarse); pattern and skip rule are this design's own.
`timescale 1ps / 1ps
module sync_deskew
  import pplink_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                enable,   // inter-signal de-skew phase
  input  link_word_t          rx,       // received word, flag already aligned
  output logic [SYMBOL_W-1:0] early,
  output logic [SYMBOL_W-1:0] late,
  output logic                aligned,
  output logic                measured  // pulse: one marker evaluated
);

  link_word_t          w0, w1;
  logic [SYMBOL_W-1:0] w2;
  logic       skip;
  logic [SYMBOL_W-1:0] e_n, l_n;

  assign e_n = w2 & ~w1[SYMBOL_W-1:0];
  assign l_n = w0[SYMBOL_W-1:0] & ~w1[SYMBOL_W-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w0 <= '0; w1 <= '0; w2 <= '0;
      early <= '0; late <= '0;
      aligned <= 1'b0; measured <= 1'b0; skip <= 1'b0;
    end else begin
      w0 <= rx; w1 <= w0; w2 <= w1[SYMBOL_W-1:0];
      early <= '0; late <= '0; measured <= 1'b0;
      if (!enable) begin
        skip <= 1'b0;
      end else if (w1[FLAG_BIT]) begin
        if (skip) begin
          skip <= 1'b0;
        end else begin
          early    <= e_n;
          late     <= l_n;
          measured <= 1'b1;
          aligned  <= (e_n == '0) && (l_n == '0) && (w1[SYMBOL_W-1:0] == '1);
          skip     <= (e_n != '0) || (l_n != '0);
        end
      end
    end
  end

endmodule

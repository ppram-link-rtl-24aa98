// pplink_pkg: types and constants shared by the PPRAM-Link physical layer.
//
// A PPRAM-Link is a one-to-one, unidirectional parallel link of 17 lines:
// a 16-bit symbol plus one flag bit. The physical layer brings the link up
// in timer-driven phases before the logical layer may use it: with common
// clocking, inter-clock de-skew, inter-signal de-skew and a second
// inter-clock de-skew (cc_phase_e); source-synchronously, a single de-skew
// state (ss_phase_e). The phase
// encoding, the sync pattern and the comparator result encoding are this
// design's own choices; the widths follow the link definition.
`timescale 1ps / 1ps
package pplink_pkg;

  localparam int SYMBOL_W = 16;            // symbol width
  localparam int LINK_W   = SYMBOL_W + 1;  // symbol + flag bit
  localparam int FLAG_BIT = SYMBOL_W;      // index of the flag line

  typedef logic [LINK_W-1:0] link_word_t;  // {flag, symbol}

  // Phases of the common-clocking method (start-up order).
  typedef enum logic [2:0] {
    PH_RESET       = 3'd0,  // waiting after link reset
    PH_CLK_DESKEW_A = 3'd1, // sender drives its clock on all lines, Fine DLLs lock
    PH_SIG_DESKEW  = 3'd2,  // sender drives the sync pattern, Coarse DLLs align
    PH_CLK_DESKEW_B = 3'd3, // clock on all lines again, Fine DLLs re-lock
    PH_KEEP        = 3'd4   // set points held, logical-layer data flows
  } cc_phase_e;

  // Phases of the source-synchronous method.
  typedef enum logic [1:0] {
    SS_RESET      = 2'd0,  // waiting after link reset
    SS_SIG_DESKEW = 2'd1,  // data lines toggle, Fine DLLs align to the reference clock
    SS_RUN        = 2'd2   // set points held, data flows through the elastic buffer
  } ss_phase_e;

  // Decision of a phase comparator.
  typedef enum logic [1:0] {
    CMP_HOLD = 2'd0,  // no valid decision yet
    CMP_LOCK = 2'd1,  // edge inside the comparator window
    CMP_INC  = 2'd2,  // add one delay element
    CMP_DEC  = 2'd3   // remove one delay element
  } cmp_e;

  // Sync pattern: one word of all ones every SYNC_PERIOD cycles, zeros between.
  localparam int SYNC_PERIOD = 8;

endpackage

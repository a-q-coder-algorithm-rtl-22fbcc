// cfqca_pkg: constants shared by the carry-free Q-Coder (CFQCA) encoder and decoder.
//
// Number formats (all values are unsigned fixed point):
//   A  : interval size, 2 integer bits + P_FRAC fraction bits, held as a sum/carry pair.
//        Two integer bits suffice because a renormalized A stays below 2 + 2^-(t-1).
//   Qe : LPS probability, P_FRAC fraction bits (Qe < 1, at most 0xAC1 / 4096).
//   C  : low end of the interval, P_FRAC fraction bits, S_SPACER spacer bits, one byte
//        field and one carry bit, also held as a sum/carry pair (W_C bits).
// P_FRAC = 12 and T_EST = 2 follow the document's main configuration; S_SPACER = 2 is the
// smallest spacer count the document proves sufficient when T_EST >= 1.
package cfqca_pkg;
  localparam int unsigned P_FRAC   = 12;  // fraction bits of A, C and Qe
  localparam int unsigned T_EST    = 2;   // fraction bits of the estimate of A seen by NORM
  localparam int unsigned S_SPACER = 2;   // spacer bits between the fraction and the byte field
  localparam int unsigned W_A      = P_FRAC + 2;             // A register width
  localparam int unsigned W_C      = P_FRAC + S_SPACER + 9;  // C register width
  localparam int unsigned CT_W     = 5;                      // shift counter width

  // number of byte removals performed by a flush: one to align, then enough 7-bit
  // steps to empty the fraction and spacer bits
  function automatic int unsigned flush_extracts(int unsigned p, int unsigned s);
    return 1 + (p + s + 7) / 7;
  endfunction
endpackage

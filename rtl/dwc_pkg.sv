// dwc_pkg: types and helpers shared by the duplicate-with-compare (DWC) smart
// detector. A detector decision says which of the two duplicated circuit copies
// (A or B) it believes is fault free, or that it cannot tell (ambiguous). In the
// history tally a decision for A counts +1, for B counts -1 and an ambiguous one 0,
// so the sign of the running sum is the majority vote.
package dwc_pkg;

  typedef enum logic [1:0] {
    DEC_AMBIG = 2'b00,  // the two copies are equally likely (same bin or equal counts, or a tied history)
    DEC_A     = 2'b01,  // copy A is judged fault free
    DEC_B     = 2'b10   // copy B is judged fault free
  } decision_e;

  // Vote value of one decision in the history tally.
  function automatic logic signed [1:0] vote_of(decision_e d);
    unique case (d)
      DEC_A:   return 2'sd1;
      DEC_B:   return -2'sd1;
      default: return 2'sd0;
    endcase
  endfunction

endpackage

// bin_decide: the single-measurement decision of the histogram smart detector.
// Given the histogram counts of the bins that the outputs of copies A and B fall
// into, the copy whose value is the more common one in fault-free operation is
// judged correct. Equal counts - which includes both values falling into the same
// bin - give an ambiguous decision. When the copies agree (neq low) there is
// nothing to decide and the output is ambiguous with push low.
//
// Purely combinational. push is high exactly when a decision is made (copies
// differ); it tells the history stage to record the decision.
module bin_decide
  import dwc_pkg::*;
#(
  parameter int COUNT_W = 8
) (
  input  logic               neq,       // copies A and B disagree this sample
  input  logic [COUNT_W-1:0] count_a,   // histogram count of A's bin
  input  logic [COUNT_W-1:0] count_b,   // histogram count of B's bin
  output logic               push,
  output decision_e          decision
);

  always_comb begin
    push = neq;
    if (!neq || count_a == count_b) decision = DEC_AMBIG;
    else if (count_a > count_b)     decision = DEC_A;
    else                            decision = DEC_B;
  end

endmodule

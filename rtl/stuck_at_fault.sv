// stuck_at_fault: the stuck-at fault model used to emulate a single event upset
// on a circuit output. Bits set in stuck0 are forced to 0 and bits set in stuck1
// to 1; all other bits pass unchanged (stuck1 wins where both are set). With both
// masks zero it is transparent. Purely combinational.
//
// Stuck-at-0 and stuck-at-1 faults on each output bit are the fault model the
// detector is evaluated with; bringing them out as mask inputs so that a test can
// switch a fault on mid-run is this design's choice.
module stuck_at_fault #(
  parameter int W = 20
) (
  input  logic [W-1:0] d,
  input  logic [W-1:0] stuck0,
  input  logic [W-1:0] stuck1,
  output logic [W-1:0] q
);

  assign q = (d & ~stuck0) | stuck1;

endmodule

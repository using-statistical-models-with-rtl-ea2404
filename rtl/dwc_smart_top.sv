// dwc_smart_top: a duplicate-with-compare (DWC) downsampler protected by a
// histogram-based smart detector - a cheaper alternative to triple modular
// redundancy. The same 12-bit input stream feeds two copies (A and B) of a
// five-stage halfband downsampler (decimation by 16, 20-bit output). The smart
// detector compares the copies' outputs; where they differ it judges, from a
// histogram of fault-free output values and a history of its recent judgements,
// which copy is fault free and passes that copy to y.
//
// Each copy's output passes through a stuck-at fault model (fault_*_a/b masks,
// zero in normal use) so that a single stuck output bit - the fault model used to
// evaluate the detector - can be switched on at any time.
//
// Interface: x_valid/x, one signed input sample per valid cycle. y_valid pulses
// once per 16 inputs; y, neq, sel_b, ambiguous, decision and tally describe the
// same output sample. Latency from the 16th input of a group to y_valid is seven
// clocks (five filter stages, two detector stages). The histogram (one count per
// bin) is written through load_en/load_addr/load_data before operation, with
// x_valid low. Synchronous active-low reset; the histogram RAM keeps its contents.
module dwc_smart_top
  import dwc_pkg::*;
#(
  parameter int IN_W       = 12,
  parameter int DATA_W     = 20,
  parameter int BIN_BITS   = 14,
  parameter int COUNT_W    = 8,
  parameter int HIST_DEPTH = 1024
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     x_valid,
  input  logic signed [IN_W-1:0]   x,
  // histogram load
  input  logic                     load_en,
  input  logic [BIN_BITS-1:0]      load_addr,
  input  logic [COUNT_W-1:0]       load_data,
  // stuck-at fault masks on the outputs of copy A and copy B
  input  logic [DATA_W-1:0]        fault_stuck0_a,
  input  logic [DATA_W-1:0]        fault_stuck1_a,
  input  logic [DATA_W-1:0]        fault_stuck0_b,
  input  logic [DATA_W-1:0]        fault_stuck1_b,
  // protected output
  output logic                     y_valid,
  output logic signed [DATA_W-1:0] y,
  output logic                     neq,
  output logic                     sel_b,
  output logic                     ambiguous,
  output decision_e                decision,
  output logic signed [$clog2(HIST_DEPTH+1):0] tally,
  output logic                     hist_full
);

  logic              va, vb;
  logic [DATA_W-1:0] ya, yb, ya_f, yb_f;
  logic [DATA_W-1:0] y_sel;

  downsampler #(.IN_W(IN_W), .OUT_W(DATA_W)) u_copy_a (
    .clk, .rst_n,
    .in_valid (x_valid), .in_data (x),
    .out_valid (va), .out_data (ya)
  );

  downsampler #(.IN_W(IN_W), .OUT_W(DATA_W)) u_copy_b (
    .clk, .rst_n,
    .in_valid (x_valid), .in_data (x),
    .out_valid (vb), .out_data (yb)
  );

  stuck_at_fault #(.W(DATA_W)) u_fault_a (
    .d (ya), .stuck0 (fault_stuck0_a), .stuck1 (fault_stuck1_a), .q (ya_f)
  );

  stuck_at_fault #(.W(DATA_W)) u_fault_b (
    .d (yb), .stuck0 (fault_stuck0_b), .stuck1 (fault_stuck1_b), .q (yb_f)
  );

  smart_detector #(
    .DATA_W     (DATA_W),
    .BIN_BITS   (BIN_BITS),
    .COUNT_W    (COUNT_W),
    .HIST_DEPTH (HIST_DEPTH)
  ) u_detector (
    .clk, .rst_n,
    .in_valid  (va),
    .a         (ya_f),
    .b         (yb_f),
    .load_en, .load_addr, .load_data,
    .out_valid (y_valid),
    .y         (y_sel),
    .neq, .sel_b, .ambiguous, .decision, .tally, .hist_full
  );

  assign y = y_sel;

  // Both copies run in lock step; only their data can be hit by a fault.
  assert property (@(posedge clk) disable iff (!rst_n) va == vb)
    else $error("dwc_smart_top: copies out of step");

endmodule

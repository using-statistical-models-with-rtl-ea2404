// smart_detector: the statistical (histogram-based) smart detector of a
// duplicate-with-compare pair. It watches the outputs A and B of two copies of the
// same circuit, flags every sample on which they differ (the classic DWC "not
// equal" bit) and, instead of only flagging, picks the copy it believes is fault
// free and gates that copy to its output.
//
// How it decides: each output value is mapped to a histogram bin (its top
// BIN_BITS bits, sign bit inverted so that bins run from most negative to most
// positive). The bin counts of A and B are read from hist_ram, which holds a
// histogram of fault-free output. On a mismatch the copy with the higher count
// wins this sample (bin_decide); the decision is pushed into a DEPTH-deep history
// whose majority (history_vote) drives the output multiplexer. When the majority
// is a tie, the multiplexer keeps its previous choice. After reset it selects A.
//
// Pipeline and timing: in_valid/a/b are sampled on an edge; the bin counts arrive
// one clock later (RAM read), the decision is added to the history on the next
// edge, and out_valid/y/neq/ambiguous/decision describe that sample then - two
// clocks after it was presented. The majority includes the sample itself. Samples
// may arrive on every clock.
//
// Histogram load: while load_en is high, load_data is written to bin load_addr.
// Loading shares the RAM port used for A and must not overlap in_valid.
//
// Follows the described detector: histogram with power-of-two bin count in block
// RAM, comparison of the two bins' counts, history of decisions with majority,
// 16384 bins x 8 bits and a 1024-deep history by default. Bin mapping, the tie
// handling of the multiplexer, recording only mismatching samples in the history
// and the load port are this design's choices.
module smart_detector
  import dwc_pkg::*;
#(
  parameter int DATA_W     = 20,
  parameter int BIN_BITS   = 14,
  parameter int COUNT_W    = 8,
  parameter int HIST_DEPTH = 1024
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // outputs of the two circuit copies
  input  logic                     in_valid,
  input  logic [DATA_W-1:0]        a,
  input  logic [DATA_W-1:0]        b,
  // histogram load
  input  logic                     load_en,
  input  logic [BIN_BITS-1:0]      load_addr,
  input  logic [COUNT_W-1:0]       load_data,
  // protected output
  output logic                     out_valid,
  output logic [DATA_W-1:0]        y,
  output logic                     neq,        // A and B differ on this sample
  output logic                     sel_b,      // y comes from copy B
  output logic                     ambiguous,  // mismatch with a tied history: previous choice kept
  output decision_e                decision,   // single-sample decision for this sample
  output logic signed [$clog2(HIST_DEPTH+1):0] tally,  // A minus B decisions in the history
  output logic                     hist_full   // the history window has filled
);

  initial begin
    assert (BIN_BITS <= DATA_W) else $error("smart_detector: BIN_BITS exceeds DATA_W");
  end

  function automatic logic [BIN_BITS-1:0] bin_of(logic [DATA_W-1:0] v);
    // offset binary (sign bit inverted), then the top BIN_BITS bits
    return BIN_BITS'({~v[DATA_W-1], v[DATA_W-2:0]} >> (DATA_W - BIN_BITS));
  endfunction

  // ---- stage 1: histogram lookup ----
  logic [COUNT_W-1:0] count_a, count_b;
  logic               v1, neq1;
  logic [DATA_W-1:0]  a1, b1;

  hist_ram #(
    .BIN_BITS (BIN_BITS),
    .COUNT_W  (COUNT_W)
  ) u_hist (
    .clk,
    .we_a    (load_en),
    .addr_a  (load_en ? load_addr : bin_of(a)),
    .wdata_a (load_data),
    .rdata_a (count_a),
    .addr_b  (bin_of(b)),
    .rdata_b (count_b)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1   <= 1'b0;
      neq1 <= 1'b0;
      a1   <= '0;
      b1   <= '0;
    end else begin
      v1   <= in_valid && !load_en;
      neq1 <= in_valid && !load_en && (a != b);
      a1   <= a;
      b1   <= b;
    end
  end

  // ---- stage 2: decision and history ----
  logic      push;
  decision_e dec1;
  decision_e majority;

  bin_decide #(.COUNT_W(COUNT_W)) u_decide (
    .neq      (neq1),
    .count_a,
    .count_b,
    .push,
    .decision (dec1)
  );

  history_vote #(.DEPTH(HIST_DEPTH)) u_history (
    .clk,
    .rst_n,
    .push,
    .decision (dec1),
    .tally,
    .majority,
    .full     (hist_full)
  );

  logic        v2, neq2;
  logic [DATA_W-1:0] a2, b2;
  logic        sel_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v2       <= 1'b0;
      neq2     <= 1'b0;
      a2       <= '0;
      b2       <= '0;
      decision <= DEC_AMBIG;
    end else begin
      v2       <= v1;
      neq2     <= neq1;
      a2       <= a1;
      b2       <= b1;
      decision <= dec1;
    end
  end

  // ---- output multiplexer ----
  always_ff @(posedge clk) begin
    if (!rst_n)                               sel_q <= 1'b0;
    else if (neq2 && majority != DEC_AMBIG)   sel_q <= (majority == DEC_B);
  end

  always_comb begin
    sel_b     = (neq2 && majority != DEC_AMBIG) ? (majority == DEC_B) : sel_q;
    y         = sel_b ? b2 : a2;
    out_valid = v2;
    neq       = neq2;
    ambiguous = neq2 && (majority == DEC_AMBIG);
  end

  // Loading the histogram borrows port A and must not coincide with a sample.
  assert property (@(posedge clk) disable iff (!rst_n) !(load_en && in_valid))
    else $error("smart_detector: histogram load during operation");

endmodule

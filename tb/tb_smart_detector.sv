// tb_smart_detector: self-checking test of the histogram smart detector with a
// 16-deep history (default 16384-bin, 8-bit histogram). A random histogram with
// many equal counts is loaded through the load port, then samples stream in with
// gaps: copy B equals A, differs in a low bit (same bin), or differs in a high
// bit (different bins). A reference model (bin lookup, count comparison, last-16
// decision window, hold on a tie) predicts y, sel_b, neq, ambiguous, decision and
// tally for every sample; outputs must appear exactly two clocks after the input.
module tb_smart_detector;
  import dwc_pkg::*;

  localparam int DATA_W = 20;
  localparam int BIN_BITS = 14;
  localparam int DEPTH = 16;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [DATA_W-1:0] a = '0, b = '0;
  logic load_en = 0;
  logic [BIN_BITS-1:0] load_addr = '0;
  logic [7:0] load_data = '0;
  logic out_valid, neq, sel_b, ambiguous, hist_full;
  logic [DATA_W-1:0] y;
  decision_e decision;
  logic signed [5:0] tally;

  int checks = 0, failures = 0;
  int cyc = 0;
  int n_dec_a = 0, n_dec_b = 0, n_same_bin = 0, n_equal_count = 0, n_tie_hold = 0, n_sel_b = 0;

  always #5 clk = ~clk;

  smart_detector #(.DATA_W(DATA_W), .BIN_BITS(BIN_BITS), .COUNT_W(8), .HIST_DEPTH(DEPTH)) dut (
    .clk, .rst_n, .in_valid, .a, .b, .load_en, .load_addr, .load_data,
    .out_valid, .y, .neq, .sel_b, .ambiguous, .decision, .tally, .hist_full);

  byte unsigned hist [2**BIN_BITS];

  typedef struct {
    int due;
    logic [DATA_W-1:0] y;
    bit neq, sel_b, amb;
    decision_e dec;
    int tally;
  } exp_t;
  exp_t expq[$];
  decision_e window[$];
  bit sel_model = 0;

  function automatic int bin_of(logic [DATA_W-1:0] v);
    return int'({~v[DATA_W-1], v[DATA_W-2:0]}) >> (DATA_W - BIN_BITS);
  endfunction

  // Model one accepted sample presented at cycle c.
  task automatic model(logic [DATA_W-1:0] va, logic [DATA_W-1:0] vb, int c);
    exp_t e;
    int ca = int'(hist[bin_of(va)]), cb = int'(hist[bin_of(vb)]), s = 0;
    decision_e d = DEC_AMBIG;
    e.neq = (va != vb);
    if (e.neq) begin
      d = (ca > cb) ? DEC_A : (ca < cb) ? DEC_B : DEC_AMBIG;
      if (bin_of(va) == bin_of(vb)) n_same_bin++;
      else if (ca == cb) n_equal_count++;
      window.push_back(d);
      if (window.size() > DEPTH) void'(window.pop_front());
    end
    foreach (window[i]) s += (window[i] == DEC_A) ? 1 : (window[i] == DEC_B) ? -1 : 0;
    e.amb = e.neq && (s == 0);
    if (e.neq && s != 0) sel_model = (s < 0);
    e.sel_b = sel_model;
    e.y = sel_model ? vb : va;
    e.dec = d;
    e.tally = s;
    e.due = c + 3;
    expq.push_back(e);
  endtask

  // cyc counts clock edges; a sample driven after edge c is taken at edge c+1,
  // its result is registered at edge c+2 and seen here at edge c+3.
  always @(posedge clk) begin
    cyc++;
    if (rst_n && out_valid) begin
      exp_t e;
      checks++;
      if (expq.size() == 0) begin
        failures++; $display("FAIL: unexpected output");
      end else begin
        e = expq.pop_front();
        if (cyc != e.due || y != e.y || neq != e.neq || sel_b != e.sel_b ||
            ambiguous != e.amb || decision != e.dec || int'(tally) != e.tally) begin
          failures++;
          $display("FAIL @%0d (due %0d): y=%h/%h neq=%0d/%0d sel_b=%0d/%0d amb=%0d/%0d dec=%s/%s tally=%0d/%0d",
                   cyc, e.due, y, e.y, neq, e.neq, sel_b, e.sel_b, ambiguous, e.amb,
                   decision.name(), e.dec.name(), tally, e.tally);
        end
        if (decision == DEC_A) n_dec_a++;
        if (decision == DEC_B) n_dec_b++;
        if (ambiguous) n_tie_hold++;
        if (sel_b) n_sel_b++;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // load a histogram with many repeated counts
    for (int i = 0; i < 2**BIN_BITS; i++) begin
      @(negedge clk);
      load_en = 1; load_addr = BIN_BITS'(i);
      load_data = 8'($urandom_range(0, 3) * 20 + (i % 64 == 0 ? 1 : 0));
      hist[i] = load_data;
    end
    @(negedge clk);
    load_en = 0;
    for (int i = 0; i < 20000; i++) begin
      automatic int kind = $urandom_range(0, 9);
      @(negedge clk);
      in_valid = ($urandom_range(0, 4) != 0);
      a = DATA_W'($urandom);
      b = a;
      // phases where B is mostly the "bad" copy, and where A is
      if (kind < 3)      b = a ^ DATA_W'(1 << $urandom_range(0, 5));      // same bin
      else if (kind < 7) b = a ^ DATA_W'(1 << $urandom_range(6, 19));     // other bin
      if (in_valid) model(a, b, cyc);
    end
    @(negedge clk);
    in_valid = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (expq.size() != 0 || n_dec_a == 0 || n_dec_b == 0 || n_same_bin == 0 ||
        n_equal_count == 0 || n_tie_hold == 0 || n_sel_b == 0 || !hist_full) begin
      failures++;
      $display("FAIL: coverage pending=%0d decA=%0d decB=%0d samebin=%0d eqcount=%0d tie=%0d selb=%0d",
               expq.size(), n_dec_a, n_dec_b, n_same_bin, n_equal_count, n_tie_hold, n_sel_b);
    end
    $display("decA=%0d decB=%0d samebin=%0d eqcount=%0d tie=%0d selb=%0d",
             n_dec_a, n_dec_b, n_same_bin, n_equal_count, n_tie_hold, n_sel_b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

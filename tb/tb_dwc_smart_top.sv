// tb_dwc_smart_top: end-to-end test of the DWC downsampler with the smart
// detector, at the default sizes (16384-bin 8-bit histogram, 1024-deep history).
//
// 1. Training: a noisy baseband symbol stream (random +/-1 symbols, 100 samples
//    per symbol) runs through the fault-free pair; the output must equal the
//    reference downsampler model, the copies must never disagree, and the
//    outputs are gathered into a histogram (bin = top 14 bits of the 20-bit value
//    with the sign inverted, counts saturating at 255).
// 2. The histogram is loaded through the load port.
// 3. Fault runs: a new stream (different seed); halfway through, one output bit
//    of one copy is made stuck. For every output after that the test knows the
//    fault-free value (reference model) and which copy is faulty, and counts
//    correct, wrong and ambiguous choices. High-order faults must be corrected on
//    at least 90% of mismatching samples once the history holds 64 decisions, a
//    low-order fault inside one bin must give only ambiguous single decisions
//    while the output stays on the copy chosen before.
// Every output must arrive 8 clock edges after the input that completes its group
// of 16 (5 filter stages, 2 detector stages, seen one edge later). Each detector
// mechanism - mismatch, decision for A, for B, same-bin ambiguity, equal-count
// ambiguity, tied history, switch to copy B, history window wrap - is counted and
// must occur at least once.
module tb_dwc_smart_top;
  import dwc_pkg::*;
  import tb_ref_pkg::*;

  localparam int N_TRAIN = 16 * 16000;   // training inputs
  localparam int N_RUN   = 16 * 4000;    // inputs per fault run, fault at half

  logic clk = 0, rst_n = 0;
  logic x_valid = 0;
  logic signed [11:0] x = '0;
  logic load_en = 0;
  logic [13:0] load_addr = '0;
  logic [7:0] load_data = '0;
  logic [19:0] fs0a = '0, fs1a = '0, fs0b = '0, fs1b = '0;
  logic y_valid, neq, sel_b, ambiguous, hist_full;
  logic signed [19:0] y;
  decision_e decision;
  logic signed [11:0] tally;

  dwc_smart_top dut (
    .clk, .rst_n, .x_valid, .x, .load_en, .load_addr, .load_data,
    .fault_stuck0_a(fs0a), .fault_stuck1_a(fs1a), .fault_stuck0_b(fs0b), .fault_stuck1_b(fs1b),
    .y_valid, .y, .neq, .sel_b, .ambiguous, .decision, .tally, .hist_full);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  int hist [16384];
  bit training = 0, fault_on = 0, fault_in_a = 0;
  ds_model m;
  typedef struct { longint y; int due; } exp_t;
  exp_t expq[$];

  // per-run statistics (outputs after the fault, copies disagreeing)
  int r_mis, r_ok, r_bad, r_amb, r_sd_ok, r_sd_bad, r_sd_amb;
  // mechanism counts over the whole test
  int n_neq = 0, n_dec_a = 0, n_dec_b = 0, n_same_bin = 0, n_eq_count = 0;
  int n_tie = 0, n_sel_b = 0, n_wrap = 0;
  bit was_full = 0;

  function automatic int bin_of(logic [19:0] v);
    return int'({~v[19], v[18:0]}) >> 6;
  endfunction

  always @(posedge clk) begin
    cyc++;
    if (rst_n && y_valid) begin
      exp_t e;
      checks++;
      if (expq.size() == 0) begin
        failures++; $display("FAIL: unexpected output");
      end else begin
        e = expq.pop_front();
        if (cyc != e.due) begin
          failures++; $display("FAIL: output at edge %0d, expected %0d", cyc, e.due);
        end
        if (!fault_on) begin
          if (longint'(y) != e.y || neq) begin
            failures++; $display("FAIL fault-free: y=%0d exp %0d neq=%0d", y, e.y, neq);
          end
          if (training) hist[bin_of(20'(e.y))] = (hist[bin_of(20'(e.y))] < 255) ? hist[bin_of(20'(e.y))] + 1 : 255;
        end else if (neq) begin
          logic [19:0] va, vb;
          va = (20'(e.y) & ~fs0a) | fs1a;
          vb = (20'(e.y) & ~fs0b) | fs1b;
          r_mis++;
          // ambiguity classes of this sample, from the loaded histogram
          if (bin_of(va) == bin_of(vb)) n_same_bin++;
          else if (hist[bin_of(va)] == hist[bin_of(vb)]) n_eq_count++;
          if (longint'(y) == e.y && sel_b == fault_in_a) r_ok++; else r_bad++;
          if (ambiguous) r_amb++;
          if (decision == DEC_AMBIG) r_sd_amb++;
          else if ((decision == DEC_B) == fault_in_a) r_sd_ok++;
          else r_sd_bad++;
        end else if (longint'(y) != e.y) begin
          failures++; $display("FAIL: copies agree but y=%0d exp %0d", y, e.y);
        end
      end
      if (neq) n_neq++;
      if (neq && decision == DEC_A) n_dec_a++;
      if (neq && decision == DEC_B) n_dec_b++;
      if (neq && ambiguous) n_tie++;
      if (sel_b) n_sel_b++;
      if (hist_full && !was_full) n_wrap++;
      was_full = hist_full;
    end
  end

  task automatic do_reset();
    @(negedge clk); rst_n = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    was_full = 0;
  endtask

  // Drive n samples of a noisy two-level symbol stream; apply the fault at n/2.
  task automatic stream(int n, logic [19:0] s0, logic [19:0] s1, bit in_a);
    int sym = 0;
    longint e;
    m = new(12, 20);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      if (i == n / 2 && (s0 | s1) != 0) begin
        fault_on = 1; fault_in_a = in_a;
        if (in_a) begin fs0a = s0; fs1a = s1; end else begin fs0b = s0; fs1b = s1; end
      end
      if (i % 100 == 0) sym = ($urandom_range(0, 1) == 1) ? 1400 : -1400;
      x_valid = 1;
      x = 12'(sym + $signed($urandom_range(0, 400)) - 200);
      if (m.push(longint'(x), e)) expq.push_back('{y: e, due: cyc + 8});
    end
    @(negedge clk);
    x_valid = 0;
    repeat (12) @(negedge clk);
    fs0a = '0; fs1a = '0; fs0b = '0; fs1b = '0;
    checks++;
    if (expq.size() != 0) begin
      failures++; $display("FAIL: %0d outputs missing", expq.size());
      expq.delete();
    end
    fault_on = 0;
  endtask

  // One fault run. mode 0: expect >= 90% right; 1: fault in B inside one bin, expect
  // every single decision ambiguous and the output kept on A (right); 2: report only.
  task automatic fault_run(string name, logic [19:0] s0, logic [19:0] s1, bit in_a, int mode);
    r_mis = 0; r_ok = 0; r_bad = 0; r_amb = 0; r_sd_ok = 0; r_sd_bad = 0; r_sd_amb = 0;
    do_reset();
    stream(N_RUN, s0, s1, in_a);
    $display("%-22s mismatches=%0d chosen right=%0d wrong=%0d tied=%0d | single-sample right=%0d wrong=%0d ambiguous=%0d",
             name, r_mis, r_ok, r_bad, r_amb, r_sd_ok, r_sd_bad, r_sd_amb);
    checks++;
    if (r_mis == 0) begin failures++; $display("FAIL %s: fault never visible", name); end
    checks++;
    if (mode == 0 && r_ok * 10 < (r_mis - 64) * 9) begin
      failures++; $display("FAIL %s: accuracy too low", name);
    end
    if (mode == 1 && (r_sd_amb != r_mis || r_ok != r_mis)) begin
      failures++; $display("FAIL %s: same-bin fault not ambiguous", name);
    end
  endtask

  initial begin
    automatic int used = 0;
    do_reset();
    // 1. training on fault-free output
    training = 1;
    stream(N_TRAIN, '0, '0, 0);
    training = 0;
    foreach (hist[i]) if (hist[i] != 0) used++;
    $display("histogram: %0d of 16384 bins used", used);
    // 2. load
    for (int i = 0; i < 16384; i++) begin
      @(negedge clk);
      load_en = 1; load_addr = 14'(i); load_data = 8'(hist[i]);
    end
    @(negedge clk);
    load_en = 0;
    // 3. fault runs
    fault_run("A bit 19 stuck-at-1", '0, 20'h80000, 1, 0);
    fault_run("B bit 17 stuck-at-0", 20'h20000, '0, 0, 0);
    fault_run("A bit 14 stuck-at-1", '0, 20'h04000, 1, 0);
    fault_run("B bit 3 stuck-at-1", '0, 20'h00008, 0, 1);
    fault_run("A bit 9 stuck-at-0", 20'h00200, '0, 1, 2);
    $display("mechanisms: mismatch=%0d decA=%0d decB=%0d same_bin=%0d equal_count=%0d tied_history=%0d sel_b=%0d window_wrap=%0d",
             n_neq, n_dec_a, n_dec_b, n_same_bin, n_eq_count, n_tie, n_sel_b, n_wrap);
    checks++;
    if (n_neq == 0 || n_dec_a == 0 || n_dec_b == 0 || n_same_bin == 0 || n_eq_count == 0 ||
        n_tie == 0 || n_sel_b == 0 || n_wrap == 0) begin
      failures++; $display("FAIL: a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N_TRAIN + 16384 + 6 * (N_RUN + 40) + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

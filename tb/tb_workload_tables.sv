// tb_workload_tables: the accuracy experiment behind the detector's design
// choices - history depths 1, 64, 256, 512 and 1024 against histograms of 1024,
// 4096 and 16384 bins, with stuck-at-0 and stuck-at-1 faults on each of the 20
// output bits of copy A, each switched on halfway through a run.
//
// Five DWC tops with the five history depths receive the same stimulus. The
// histogram is built once from fault-free training output at 16384 bins; a
// coarser histogram of 2**k bins is loaded into the 16384-bin RAM by giving all
// 16384 / 2**k fine bins of a coarse bin the coarse count, which yields exactly
// the decisions of a 2**k-bin detector (two values in one coarse bin read equal
// counts, hence ambiguous, as they would from one bin).
//
// For every mismatching output after the fault the history's verdict (sign of
// the tally) is scored right, wrong or ambiguous, and the table of the four
// accuracy measures (ambiguous ignored / counted wrong / half right / counted
// right) is printed per configuration. Checks: outputs equal the reference model
// whenever the copies agree; in every histogram size the longest history has
// fewer ambiguous verdicts than a single sample; every configuration is right
// more often than wrong.
module tb_workload_tables;
  import dwc_pkg::*;
  import tb_ref_pkg::*;

  localparam int N_TRAIN = 16 * 16000;
  localparam int N_RUN   = 16 * 3000;
  localparam int ND      = 5;
  localparam int DEPTHS [ND] = '{1, 64, 256, 512, 1024};
  localparam int NB      = 3;
  localparam int BINBITS [NB] = '{10, 12, 14};

  logic clk = 0, rst_n = 0;
  logic x_valid = 0;
  logic signed [11:0] x = '0;
  logic load_en = 0;
  logic [13:0] load_addr = '0;
  logic [7:0] load_data = '0;
  logic [19:0] fs0a = '0, fs1a = '0;
  logic [ND-1:0] y_valid, neq;
  logic signed [19:0] y [ND];
  int tally [ND];

  always #5 clk = ~clk;

  for (genvar d = 0; d < ND; d++) begin : g_dut
    localparam int DEP = DEPTHS[d];
    logic signed [$clog2(DEP+1):0] t;
    logic sb, amb, hf;
    decision_e dec;
    dwc_smart_top #(.HIST_DEPTH(DEP)) dut (
      .clk, .rst_n, .x_valid, .x, .load_en, .load_addr, .load_data,
      .fault_stuck0_a(fs0a), .fault_stuck1_a(fs1a), .fault_stuck0_b('0), .fault_stuck1_b('0),
      .y_valid(y_valid[d]), .y(y[d]), .neq(neq[d]), .sel_b(sb), .ambiguous(amb),
      .decision(dec), .tally(t), .hist_full(hf));
    assign tally[d] = int'(t);
  end

  int checks = 0, failures = 0;
  int fine_hist [16384];
  bit training = 0, fault_on = 0;
  ds_model m;
  longint expq[$];
  int n_right [NB][ND], n_wrong [NB][ND], n_amb [NB][ND];
  int cur_b = 0, cur_bit = 0;
  // per faulty bit, for the 16384-bin histogram
  int bit_right [20][ND], bit_amb [20][ND], bit_mis [20][ND];

  function automatic int bin_of(logic [19:0] v);
    return int'({~v[19], v[18:0]}) >> 6;
  endfunction

  always @(posedge clk) if (rst_n && y_valid[0]) begin
    longint e;
    checks++;
    if (y_valid != '1 || expq.size() == 0) begin
      failures++; $display("FAIL: outputs out of step");
    end else begin
      e = expq.pop_front();
      if (training) fine_hist[bin_of(20'(e))]++;
      for (int d = 0; d < ND; d++) begin
        if (!neq[d] && longint'(y[d]) != e) begin
          failures++; $display("FAIL depth %0d: y=%0d exp %0d", DEPTHS[d], y[d], e);
        end
        if (fault_on && neq[d]) begin
          // fault is in A: a negative tally (majority for B) is right
          if (tally[d] < 0) n_right[cur_b][d]++;
          else if (tally[d] > 0) n_wrong[cur_b][d]++;
          else n_amb[cur_b][d]++;
          if (cur_b == NB - 1) begin
            bit_mis[cur_bit][d]++;
            if (tally[d] < 0) bit_right[cur_bit][d]++;
            if (tally[d] == 0) bit_amb[cur_bit][d]++;
          end
        end
      end
    end
  end

  task automatic stream(int n, logic [19:0] s0, logic [19:0] s1);
    int sym = 0;
    longint e;
    m = new(12, 20);
    @(negedge clk); rst_n = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      if (i == n / 2 && (s0 | s1) != 0) begin
        fault_on = 1; fs0a = s0; fs1a = s1;
      end
      if (i % 100 == 0) sym = ($urandom_range(0, 1) == 1) ? 1400 : -1400;
      x_valid = 1;
      x = 12'(sym + $signed($urandom_range(0, 400)) - 200);
      if (m.push(longint'(x), e)) expq.push_back(e);
    end
    @(negedge clk);
    x_valid = 0;
    repeat (12) @(negedge clk);
    fault_on = 0; fs0a = '0; fs1a = '0;
    checks++;
    if (expq.size() != 0) begin
      failures++; $display("FAIL: %0d outputs missing", expq.size()); expq.delete();
    end
  endtask

  task automatic load_hist(int bb);
    int group = 1 << (14 - bb);
    for (int c = 0; c < 16384; c += group) begin
      int s = 0;
      for (int k = 0; k < group; k++) s += fine_hist[c + k];
      if (s > 255) s = 255;
      for (int k = 0; k < group; k++) begin
        @(negedge clk);
        load_en = 1; load_addr = 14'(c + k); load_data = 8'(s);
      end
    end
    @(negedge clk);
    load_en = 0;
  endtask

  initial begin
    training = 1;
    stream(N_TRAIN, '0, '0);
    training = 0;
    for (int b = 0; b < NB; b++) begin
      cur_b = b;
      load_hist(BINBITS[b]);
      for (int bit_i = 0; bit_i < 20; bit_i++) begin
        cur_bit = bit_i;
        stream(N_RUN, 20'(1) << bit_i, '0);
        stream(N_RUN, '0, 20'(1) << bit_i);
      end
      $display("Histogram of %0d bins", 1 << BINBITS[b]);
      $display("  history  ambiguous  amb.ignored  amb.wrong  half.right  amb.right");
      for (int d = 0; d < ND; d++) begin
        automatic real tot = real'(n_right[b][d] + n_wrong[b][d] + n_amb[b][d]);
        automatic real r = real'(n_right[b][d]); automatic real a = real'(n_amb[b][d]);
        $display("  %7d  %8.2f%%  %10.2f%%  %8.2f%%  %9.2f%%  %8.2f%%", DEPTHS[d],
                 100.0 * a / tot, 100.0 * r / (tot - a), 100.0 * r / tot,
                 100.0 * (r + a / 2.0) / tot, 100.0 * (r + a) / tot);
        checks++;
        if (n_right[b][d] <= n_wrong[b][d]) begin
          failures++; $display("FAIL: %0d bins depth %0d right <= wrong", 1 << BINBITS[b], DEPTHS[d]);
        end
      end
      checks++;
      if (n_amb[b][ND-1] >= n_amb[b][0]) begin
        failures++; $display("FAIL: %0d bins: history does not reduce ambiguity", 1 << BINBITS[b]);
      end
    end
    // per-bit view: right / ambiguous share of mismatching samples, 16384 bins
    $display("Per faulty bit, 16384 bins: right%% (ambiguous%%) for history 1 / 64 / 256 / 512 / 1024");
    for (int bit_i = 19; bit_i >= 0; bit_i--) begin
      string line;
      line = $sformatf("  bit %2d:", bit_i);
      for (int d = 0; d < ND; d++)
        line = {line, $sformatf("  %6.1f (%5.1f)",
                100.0 * real'(bit_right[bit_i][d]) / real'(bit_mis[bit_i][d] + (bit_mis[bit_i][d] == 0)),
                100.0 * real'(bit_amb[bit_i][d]) / real'(bit_mis[bit_i][d] + (bit_mis[bit_i][d] == 0)))};
      $display("%s", line);
      // faults on the high-order bits must be corrected with the full history
      if (bit_i >= 15) begin
        checks++;
        if (bit_right[bit_i][ND-1] * 10 < bit_mis[bit_i][ND-1] * 9) begin
          failures++; $display("FAIL: bit %0d corrected on fewer than 90%% of mismatches", bit_i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N_TRAIN + NB * (16384 + 40 * (N_RUN + 20)) + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

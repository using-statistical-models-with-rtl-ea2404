// tb_history_vote: self-checking test of the decision history. Two instances,
// an 8-deep one and a 1-deep one (single-sample, no history), get the same random
// stream of pushes; after each clock the tally and majority are compared with a
// queue model holding the last DEPTH decisions. Bursts of only-A then only-B
// decisions make the majority swing and cross ties; the window wraps many times.
module tb_history_vote;
  import dwc_pkg::*;

  logic clk = 0, rst_n = 0;
  logic push = 0;
  decision_e decision = DEC_AMBIG;
  logic signed [4:0] tally8;
  logic signed [1:0] tally1;
  decision_e maj8, maj1;
  logic full8, full1;
  int checks = 0, failures = 0;
  int ties = 0, swings = 0;

  always #5 clk = ~clk;

  history_vote #(.DEPTH(8)) dut8 (.clk, .rst_n, .push, .decision, .tally(tally8), .majority(maj8), .full(full8));
  history_vote #(.DEPTH(1)) dut1 (.clk, .rst_n, .push, .decision, .tally(tally1), .majority(maj1), .full(full1));

  decision_e q8[$], q1[$];

  function automatic int sum_of(decision_e q[$]);
    int s = 0;
    foreach (q[i]) s += (q[i] == DEC_A) ? 1 : (q[i] == DEC_B) ? -1 : 0;
    return s;
  endfunction

  function automatic decision_e maj_of(int s);
    return (s > 0) ? DEC_A : (s < 0) ? DEC_B : DEC_AMBIG;
  endfunction

  task automatic compare();
    int s8 = sum_of(q8), s1 = sum_of(q1);
    checks++;
    if (int'(tally8) != s8 || maj8 != maj_of(s8) || full8 != (q8.size() == 8)) begin
      failures++; $display("FAIL depth8: tally %0d exp %0d maj %s full %0d", tally8, s8, maj8.name(), full8);
    end
    checks++;
    if (int'(tally1) != s1 || maj1 != maj_of(s1) || full1 != (q1.size() == 1)) begin
      failures++; $display("FAIL depth1: tally %0d exp %0d maj %s", tally1, s1, maj1.name());
    end
  endtask

  initial begin
    automatic decision_e prev = DEC_AMBIG;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    compare();
    for (int i = 0; i < 5000; i++) begin
      automatic int phase = (i / 40) % 3;
      @(negedge clk);
      push = ($urandom_range(0, 2) != 0);
      case (phase)
        0: decision = ($urandom_range(0, 9) < 8) ? DEC_A : decision_e'($urandom_range(0, 2));
        1: decision = ($urandom_range(0, 9) < 8) ? DEC_B : decision_e'($urandom_range(0, 2));
        default: decision = decision_e'($urandom_range(0, 2));
      endcase
      if (decision == 2'b11) decision = DEC_AMBIG;
      @(posedge clk);
      if (push) begin
        q8.push_back(decision); if (q8.size() > 8) void'(q8.pop_front());
        q1.push_back(decision); if (q1.size() > 1) void'(q1.pop_front());
      end
      @(negedge clk);
      push = 0;
      compare();
      if (maj8 == DEC_AMBIG && q8.size() > 0) ties++;
      if (maj8 != prev && maj8 != DEC_AMBIG && prev != DEC_AMBIG) swings++;
      if (maj8 != DEC_AMBIG) prev = maj8;
    end
    checks++;
    if (ties == 0 || swings == 0) begin
      failures++; $display("FAIL: ties=%0d swings=%0d", ties, swings);
    end
    $display("ties=%0d swings=%0d", ties, swings);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

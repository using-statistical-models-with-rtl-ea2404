// tb_bin_decide: self-checking test of the single-sample decision. Checks the
// three outcomes of the voltmeter example (counts 20/11/37/20 for 1..4 V: 2 V vs
// 3 V picks the 3 V copy whichever copy that is, 1 V vs 4 V is ambiguous), the
// no-mismatch case, and random count pairs against the rule "higher count wins,
// equal counts are ambiguous".
module tb_bin_decide;
  import dwc_pkg::*;

  logic neq;
  logic [7:0] count_a, count_b;
  logic push;
  decision_e decision;
  int checks = 0, failures = 0;

  bin_decide #(.COUNT_W(8)) dut (.neq, .count_a, .count_b, .push, .decision);

  task automatic check(logic n, int ca, int cb, decision_e exp, string what);
    neq = n; count_a = 8'(ca); count_b = 8'(cb);
    #1;
    checks++;
    if (decision != exp || push != n) begin
      failures++;
      $display("FAIL %s: neq=%0d a=%0d b=%0d -> %s push=%0d, expected %s",
               what, n, ca, cb, decision.name(), push, exp.name());
    end
  endtask

  initial begin
    int ca, cb;
    decision_e e;
    // voltmeter example: hist(1V)=20, hist(2V)=11, hist(3V)=37, hist(4V)=20
    check(1, 11, 37, DEC_B, "A reads 2V, B reads 3V");
    check(1, 37, 11, DEC_A, "A reads 3V, B reads 2V");
    check(1, 20, 20, DEC_AMBIG, "1V vs 4V");
    check(0, 37, 11, DEC_AMBIG, "copies agree");
    for (int i = 0; i < 2000; i++) begin
      ca = $urandom_range(0, 255);
      cb = (i % 5 == 0) ? ca : $urandom_range(0, 255);
      e = (ca > cb) ? DEC_A : (ca < cb) ? DEC_B : DEC_AMBIG;
      check(1, ca, cb, e, "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

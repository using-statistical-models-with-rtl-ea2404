// tb_stuck_at_fault: self-checking test of the stuck-at fault model: with no
// mask the word passes unchanged; single stuck-at-0 and stuck-at-1 bits are
// checked on every bit position; random masks against the bitwise definition.
module tb_stuck_at_fault;
  logic [19:0] d, s0, s1, q;
  int checks = 0, failures = 0;

  stuck_at_fault #(.W(20)) dut (.d, .stuck0(s0), .stuck1(s1), .q);

  task automatic check(logic [19:0] e);
    #1;
    checks++;
    if (q != e) begin
      failures++;
      $display("FAIL d=%h s0=%h s1=%h q=%h exp %h", d, s0, s1, q, e);
    end
  endtask

  initial begin
    logic [19:0] e;
    for (int i = 0; i < 200; i++) begin
      d = 20'($urandom); s0 = '0; s1 = '0;
      check(d);
      for (int b = 0; b < 20; b++) begin
        s0 = '0; s1 = '0; s0[b] = 1'b1;
        e = d; e[b] = 1'b0;
        check(e);
        s0 = '0; s1[b] = 1'b1;
        e = d; e[b] = 1'b1;
        check(e);
      end
      s0 = 20'($urandom); s1 = 20'($urandom);
      for (int b = 0; b < 20; b++) e[b] = s1[b] ? 1'b1 : s0[b] ? 1'b0 : d[b];
      check(e);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

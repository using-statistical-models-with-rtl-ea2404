// tb_downsampler: self-checking test of the five-stage halfband downsampler.
// A noisy two-level (BPSK-like, 100 samples per symbol) stream plus bursts of
// random samples is fed in; every output is compared with the cascade reference
// model, and the output count must be one per 16 inputs.
module tb_downsampler;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic signed [11:0] in_data = '0;
  logic out_valid;
  logic signed [19:0] out_data;

  int checks = 0, failures = 0, n_in = 0, n_out = 0;
  longint expq[$];

  always #5 clk = ~clk;

  downsampler dut (.clk, .rst_n, .in_valid, .in_data, .out_valid, .out_data);

  ds_model m;

  always @(posedge clk) if (rst_n) begin
    longint e;
    if (out_valid) begin
      n_out++;
      checks++;
      if (expq.size() == 0) begin
        failures++; $display("FAIL: unexpected output %0d", out_data);
      end else begin
        e = expq.pop_front();
        if (longint'(out_data) != e) begin
          failures++; $display("FAIL: out %0d expected %0d", out_data, e);
        end
      end
    end
    if (in_valid) begin
      n_in++;
      if (m.push(longint'(in_data), e)) expq.push_back(e);
    end
  end

  initial begin
    int sym;
    m = new(12, 20);
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 16000; i++) begin
      @(negedge clk);
      if (i % 100 == 0) sym = ($urandom_range(0, 1) == 1) ? 1500 : -1500;
      in_valid = (i < 8000) ? 1'b1 : ($urandom_range(0, 1) == 1);
      in_data  = (i % 3000 < 2700) ? 12'(sym + $signed($urandom_range(0, 200)) - 100)
                                   : 12'($urandom);
    end
    @(negedge clk);
    in_valid = 0;
    repeat (10) @(posedge clk);
    checks++;
    if (n_out != n_in / 16 || expq.size() != 0) begin
      failures++;
      $display("FAIL: rate in=%0d out=%0d pending=%0d", n_in, n_out, expq.size());
    end
    $display("inputs=%0d outputs=%0d", n_in, n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

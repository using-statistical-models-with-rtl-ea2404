// tb_halfband_dec: self-checking test of one halfband stage, decimating and not.
// Random samples are fed at random valid density; every output is compared with
// the reference model, outputs must appear exactly one clock after the input that
// completes them, and the decimating stage must emit one output per two inputs.
// A burst of full-scale samples of alternating sign drives the saturation path.
module tb_halfband_dec;
  import tb_ref_pkg::*;

  localparam int IN_W = 12;
  localparam int OUT_W = 14;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic signed [IN_W-1:0] in_data = '0;
  logic ov_d, ov_n;
  logic signed [OUT_W-1:0] od_d;
  logic signed [OUT_W+1:0] od_n;  // non-decimating stage with 4 bits of growth

  int checks = 0, failures = 0;
  int n_in = 0, n_out_d = 0, n_out_n = 0;

  always #5 clk = ~clk;

  halfband_dec #(.IN_W(IN_W), .OUT_W(OUT_W), .DECIMATE(1)) dut_d (
    .clk, .rst_n, .in_valid, .in_data, .out_valid(ov_d), .out_data(od_d));
  halfband_dec #(.IN_W(IN_W), .OUT_W(OUT_W+2), .DECIMATE(0)) dut_n (
    .clk, .rst_n, .in_valid, .in_data, .out_valid(ov_n), .out_data(od_n));

  hb_model md, mn;
  bit exp_vd = 0, exp_vn = 0;
  longint exp_d, exp_n;

  // Compare on every clock: expected valid/data were computed at the previous edge.
  always @(posedge clk) if (rst_n) begin
    checks++;
    if (ov_d !== exp_vd || (exp_vd && longint'(od_d) != exp_d)) begin
      failures++;
      $display("FAIL dec: valid %0d/%0d data %0d/%0d", ov_d, exp_vd, od_d, exp_d);
    end
    checks++;
    if (ov_n !== exp_vn || (exp_vn && longint'(od_n) != exp_n)) begin
      failures++;
      $display("FAIL nodec: valid %0d/%0d data %0d/%0d", ov_n, exp_vn, od_n, exp_n);
    end
    n_out_d += ov_d;
    n_out_n += ov_n;
    exp_vd = 0; exp_vn = 0;
    if (in_valid) begin
      n_in++;
      exp_vd = md.push(longint'(in_data), exp_d);
      exp_vn = mn.push(longint'(in_data), exp_n);
    end
  end

  initial begin
    md = new(IN_W, OUT_W, 1);
    mn = new(IN_W, OUT_W + 2, 0);
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      in_data  = IN_W'($urandom);
    end
    // saturation: pattern that lines full-scale values up with the tap signs
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      in_valid = 1;
      in_data  = ((i / 2) % 2 == 0) ? 12'sh7FF : 12'sh800;
    end
    @(negedge clk);
    in_valid = 0;
    repeat (4) @(posedge clk);
    checks++;
    if (md.sat_count == 0 && mn.sat_count == 0) begin
      failures++; $display("FAIL: saturation never exercised");
    end
    checks++;
    if (n_out_n != n_in || n_out_d != n_in / 2) begin
      failures++;
      $display("FAIL: rate in=%0d out_dec=%0d out_nodec=%0d", n_in, n_out_d, n_out_n);
    end
    $display("inputs=%0d saturations dec=%0d nodec=%0d", n_in, md.sat_count, mn.sat_count);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

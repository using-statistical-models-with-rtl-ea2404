// tb_hist_ram: self-checking test of the histogram RAM. Writes random counts to
// random bins through port A while both ports read, and checks every read
// against a shadow array with the one-clock read latency (port A read-first).
module tb_hist_ram;
  localparam int BIN_BITS = 14;
  localparam int COUNT_W = 8;

  logic clk = 0;
  logic we_a = 0;
  logic [BIN_BITS-1:0] addr_a = '0, addr_b = '0;
  logic [COUNT_W-1:0] wdata_a = '0, rdata_a, rdata_b;

  int checks = 0, failures = 0;
  logic [COUNT_W-1:0] shadow [2**BIN_BITS];

  always #5 clk = ~clk;

  hist_ram #(.BIN_BITS(BIN_BITS), .COUNT_W(COUNT_W)) dut (
    .clk, .we_a, .addr_a, .wdata_a, .rdata_a, .addr_b, .rdata_b);

  initial begin
    logic [COUNT_W-1:0] ea, eb;
    bit cb;
    // fill the whole memory first
    for (int i = 0; i < 2**BIN_BITS; i++) begin
      @(negedge clk);
      we_a = 1; addr_a = BIN_BITS'(i); wdata_a = COUNT_W'($urandom);
      shadow[i] = wdata_a;
    end
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      we_a = ($urandom_range(0, 3) == 0);
      addr_a = BIN_BITS'($urandom);
      addr_b = (i % 7 == 0) ? addr_a : BIN_BITS'($urandom);
      wdata_a = COUNT_W'($urandom);
      ea = shadow[addr_a];            // read-first
      eb = (we_a && addr_b == addr_a) ? wdata_a : shadow[addr_b];
      cb = !(we_a && addr_b == addr_a);  // same-address read/write on B: not checked
      if (we_a) shadow[addr_a] = wdata_a;
      @(posedge clk); #1;
      checks++;
      if (rdata_a != ea) begin failures++; $display("FAIL A @%0d: %0d exp %0d", addr_a, rdata_a, ea); end
      if (cb) begin
        checks++;
        if (rdata_b != eb) begin failures++; $display("FAIL B @%0d: %0d exp %0d", addr_b, rdata_b, eb); end
      end
    end
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

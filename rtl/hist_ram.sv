// hist_ram: the histogram memory of the smart detector. It holds one COUNT_W-bit
// occurrence count per bin, 2**BIN_BITS bins (16384 x 8 bits by default, which is
// eight 16-kbit FPGA block RAMs).
//
// It is a true dual-port RAM with synchronous reads so that the bins of both
// circuit copies' outputs can be looked up in the same clock. Port A can also
// write: that is how the histogram, built beforehand from fault-free
// representative data, is loaded. Read data appears one clock after the address
// (read-first on port A when it writes). The contents are not reset.
//
// Bin counts in block RAM follow the described implementation; the load-through-
// port-A scheme is this design's choice.
module hist_ram #(
  parameter int BIN_BITS = 14,
  parameter int COUNT_W  = 8
) (
  input  logic                clk,
  // port A: read, or write when we_a
  input  logic                we_a,
  input  logic [BIN_BITS-1:0] addr_a,
  input  logic [COUNT_W-1:0]  wdata_a,
  output logic [COUNT_W-1:0]  rdata_a,
  // port B: read only
  input  logic [BIN_BITS-1:0] addr_b,
  output logic [COUNT_W-1:0]  rdata_b
);

  logic [COUNT_W-1:0] mem [2**BIN_BITS];

  always_ff @(posedge clk) begin
    if (we_a) mem[addr_a] <= wdata_a;
    rdata_a <= mem[addr_a];
  end

  always_ff @(posedge clk) begin
    rdata_b <= mem[addr_b];
  end

endmodule

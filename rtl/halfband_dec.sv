// halfband_dec: one halfband low-pass FIR stage of the downsampler, optionally
// followed by decimation by two.
//
// The filter is the 7-tap halfband kernel h = [-1 0 9 16 9 0 -1] / 32 (unity DC
// gain; every other tap but the centre is zero, which is what makes it halfband).
// The stage keeps GROWTH = OUT_W - IN_W extra fraction bits of the product sum,
// i.e. out = sat(sum >>> (5 - GROWTH)), so the word widens by GROWTH bits from
// stage to stage as in a full-precision cascade. The result saturates to OUT_W
// bits because the kernel's absolute tap sum (36) exceeds its DC gain (32).
//
// Interface: in_valid/in_data carry one signed sample per valid cycle (any rate up
// to one per clock). With DECIMATE=1 an output is produced for every second input
// (the second of each pair); with DECIMATE=0 for every input. out_valid is a
// one-cycle pulse, registered: the output appears one clock after the input that
// produced it. Synchronous active-low reset clears the delay line.
//
// A cascade of halfband stages is what the design protects; the tap values,
// kernel length and per-stage rounding are this design's own choice.
module halfband_dec #(
  parameter int IN_W     = 12,
  parameter int OUT_W    = 14,
  parameter bit DECIMATE = 1'b1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_data,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_data
);

  localparam int NTAPS      = 7;
  localparam int COEF_SHIFT = 5;               // taps sum to 2**5
  localparam int GROWTH     = OUT_W - IN_W;
  localparam int SHIFT      = COEF_SHIFT - GROWTH;
  localparam int ACC_W      = IN_W + 7;        // |sum| <= 36 * 2**(IN_W-1)

  initial begin
    assert (GROWTH >= 0 && GROWTH <= COEF_SHIFT)
      else $error("halfband_dec: OUT_W - IN_W must lie in 0..5");
  end

  // Delay line: dly[0] is the previous input, dly[5] the oldest one kept.
  logic signed [IN_W-1:0] dly [NTAPS-1];
  logic                   phase;               // 1 on the second input of a pair

  logic signed [ACC_W-1:0] acc;
  logic signed [ACC_W-1:0] scaled;
  logic signed [OUT_W-1:0] sat_val;

  // Window w0 = in_data, w1..w6 = dly[0..5]; zero taps w1 and w5 are skipped.
  always_comb begin
    acc = 16 * ACC_W'(dly[2])
        +  9 * (ACC_W'(dly[1]) + ACC_W'(dly[3]))
        -      (ACC_W'(in_data) + ACC_W'(dly[5]));
    scaled = acc >>> SHIFT;
    if (scaled > ACC_W'((2 ** (OUT_W - 1)) - 1))
      sat_val = {1'b0, {(OUT_W-1){1'b1}}};
    else if (scaled < -ACC_W'(2 ** (OUT_W - 1)))
      sat_val = {1'b1, {(OUT_W-1){1'b0}}};
    else
      sat_val = scaled[OUT_W-1:0];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NTAPS - 1; i++) dly[i] <= '0;
      phase     <= 1'b0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        dly[0] <= in_data;
        for (int i = 1; i < NTAPS - 1; i++) dly[i] <= dly[i-1];
        phase <= ~phase;
        if (!DECIMATE || phase) begin
          out_valid <= 1'b1;
          out_data  <= sat_val;
        end
      end
    end
  end

endmodule

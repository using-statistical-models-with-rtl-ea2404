// downsampler: the circuit protected by duplication - five halfband filter stages
// in cascade. Stages 1-4 decimate by two each, stage 5 filters without
// decimating, so the overall rate change is 16 (100 samples per symbol in, 6.25
// samples per symbol out). A 12-bit input grows to a 20-bit output: the growth
// OUT_W - IN_W is spread over the stages as evenly as possible, larger steps
// first (2, 2, 2, 1, 1 bits at the default widths).
//
// Interface: in_valid/in_data, one signed sample per valid cycle; out_valid is a
// one-cycle pulse with out_data, one registered output per 16 inputs. Latency
// from the input that completes a group of 16 to its output is five clocks (one
// per stage). Synchronous active-low reset.
//
// The five cascaded halfband stages, the 12-bit input, the 20-bit output and the
// 100 to 6.25 samples-per-symbol rate change follow the described system; which
// stage does not decimate and the per-stage widths are this design's choice.
module downsampler #(
  parameter int IN_W  = 12,
  parameter int OUT_W = 20
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_data,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_data
);

  localparam int NSTAGES = 5;
  localparam int GROWTH  = OUT_W - IN_W;

  // Output width of stage s (0-based): IN_W plus the growth of stages 0..s.
  function automatic int stage_w(int s);
    int w = IN_W;
    for (int j = 0; j <= s; j++) w += (GROWTH + (NSTAGES - 1 - j)) / NSTAGES;
    return w;
  endfunction

  // Stage links, sign-extended to the widest word.
  logic                    v   [NSTAGES+1];
  logic signed [OUT_W-1:0] d   [NSTAGES+1];

  assign v[0] = in_valid;
  assign d[0] = OUT_W'(in_data);

  for (genvar s = 0; s < NSTAGES; s++) begin : g_stage
    localparam int SW_IN  = (s == 0) ? IN_W : stage_w(s - 1);
    localparam int SW_OUT = stage_w(s);
    logic signed [SW_OUT-1:0] y;

    halfband_dec #(
      .IN_W     (SW_IN),
      .OUT_W    (SW_OUT),
      .DECIMATE (s < NSTAGES - 1)
    ) u_hb (
      .clk,
      .rst_n,
      .in_valid  (v[s]),
      .in_data   (d[s][SW_IN-1:0]),
      .out_valid (v[s+1]),
      .out_data  (y)
    );

    assign d[s+1] = OUT_W'(y);
  end

  assign out_valid = v[NSTAGES];
  assign out_data  = d[NSTAGES];

endmodule

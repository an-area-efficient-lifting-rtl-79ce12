// lift_dwt - multi-level forward lifting wavelet transform (decomposition).
//
// LEVELS copies of lift_fwd_stage are chained: level 0 takes the ECG samples,
// and each further level takes the approximation stream of the level before
// it. Level j therefore works at 1/2^j of the sample rate and produces one
// detail coefficient d[j] every 2^(j+1) samples. The last level also produces
// the coarsest approximation a_top. With the default 8 levels the bands are
// D0 .. D7 plus A7.
//
// Interface: registers advance on `ce` (one sample tick). in_valid/in_data is
// the sample stream. d_valid[j] is high for the one tick carrying d[j];
// a_valid / a_top come with the last level's detail.
// Timing: the pair of level j that ends with input sample n (n+1 a multiple of
// 2^(j+1)) is on the outputs during tick n + 1 + j.
//
// The number of levels and the band names follow the design's block diagram;
// the Haar lifting steps are this implementation's choice.
module lift_dwt #(
  parameter int unsigned W      = 11,
  parameter int unsigned LEVELS = 8
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                ce,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_data,
  output logic                d_valid [LEVELS],
  output logic signed [W:0]   d       [LEVELS],
  output logic                a_valid,
  output logic signed [W-1:0] a_top
);
  logic                approx_valid [LEVELS+1];
  logic signed [W-1:0] approx       [LEVELS+1];

  assign approx_valid[0] = in_valid;
  assign approx[0]       = in_data;

  for (genvar j = 0; j < LEVELS; j++) begin : g_level
    lift_fwd_stage #(.W(W)) u_stage (
      .clk       (clk),
      .rst       (rst),
      .ce        (ce),
      .in_valid  (approx_valid[j]),
      .in_data   (approx[j]),
      .out_valid (approx_valid[j+1]),
      .out_a     (approx[j+1]),
      .out_d     (d[j])
    );
    assign d_valid[j] = approx_valid[j+1];
  end

  assign a_valid = approx_valid[LEVELS];
  assign a_top   = approx[LEVELS];
endmodule

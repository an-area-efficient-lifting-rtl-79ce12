// coef_shrink - level-dependent soft thresholding of the detail bands.
//
// The finest THR_LEVELS detail bands (D0 .. D3 by default), where power-line
// interference, muscle noise and other high-frequency noise sit, each pass
// through a soft_thresh with their own threshold thr[j]. The coarser detail
// bands (D4 .. D7), which carry the P/T waves and the body of the QRS complex,
// are passed on unchanged. The coarsest approximation band is removed
// (zeroed) in lwt, since it holds the baseline wander.
//
// Interface: combinational; d_in[j] / d_out[j] are signed DW-bit coefficients,
// thr[j] the unsigned TW-bit threshold of band j, held by the user.
//
// Which bands are thresholded and which pass follows the design's block
// diagram; the thresholds themselves are supplied from outside, as in the
// design's system diagram.
module coef_shrink #(
  parameter int unsigned LEVELS     = 8,
  parameter int unsigned THR_LEVELS = 4,
  parameter int unsigned DW         = 12,
  parameter int unsigned TW         = 11
) (
  input  logic signed [DW-1:0] d_in  [LEVELS],
  input  logic        [TW-1:0] thr   [THR_LEVELS],
  output logic signed [DW-1:0] d_out [LEVELS]
);
  for (genvar j = 0; j < LEVELS; j++) begin : g_band
    if (j < THR_LEVELS) begin : g_thr
      soft_thresh #(.DW(DW), .TW(TW)) u_st (
        .d   (d_in[j]),
        .thr (thr[j]),
        .y   (d_out[j])
      );
    end else begin : g_pass
      assign d_out[j] = d_in[j];
    end
  end
endmodule

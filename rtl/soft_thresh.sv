// soft_thresh - soft-thresholding of one wavelet detail coefficient.
//
//     y = sign(d) * max(|d| - thr, 0)
//
// Coefficients whose magnitude is below the threshold (noise) become zero;
// larger ones (the QRS energy) are shrunk toward zero by thr, which keeps the
// output continuous in d. No magnitude comparator is used: the stage forms
// |d| - thr in one extra bit and the sign bit of that difference alone decides
// whether the result is cut to zero.
//
// Interface: purely combinational. d is a signed DW-bit coefficient, thr an
// unsigned TW-bit threshold, y a signed DW-bit result with |y| <= |d|.
//
// Soft thresholding of the detail bands follows the design's description; the
// sign-bit formulation and the widths are this implementation's choices.
module soft_thresh #(
  parameter int unsigned DW = 12,
  parameter int unsigned TW = 11
) (
  input  logic signed [DW-1:0] d,
  input  logic        [TW-1:0] thr,
  output logic signed [DW-1:0] y
);
  localparam int unsigned XW = ((DW > TW) ? DW : TW) + 1;

  logic          neg;
  logic [DW-1:0] mag;
  logic [XW-1:0] diff;

  always_comb begin
    neg  = d[DW-1];
    mag  = neg ? DW'(-d) : DW'(d);
    diff = XW'(mag) - XW'(thr);
    if (diff[XW-1]) begin
      y = '0;                                  // |d| < thr
    end else begin
      y = neg ? -DW'(diff) : DW'(diff);        // |d| - thr, sign restored
    end
  end
endmodule

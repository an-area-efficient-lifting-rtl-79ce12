// rpeak_detect - R-peak detector on the denoised ECG stream.
//
// A sample is taken as an R peak when
//   * it exceeds the amplitude threshold amp_thr          (amplitude test),
//   * it is a local maximum: larger than the sample before it and not
//     smaller than the sample after it, and
//   * at least MIN_RR samples have passed since the previous R peak
//                                                         (time-interval test).
// Because the sample after the candidate is needed, a peak at sample n is
// reported while sample n+1 is being accepted. rr_interval then gives the
// distance, in samples, from the previous peak; heart rate in beats per minute
// is 60 * fs / rr_interval, left to the consumer of this interface.
//
// Interface: registers advance on `ce`. in_valid/x is the sample stream.
// peak is high for one tick, together with rr_interval and rr_valid (low for
// the first peak after reset, which has no predecessor). peak_value is the
// amplitude of the last peak.
// Timing: peak comes during the tick after sample n+1 was accepted.
//
// Amplitude thresholding plus a time-interval rule follow the design's
// description; the local-maximum rule, MIN_RR (200 ms at 360 samples/s) and
// the interval counter are this implementation's.
module rpeak_detect #(
  parameter int unsigned W      = 11,
  parameter int unsigned MIN_RR = 72,
  parameter int unsigned CNT_W  = 12
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                ce,
  input  logic                in_valid,
  input  logic signed [W-1:0] x,
  input  logic signed [W-1:0] amp_thr,
  output logic                peak,
  output logic [CNT_W-1:0]    rr_interval,
  output logic                rr_valid,
  output logic signed [W-1:0] peak_value
);
  localparam logic [CNT_W-1:0] CNT_MAX = '1;

  logic signed [W-1:0] x1;        // candidate sample (n)
  logic signed [W-1:0] x2;        // sample before the candidate (n-1)
  logic [1:0]          filled;    // how many of x1/x2 hold real samples
  logic [CNT_W-1:0]    gap;       // samples from the last peak to x1
  logic                seen_peak;
  logic                is_peak;

  always_comb begin
    is_peak = (filled == 2'd2) && (x1 > amp_thr) && (x1 > x2) && (x1 >= x)
              && (gap >= CNT_W'(MIN_RR));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      x1          <= '0;
      x2          <= '0;
      filled      <= '0;
      gap         <= CNT_MAX;
      seen_peak   <= 1'b0;
      peak        <= 1'b0;
      rr_interval <= '0;
      rr_valid    <= 1'b0;
      peak_value  <= '0;
    end else if (ce) begin
      peak <= 1'b0;
      if (in_valid) begin
        x2 <= x1;
        x1 <= x;
        if (filled != 2'd2) filled <= filled + 1'b1;
        if (is_peak) begin
          peak        <= 1'b1;
          rr_interval <= gap;
          rr_valid    <= seen_peak;
          peak_value  <= x1;
          seen_peak   <= 1'b1;
          gap         <= CNT_W'(1);
        end else if (filled != 2'd0 && gap != CNT_MAX) begin
          gap <= gap + 1'b1;
        end
      end
    end
  end
endmodule

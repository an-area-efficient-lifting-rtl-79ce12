// lwt - multiplier-less lifting-wavelet ECG denoiser with R-peak detection.
//
// Signal flow (one sample per `sample_tick`):
//   clk_div      divides the system clock down to the sample tick that every
//                stage below advances on.
//   lift_dwt     LEVELS-level forward lifting DWT of ecg_in: detail bands
//                D0 .. D(LEVELS-1) and the approximation A(LEVELS-1).
//   mad_thresh   one per thresholded band: universal threshold from the median
//                of |d| of the band over a frame of 2^LEVELS samples, scaled by
//                a CSD shift-add constant (used when thr_auto is high).
//   coef_shrink  soft thresholding of the finest THR_LEVELS detail bands with
//                per-band thresholds (estimated, or thr_in when thr_auto is
//                low); coarser bands pass unchanged.
//   (zeroing)    the coarsest approximation is replaced by zero, removing the
//                baseline wander; A(LEVELS-1) is not used further.
//   lift_idwt    inverse lifting DWT, with buffers that hold each detail band
//                until its approximation has been rebuilt.
//   saturation   the reconstruction is clipped to DATA_W bits -> ecg_out.
//   rpeak_detect amplitude threshold + minimum RR interval on ecg_out.
//   heart_rate   60 * FS / RR interval, in beats per minute.
//
// Interface: rst is synchronous and active high; enb starts and pauses the
// engine. ecg_in is sampled on every cycle where sample_tick is high (one
// cycle in DIV). thr_in[j] is the external soft threshold of band j, used
// while thr_auto is low; with thr_auto high the estimated thresholds are used
// (0 for the first two frames, then each frame uses the estimate of the frame
// two before it). amp_thr is the R-peak amplitude threshold. ecg_out is valid on
// the ticks where ecg_out_valid is high; r_peak, rr_interval, rr_valid and
// peak_value come from the R-peak detector; heart_rate_bpm is updated (with a
// one-cycle heart_rate_valid) 16 cycles after the tick that reports each
// R peak that has a predecessor.
// Timing: input sample n (the n-th tick after reset) leaves as ecg_out during
// tick n + 2^LEVELS + 2*LEVELS - 1 (271 ticks with 8 levels); from then on one
// output per tick. An R peak at output sample k is flagged one tick after
// output sample k+1.
//
// The band structure (8 levels, soft thresholding of D0..D3, D4..D7 passed,
// A7 zeroed), the universal threshold from a median without comparators and
// a CSD constant, the external threshold input, the clock divider, the
// 11-bit sample width and the multiplier-free lifting follow the design.
// The Haar lifting steps, the radix-selection median, the two-frame
// threshold lag, the detail buffers, the 13-bit reconstruction path with
// output saturation, the divider ratio (at least 7, so that the level-0
// median search of 12 * 128 cycles fits into a frame of 256 samples) and the
// R-peak rules and the heart-rate divider with FS = 360 are this
// implementation's choices.
module lwt #(
  parameter int unsigned DATA_W     = 11,  // ECG sample width
  parameter int unsigned LEVELS     = 8,   // decomposition levels (D0..D7, A7)
  parameter int unsigned THR_LEVELS = 4,   // soft-thresholded bands (D0..D3)
  parameter int unsigned DIV        = 8,   // system clocks per sample (>= 7)
  parameter int unsigned MIN_RR     = 72,  // minimum samples between R peaks
  parameter int unsigned RR_W       = 12,  // RR interval counter width
  parameter int unsigned FS         = 360  // sample rate, for heart rate only
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     enb,
  input  logic signed [DATA_W-1:0] ecg_in,
  input  logic        [DATA_W-1:0] thr_in [THR_LEVELS],
  input  logic                     thr_auto,
  input  logic signed [DATA_W-1:0] amp_thr,
  output logic                     sample_tick,
  output logic signed [DATA_W-1:0] ecg_out,
  output logic                     ecg_out_valid,
  output logic                     r_peak,
  output logic [RR_W-1:0]          rr_interval,
  output logic                     rr_valid,
  output logic signed [DATA_W-1:0] peak_value,
  output logic [7:0]               heart_rate_bpm,
  output logic                     heart_rate_valid
);
  localparam int unsigned DW = DATA_W + 1;   // detail coefficient width
  localparam int unsigned RW = DATA_W + 2;   // reconstruction width

  localparam logic signed [RW-1:0] OUT_MAX = RW'((1 << (DATA_W - 1)) - 1);
  localparam logic signed [RW-1:0] OUT_MIN = -RW'(1 << (DATA_W - 1));

  logic                     ce;
  logic                     d_valid  [LEVELS];
  logic signed [DW-1:0]     d_raw    [LEVELS];
  logic signed [DW-1:0]     d_shrunk [LEVELS];
  logic                     a_valid;
  logic signed [DATA_W-1:0] a_top;
  logic        [DATA_W-1:0] thr_est  [THR_LEVELS];
  logic        [DATA_W-1:0] thr_use  [THR_LEVELS];
  logic                     rec_valid;
  logic signed [RW-1:0]     rec;

  clk_div #(.DIV(DIV)) u_clk_div (
    .clk (clk),
    .rst (rst),
    .enb (enb),
    .ce  (ce)
  );
  assign sample_tick = ce;

  lift_dwt #(.W(DATA_W), .LEVELS(LEVELS)) u_dwt (
    .clk      (clk),
    .rst      (rst),
    .ce       (ce),
    .in_valid (1'b1),
    .in_data  (ecg_in),
    .d_valid  (d_valid),
    .d        (d_raw),
    .a_valid  (a_valid),
    .a_top    (a_top)
  );

  // Universal threshold per thresholded band, estimated from the band itself,
  // or the external threshold, as selected by thr_auto.
  for (genvar j = 0; j < THR_LEVELS; j++) begin : g_est
    mad_thresh #(.DW(DW), .TW(DATA_W), .NCOEF(1 << (LEVELS - j - 1))) u_est (
      .clk     (clk),
      .rst     (rst),
      .ce      (ce),
      .d_valid (d_valid[j]),
      .d       (d_raw[j]),
      .thr     (thr_est[j]),
      .median  ()
    );
    assign thr_use[j] = thr_auto ? thr_est[j] : thr_in[j];
  end

  coef_shrink #(
    .LEVELS(LEVELS), .THR_LEVELS(THR_LEVELS), .DW(DW), .TW(DATA_W)
  ) u_shrink (
    .d_in  (d_raw),
    .thr   (thr_use),
    .d_out (d_shrunk)
  );

  // Zeroing of the coarsest approximation band: only its timing (a_valid) is
  // used, its value a_top is dropped here (it is the baseline estimate).
  lift_idwt #(.LEVELS(LEVELS), .DW(DW), .RW(RW)) u_idwt (
    .clk     (clk),
    .rst     (rst),
    .ce      (ce),
    .d_valid (d_valid),
    .d       (d_shrunk),
    .a_valid (a_valid),
    .a_top   ('0),
    .x_valid (rec_valid),
    .x       (rec)
  );

  always_comb begin
    if (rec > OUT_MAX)      ecg_out = DATA_W'(OUT_MAX);
    else if (rec < OUT_MIN) ecg_out = DATA_W'(OUT_MIN);
    else                    ecg_out = DATA_W'(rec);
  end
  assign ecg_out_valid = rec_valid;

  rpeak_detect #(.W(DATA_W), .MIN_RR(MIN_RR), .CNT_W(RR_W)) u_rpeak (
    .clk         (clk),
    .rst         (rst),
    .ce          (ce),
    .in_valid    (rec_valid),
    .x           (ecg_out),
    .amp_thr     (amp_thr),
    .peak        (r_peak),
    .rr_interval (rr_interval),
    .rr_valid    (rr_valid),
    .peak_value  (peak_value)
  );

  // r_peak lasts one tick (DIV cycles): start the divider once per peak.
  heart_rate #(.FS(FS), .RR_W(RR_W), .BPM_W(8)) u_hr (
    .clk   (clk),
    .rst   (rst),
    .start (ce && r_peak && rr_valid),
    .rr    (rr_interval),
    .bpm   (heart_rate_bpm),
    .valid (heart_rate_valid)
  );
endmodule

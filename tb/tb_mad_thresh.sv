// tb_mad_thresh - frames of random coefficients (narrow and wide spreads,
// many repeated values, full-scale values that drive the threshold into
// saturation) are fed to the estimator. While each frame f is being written
// the threshold output must equal 4*m + m - floor(m/16), saturated, with m
// the lower median of |d| of frame f-2 (0 for the first two frames), found
// here by sorting. The median output is checked too.
module tb_mad_thresh;
  localparam int DW = 12, TW = 11, NC = 16, FRAMES = 30, DIVT = 16;
  logic clk = 0, rst = 1, ce = 0, d_valid = 0;
  logic signed [DW-1:0] d = '0;
  logic [TW-1:0] thr;
  logic [DW-1:0] median;
  int checks = 0, failures = 0;
  int coef[FRAMES][NC];
  int med_ref[FRAMES];
  int thr_ref[FRAMES];
  int n_sat = 0;

  mad_thresh #(.DW(DW), .TW(TW), .NCOEF(NC)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int f = 0; f < FRAMES; f++) begin
      int mags[$];
      int spread;
      mags.delete();
      spread = (f % 3 == 0) ? 20 : (f % 3 == 1) ? 300 : 2047;
      for (int k = 0; k < NC; k++) begin
        int v;
        v = $urandom_range(0, spread);
        if (f % 5 == 4) v = 7;                         // all equal
        if ($urandom_range(0, 1)) v = -v;
        if (f % 7 == 6 && k % 2 == 0) v = -2048;       // most negative value
        coef[f][k] = v;
        mags.push_back(v < 0 ? -v : v);
      end
      mags.sort();
      med_ref[f] = mags[NC/2 - 1];
      thr_ref[f] = 4 * med_ref[f] + med_ref[f] - (med_ref[f] >> 4);
      if (thr_ref[f] > (1 << TW) - 1) begin thr_ref[f] = (1 << TW) - 1; n_sat++; end
    end
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 0;
    for (int f = 0; f < FRAMES; f++) begin
      for (int k = 0; k < NC; k++) begin
        int exp_thr;
        repeat (DIVT - 1) @(negedge clk);
        // threshold in force while frame f is written
        exp_thr = (f >= 2) ? thr_ref[f-2] : 0;
        checks++;
        if (int'(thr) != exp_thr) begin
          failures++;
          if (failures < 10) $display("frame %0d coef %0d: thr=%0d expected %0d", f, k, thr, exp_thr);
        end
        if (k == NC - 1 && f >= 1) begin
          checks++;
          if (int'(median) != med_ref[f-1]) begin
            failures++;
            if (failures < 10) $display("frame %0d: median=%0d expected %0d", f - 1, median, med_ref[f-1]);
          end
        end
        ce = 1; d_valid = 1; d = DW'(coef[f][k]);
        @(negedge clk);
        ce = 0; d_valid = 0;
      end
    end
    checks++;
    if (n_sat == 0) begin failures++; $display("saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_rpeak_detect - a synthetic beat train (triangular R waves on a noisy
// floor, extra spikes placed inside and just outside the minimum interval,
// spikes exactly MIN_RR and MIN_RR-1 after a beat, flat-topped peaks, gaps in the sample stream) is fed to the detector and
// every tick's outputs are compared with a software model of the rules:
// above amp_thr, local maximum, at least MIN_RR samples after the last peak.
module tb_rpeak_detect;
  localparam int W = 11, MIN_RR = 72, CW = 12, NS = 4000;
  logic clk = 0, rst = 1, ce = 0, in_valid = 0;
  logic signed [W-1:0] x = '0;
  logic signed [W-1:0] amp_thr = W'(200);
  logic peak;
  logic [CW-1:0] rr_interval;
  logic rr_valid;
  logic signed [W-1:0] peak_value;
  int checks = 0, failures = 0;
  int sig[NS];
  // model results per sample index k: peak at sample k reported when
  // sample k+1 is accepted
  bit exp_peak[NS];
  int exp_rr[NS];
  bit exp_rrv[NS];
  int npeaks = 0, nsupp = 0;
  int accepted = 0;
  int pending_k = -1;

  rpeak_detect #(.W(W), .MIN_RR(MIN_RR), .CNT_W(CW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic build_model();
    int last;
    last = -1;
    for (int k = 1; k < NS - 1; k++) begin
      bit cand;
      cand = sig[k] > int'(amp_thr) && sig[k] > sig[k-1] && sig[k] >= sig[k+1];
      if (cand && (last < 0 || k - last >= MIN_RR)) begin
        exp_peak[k] = 1;
        exp_rr[k] = (last < 0) ? 0 : k - last;
        exp_rrv[k] = (last >= 0);
        last = k;
        npeaks++;
      end else if (cand) nsupp++;
    end
  endtask

  // checker: outputs during the tick after sample k+1 was accepted
  always @(posedge clk) if (!rst && ce) begin
    checks++;
    if (pending_k >= 0) begin
      if (peak != exp_peak[pending_k]) begin
        failures++;
        if (failures < 10) $display("sample %0d: peak=%0b expected %0b", pending_k, peak, exp_peak[pending_k]);
      end else if (peak) begin
        checks += 2;
        if (rr_valid != exp_rrv[pending_k]) failures++;
        if (exp_rrv[pending_k] && int'(rr_interval) != exp_rr[pending_k]) begin
          failures++;
          $display("sample %0d: rr=%0d expected %0d", pending_k, rr_interval, exp_rr[pending_k]);
        end
        if (int'(peak_value) != sig[pending_k]) failures++;
      end
    end else if (peak) begin
      failures++;
    end
    pending_k = -1;
    if (in_valid) begin
      accepted++;
      if (accepted >= 2) pending_k = accepted - 2;
    end
  end

  initial begin
    for (int i = 0; i < NS; i++) begin
      int ph;
      ph = i % 300;
      sig[i] = int'($urandom_range(0, 60)) - 30;
      if (ph >= 100 && ph <= 110) sig[i] += 500 - 90 * ((ph > 105) ? ph - 105 : 105 - ph);
      if (i % 900 == 150) sig[i] += 400;                 // spike 50 after R: suppressed
      if (i % 1200 == 180) sig[i] += 350;                // spike 80 after R: a peak
      if (i % 1800 == 177) sig[i] += 350;                // exactly MIN_RR after R: a peak
      if (i % 2700 == 476) sig[i] += 350;                // MIN_RR-1 after R: suppressed
      if (i % 1500 == 400) begin sig[i] = 300; sig[i+1] = 300; end  // flat top
    end
    build_model();
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < NS; ) begin
      @(negedge clk);
      ce = ($urandom_range(0, 2) == 0);
      if (ce) begin
        in_valid = ($urandom_range(0, 9) != 0);
        if (in_valid) begin x = W'(sig[i]); i++; end
      end
    end
    @(negedge clk); ce = 1; in_valid = 0;
    @(negedge clk); ce = 0;
    checks++;
    if (npeaks < 10 || nsupp < 2) begin failures++; $display("peaks %0d suppressed %0d", npeaks, nsupp); end
    $display("peaks=%0d suppressed_by_interval=%0d", npeaks, nsupp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

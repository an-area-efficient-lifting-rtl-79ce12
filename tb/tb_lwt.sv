// tb_lwt - end-to-end test of the denoiser at its default configuration
// (11-bit samples, 8 levels, D0..D3 soft-thresholded, one sample per 8
// clocks).
//
// Stimulus: 22 frames of 256 samples of a synthetic ECG: triangular R waves
// every 290 samples, a slow baseline wander, a 60 Hz-like ripple (period 6
// samples) and uniform noise, plus ectopic spikes 45 samples after some
// beats (to exercise the R-R interval rule) and one frame driven to the
// rails (to exercise output saturation). The engine is paused once.
//
// Checks: every output sample against the reference denoiser in
// tb_haar_pkg, its exact tick (sample n during tick n + 271) and gap-free
// output; every R-peak flag, RR interval and peak value against a software
// detector run on the reference output. Counted mechanisms, each of which
// must occur: coefficient cut to zero, coefficient shrunk, nonzero A7
// removed, output saturated, R peak, RR interval, peak rejected by the
// interval rule, engine pause, switch to estimated thresholds, coefficient
// cut by an estimated threshold. Each heart-rate result is compared with
// 60 * 360 / RR of the reference detector.
module tb_lwt;
  import tb_haar_pkg::*;
  localparam int W = 11, L = 8, TL = 4, N = 1 << L, FRAMES = 22, NS = FRAMES * N;
  localparam int LAT = N + 2 * L - 1;
  localparam int MIN_RR = 72;
  localparam int SWITCH = 9 * N + 77;   // tick at which thr_auto goes high
  localparam int THR[TL] = '{30, 24, 16, 8};

  logic clk = 0, rst = 1, enb = 0;
  logic signed [W-1:0] ecg_in = '0;
  logic [W-1:0] thr_in [TL];
  logic thr_auto = 0;
  logic signed [W-1:0] amp_thr = W'(150);
  logic sample_tick;
  logic signed [W-1:0] ecg_out;
  logic ecg_out_valid;
  logic r_peak;
  logic [11:0] rr_interval;
  logic rr_valid;
  logic signed [W-1:0] peak_value;
  logic [7:0] heart_rate_bpm;
  logic heart_rate_valid;
  int exp_bpm[$];

  int checks = 0, failures = 0;
  int xin[NS];
  int yref[NS];
  bit exp_peak[NS];
  int exp_rr[NS];
  int est[FRAMES][TL];
  bit exp_rrv[NS];
  int tick = 0, nout = 0;
  // mechanism counters
  int n_cut = 0, n_shrunk = 0, n_a7 = 0, n_sat = 0, n_peak = 0, n_rr = 0, n_supp = 0, n_pause = 0;
  int n_switch = 0, n_auto_cut = 0, n_hr = 0;

  lwt dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int clip(int v);
    return sat(v, W);
  endfunction

  initial begin
    for (int j = 0; j < TL; j++) thr_in[j] = W'(THR[j]);
    for (int i = 0; i < NS; i++) begin
      int ph, v;
      real bw;
      ph = i % 290;
      bw = 250.0 * $sin(2.0 * 3.14159265 * i / 1100.0);
      v = int'(bw) + ((i % 6 < 3) ? 12 : -12) + int'($urandom_range(0, 40)) - 20;
      if (ph >= 60 && ph <= 72) v += 600 - 100 * ((ph > 66) ? ph - 66 : 66 - ph);
      if ((i / 290) % 3 == 1 && ph == 111) v += 450;
      if (i / N == 15) v = ((i % N) < 230) ? -1000 : 1000;
      xin[i] = clip(v);
    end
    // universal thresholds of every frame, from its raw coefficients
    for (int f = 0; f < FRAMES; f++) begin
      int xf[], dr[];
      int at;
      xf = new[N];
      for (int i = 0; i < N; i++) xf[i] = xin[f*N + i];
      fwd_frame(xf, L, dr, at);
      for (int j = 0; j < TL; j++) est[f][j] = univ_thr(dr, L, j, W);
    end
    // threshold of each coefficient: external before SWITCH, afterwards the
    // estimate of the frame two before (0 for frames 0 and 1)
    for (int f = 0; f < FRAMES; f++) begin
      int xf[], yf[], thrc[];
      xf = new[N];
      thrc = new[L * N];
      for (int i = 0; i < N; i++) xf[i] = xin[f*N + i];
      for (int j = 0; j < TL; j++)
        for (int k = 0; k < (N >> (j + 1)); k++) begin
          int t;
          t = (1 << (j + 1)) * (f * (N >> (j + 1)) + k + 1) + j;   // arrival tick
          thrc[j*N + k] = (t < SWITCH) ? THR[j] : (f >= 2 ? est[f-2][j] : 0);
        end
      denoise_frame_thrc(xf, L, TL, thrc, W, yf);
      for (int i = 0; i < N; i++) yref[f*N + i] = yf[i];
    end
    // software R-peak detector on the reference output
    begin
      int last;
      last = -1;
      for (int k = 1; k < NS - 1; k++) begin
        bit cand;
        cand = yref[k] > 150 && yref[k] > yref[k-1] && yref[k] >= yref[k+1];
        if (cand && (last < 0 || k - last >= MIN_RR)) begin
          exp_peak[k] = 1; exp_rr[k] = k - last; exp_rrv[k] = (last >= 0); last = k;
        end else if (cand) n_supp++;
      end
    end
  end

  // output and R-peak checker, once per sample tick
  always @(posedge clk) if (!rst && sample_tick) begin
    int n, k;
    n = tick - LAT;
    if (n >= 0 && n < NS) begin
      checks++;
      if (!ecg_out_valid || int'(ecg_out) != yref[n]) begin
        failures++;
        if (failures < 10) $display("tick %0d sample %0d: valid=%0b out=%0d expected %0d", tick, n, ecg_out_valid, ecg_out, yref[n]);
      end
      nout++;
    end else if (n < 0 && ecg_out_valid) begin
      failures++;
      $display("tick %0d: output before the expected latency", tick);
    end
    // peak at output sample k is reported during tick k + LAT + 2
    k = tick - LAT - 2;
    if (k >= 1 && k < NS - 1) begin
      checks++;
      if (r_peak != exp_peak[k]) begin
        failures++;
        if (failures < 10) $display("sample %0d: r_peak=%0b expected %0b", k, r_peak, exp_peak[k]);
      end else if (r_peak) begin
        checks += 2;
        n_peak++;
        if (rr_valid != exp_rrv[k] || (rr_valid && int'(rr_interval) != exp_rr[k])) begin
          failures++;
          $display("sample %0d: rr=%0d/%0b expected %0d/%0b", k, rr_interval, rr_valid, exp_rr[k], exp_rrv[k]);
        end
        if (int'(peak_value) != yref[k]) failures++;
        if (rr_valid) begin
          n_rr++;
          exp_bpm.push_back((60 * 360 / exp_rr[k] > 255) ? 255 : 60 * 360 / exp_rr[k]);
        end
      end
    end
    tick++;
  end

  // heart rate: one result per R peak with a predecessor, in order
  always @(posedge clk) if (!rst && heart_rate_valid) begin
    checks++;
    n_hr++;
    if (exp_bpm.size() == 0) begin
      failures++;
      $display("unexpected heart rate result");
    end else begin
      int e;
      e = exp_bpm.pop_front();
      if (int'(heart_rate_bpm) != e) begin
        failures++;
        $display("heart rate %0d expected %0d", heart_rate_bpm, e);
      end
    end
  end

  // mechanism monitors inside the design
  always @(posedge clk) if (!rst && sample_tick) begin
    for (int j = 0; j < TL; j++) if (dut.d_valid[j]) begin
      if (dut.d_raw[j] != 0 && dut.d_shrunk[j] == 0) begin
        n_cut++;
        if (thr_auto && dut.thr_use[j] != thr_in[j]) n_auto_cut++;
      end
      if (dut.d_shrunk[j] != 0 && dut.d_shrunk[j] != dut.d_raw[j]) n_shrunk++;
    end
    if (dut.a_valid && dut.a_top != 0) n_a7++;
    if (dut.rec_valid && (dut.rec > 1023 || dut.rec < -1024)) n_sat++;
  end

  // stimulus: present sample 'tick' before each tick
  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 0;
    enb = 1;
    ecg_in = W'(xin[0]);
    while (tick < NS + LAT + 8) begin
      @(negedge clk);
      ecg_in = (tick < NS) ? W'(xin[tick]) : '0;
      if (tick == SWITCH && !thr_auto) begin thr_auto = 1; n_switch++; end
      if (tick == 3000 && n_pause == 0) begin
        enb = 0;
        repeat (37) begin
          @(negedge clk);
          n_pause++;
          checks++;
          if (sample_tick) begin failures++; $display("tick during pause"); end
        end
        enb = 1;
      end
    end
    checks++;
    if (nout != NS) begin failures++; $display("samples out %0d of %0d", nout, NS); end
    $display("mechanisms: cut=%0d shrunk=%0d a7_zeroed=%0d saturated=%0d peaks=%0d rr=%0d rejected_by_interval=%0d pause_cycles=%0d switch=%0d auto_cut=%0d heart_rate=%0d",
             n_cut, n_shrunk, n_a7, n_sat, n_peak, n_rr, n_supp, n_pause, n_switch, n_auto_cut, n_hr);
    if (n_hr != n_rr)    begin failures++; $display("heart rate results %0d for %0d intervals", n_hr, n_rr); end
    if (n_switch == 0)   begin failures++; $display("never switched to estimated thresholds"); end
    if (n_auto_cut == 0) begin failures++; $display("no coefficient cut by an estimated threshold"); end
    if (n_cut == 0)    begin failures++; $display("no coefficient cut to zero"); end
    if (n_shrunk == 0) begin failures++; $display("no coefficient shrunk"); end
    if (n_a7 == 0)     begin failures++; $display("A7 never nonzero"); end
    if (n_sat == 0)    begin failures++; $display("output never saturated"); end
    if (n_peak == 0)   begin failures++; $display("no R peak"); end
    if (n_rr == 0)     begin failures++; $display("no RR interval"); end
    if (n_supp == 0)   begin failures++; $display("interval rule never used"); end
    if (n_pause == 0)  begin failures++; $display("no pause"); end
    checks += 11;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

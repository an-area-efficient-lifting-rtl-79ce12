// tb_lift_idwt - drives the inverse transform with the coefficient stream of
// four frames of random samples, timed exactly as the forward transform
// delivers it (band j, pair m of the stream, during tick 2^(j+1)*(m+1) + j),
// with a tick every other cycle. Unmodified coefficients must give back the
// input samples exactly, sample n during tick n + 2^L + 2L - 1, one per tick.
module tb_lift_idwt;
  import tb_haar_pkg::*;
  localparam int L = 8, DW = 12, RW = 13, N = 1 << L, FRAMES = 4;
  localparam int LAT = N + 2 * L - 1;
  logic clk = 0, rst = 1, ce = 0;
  logic d_valid [L];
  logic signed [DW-1:0] d [L];
  logic a_valid;
  logic signed [RW-1:0] a_top;
  logic x_valid;
  logic signed [RW-1:0] x;
  int checks = 0, failures = 0;
  int xin[FRAMES * N];
  int dref[FRAMES][];
  int aref[FRAMES];
  int tick = 0;
  int nout = 0;

  lift_idwt #(.LEVELS(L), .DW(DW), .RW(RW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // present the coefficients due in tick t
  task automatic drive(int t);
    a_valid = 0;
    a_top = '0;
    for (int j = 0; j < L; j++) begin
      int p, m;
      p = 1 << (j + 1);
      d_valid[j] = 0;
      d[j] = '0;
      if (t - j >= p && (t - j) % p == 0) begin
        m = (t - j) / p - 1;
        if (m < FRAMES * (N / p)) begin
          d_valid[j] = 1;
          d[j] = DW'(dref[m / (N / p)][j*N + m % (N / p)]);
          if (j == L - 1) begin
            a_valid = 1;
            a_top = RW'(aref[m]);
          end
        end
      end
    end
  endtask

  always @(posedge clk) if (!rst && ce) begin
    int n;
    n = tick - LAT;
    checks++;
    if (n >= 0 && n < FRAMES * N) begin
      if (!x_valid || int'(x) != xin[n]) begin
        failures++;
        if (failures < 10) $display("tick %0d sample %0d: valid=%0b x=%0d expected %0d", tick, n, x_valid, x, xin[n]);
      end
      nout++;
    end else if (x_valid) begin
      failures++;
      if (failures < 10) $display("tick %0d: output outside the expected window", tick);
    end
    tick++;
  end

  initial begin
    for (int i = 0; i < FRAMES * N; i++) xin[i] = $signed(11'($urandom));
    for (int f = 0; f < FRAMES; f++) begin
      int xf[];
      xf = new[N];
      for (int i = 0; i < N; i++) xf[i] = xin[f*N + i];
      fwd_frame(xf, L, dref[f], aref[f]);
    end
    drive(0);
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int cyc = 0; cyc < 2 * (FRAMES * N + LAT + 40); cyc++) begin
      @(negedge clk);
      ce = (cyc % 2 == 1);
      if (ce) drive(tick);          // tick = index of the tick about to happen
    end
    checks++;
    if (nout != FRAMES * N) begin failures++; $display("samples out %0d", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

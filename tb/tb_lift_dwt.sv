// tb_lift_dwt - runs four frames of random samples (full-scale corners
// included) through the forward transform with a tick on every cycle and
// checks every detail band and the top approximation against the reference
// transform, including the tick on which each coefficient appears
// (level j, pair ending with sample n -> tick n + 1 + j) and that no band
// signals valid at any other tick.
module tb_lift_dwt;
  import tb_haar_pkg::*;
  localparam int W = 11, L = 8, N = 1 << L, FRAMES = 4;
  logic clk = 0, rst = 1, ce = 0, in_valid = 0;
  logic signed [W-1:0] in_data = '0;
  logic d_valid [L];
  logic signed [W:0] d [L];
  logic a_valid;
  logic signed [W-1:0] a_top;
  int checks = 0, failures = 0;
  int x[FRAMES * N];
  int dref[FRAMES][];
  int aref[FRAMES];
  int tick = 0;
  int seen = 0;

  lift_dwt #(.W(W), .LEVELS(L)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst && ce) begin
    for (int j = 0; j < L; j++) begin
      int p, m, f, k;
      bit due;
      p = 1 << (j + 1);
      due = (tick - j >= p) && ((tick - j) % p == 0) && ((tick - j) / p - 1 < FRAMES * (N / p));
      checks++;
      if (d_valid[j] != due) begin
        failures++;
        if (failures < 10) $display("tick %0d level %0d: valid=%0b expected %0b", tick, j, d_valid[j], due);
      end else if (due) begin
        m = (tick - j) / p - 1;
        f = m / (N / p);
        k = m % (N / p);
        checks++;
        seen++;
        if (int'(d[j]) != dref[f][j*N + k]) begin
          failures++;
          if (failures < 10) $display("tick %0d level %0d: d=%0d expected %0d", tick, j, d[j], dref[f][j*N + k]);
        end
        if (j == L - 1) begin
          checks += 2;
          if (!a_valid) failures++;
          if (int'(a_top) != aref[f]) begin
            failures++;
            $display("frame %0d: a_top=%0d expected %0d", f, a_top, aref[f]);
          end
        end
      end
    end
    tick++;
    if (tick < FRAMES * N) in_data <= W'(x[tick]);
    else begin
      in_data  <= '0;
      in_valid <= 1'b0;
    end
  end

  initial begin
    for (int i = 0; i < FRAMES * N; i++) begin
      case ($urandom_range(0, 7))
        0: x[i] = -(1 << (W-1));
        1: x[i] = (1 << (W-1)) - 1;
        default: x[i] = $signed(W'($urandom));
      endcase
    end
    for (int f = 0; f < FRAMES; f++) begin
      int xf[];
      xf = new[N];
      for (int i = 0; i < N; i++) xf[i] = x[f*N + i];
      fwd_frame(xf, L, dref[f], aref[f]);
    end
    in_data = W'(x[0]);
    repeat (3) @(posedge clk);
    rst <= 0;
    ce <= 1;
    in_valid <= 1;
    repeat (FRAMES * N + 20) @(posedge clk);
    checks++;
    if (seen != FRAMES * (N - 1)) begin failures++; $display("coefficients seen %0d", seen); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

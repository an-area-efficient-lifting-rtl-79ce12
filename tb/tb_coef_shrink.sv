// tb_coef_shrink - random coefficients and per-band thresholds: the finest
// THR_LEVELS bands must come out soft-thresholded with their own threshold,
// the others unchanged.
module tb_coef_shrink;
  import tb_haar_pkg::*;
  localparam int L = 8, TL = 4, DW = 12, TW = 11;
  logic signed [DW-1:0] d_in [L];
  logic [TW-1:0] thr [TL];
  logic signed [DW-1:0] d_out [L];
  int checks = 0, failures = 0;
  int killed = 0;

  coef_shrink #(.LEVELS(L), .THR_LEVELS(TL), .DW(DW), .TW(TW)) dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 5000; it++) begin
      for (int j = 0; j < TL; j++) thr[j] = TW'($urandom_range(0, 300) + 50 * j);
      for (int j = 0; j < L; j++) d_in[j] = $signed(DW'($urandom_range(0, 1) ? $urandom : $urandom_range(0, 600) - 300));
      #1;
      for (int j = 0; j < L; j++) begin
        int e;
        e = (j < TL) ? soft_ref(int'(d_in[j]), int'(thr[j])) : int'(d_in[j]);
        checks++;
        if (int'(d_out[j]) != e) begin
          failures++;
          if (failures < 10) $display("band %0d: d=%0d out=%0d expected %0d", j, d_in[j], d_out[j], e);
        end
        if (j < TL && e == 0 && d_in[j] != 0) killed++;
      end
    end
    checks++;
    if (killed == 0) begin failures++; $display("no coefficient was cut to zero"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

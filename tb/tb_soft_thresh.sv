// tb_soft_thresh - compares the soft-threshold function with an integer
// model over all corners (most negative coefficient, zero, threshold 0 and
// full scale, |d| equal to the threshold) and many random pairs.
module tb_soft_thresh;
  import tb_haar_pkg::*;
  localparam int DW = 12, TW = 11;
  logic signed [DW-1:0] d;
  logic [TW-1:0] thr;
  logic signed [DW-1:0] y;
  int checks = 0, failures = 0;

  soft_thresh #(.DW(DW), .TW(TW)) dut (.*);

  task automatic check(int dv, int tv);
    d = DW'(dv);
    thr = TW'(tv);
    #1;
    checks++;
    if (int'(y) != soft_ref(int'(d), int'(thr))) begin
      failures++;
      if (failures < 10) $display("d=%0d thr=%0d y=%0d expected %0d", d, thr, y, soft_ref(int'(d), int'(thr)));
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int corners_d[] = '{-2048, -2047, -1, 0, 1, 2047, 100, -100, 5, -5};
    int corners_t[] = '{0, 1, 5, 100, 2047, 1023, 99, 101};
    foreach (corners_d[i]) foreach (corners_t[k]) check(corners_d[i], corners_t[k]);
    for (int i = 0; i < 20000; i++) begin
      if (i % 2 == 0) check($signed(DW'($urandom)), $urandom_range(0, 200));
      else check($signed(DW'($urandom)), $urandom_range(0, (1 << TW) - 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

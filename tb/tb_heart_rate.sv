// tb_heart_rate - random and corner R-R intervals (1, very short intervals
// that saturate the result, the full counter range) are divided into
// 60 * 360 and compared with integer division; the result must arrive exactly
// 16 cycles after start, and a start while busy must be ignored.
module tb_heart_rate;
  localparam int FS = 360, RR_W = 12, BPM_W = 8, LAT = 16;
  logic clk = 0, rst = 1, start = 0;
  logic [RR_W-1:0] rr = '0;
  logic [BPM_W-1:0] bpm;
  logic valid;
  int checks = 0, failures = 0;
  int n_sat = 0;

  heart_rate #(.FS(FS), .RR_W(RR_W), .BPM_W(BPM_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(int r, bit poke_busy);
    int e, waited;
    e = (60 * FS) / r;
    if (e > 255) begin e = 255; n_sat++; end
    @(negedge clk);
    start = 1; rr = RR_W'(r);
    @(negedge clk);
    start = 0;
    waited = 1;
    if (poke_busy) begin start = 1; rr = RR_W'(1); @(negedge clk); start = 0; waited++; end
    while (!valid && waited < 100) begin @(negedge clk); waited++; end
    checks += 2;
    if (waited != LAT) begin failures++; $display("rr=%0d: result after %0d cycles", r, waited); end
    if (int'(bpm) != e) begin failures++; $display("rr=%0d: bpm=%0d expected %0d", r, bpm, e); end
    @(negedge clk);
    checks++;
    if (valid) failures++;              // one-cycle valid, no second result
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    one(1, 0); one(2, 0); one(84, 0); one(85, 0); one(86, 0); one(100, 0);
    one(216, 0); one(300, 1); one(360, 0); one(4095, 0);
    for (int i = 0; i < 2000; i++) one($urandom_range(1, 4095), i % 7 == 0);
    checks++;
    if (n_sat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

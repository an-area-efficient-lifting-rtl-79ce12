// tb_lift_fwd_stage - random sample stream with random gaps and a clock
// enable every other cycle. Each output pair is compared with
// d = odd - even, a = even + floor(d/2), and must appear on the tick right
// after the odd sample was accepted.
module tb_lift_fwd_stage;
  import tb_haar_pkg::*;
  localparam int W = 11;
  logic clk = 0, rst = 1, ce = 0, in_valid = 0;
  logic signed [W-1:0] in_data = '0;
  logic out_valid;
  logic signed [W-1:0] out_a;
  logic signed [W:0] out_d;
  int checks = 0, failures = 0;
  int samples[$];
  int tick = 0, odd_tick = -10;
  int npairs = 0;

  lift_fwd_stage #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // checker: on every tick look at the registered outputs
  always @(posedge clk) if (!rst && ce) begin
    if (out_valid) begin
      int e, o, d;
      e = samples.pop_front();
      o = samples.pop_front();
      d = o - e;
      checks += 3;
      if (out_d != d) begin failures++; $display("d mismatch %0d vs %0d", out_d, d); end
      if (out_a != e + floor_half(d)) begin failures++; $display("a mismatch %0d vs %0d", out_a, e + floor_half(d)); end
      if (tick != odd_tick + 1) begin failures++; $display("pair late: tick %0d odd %0d", tick, odd_tick); end
      npairs++;
    end
    if (in_valid) begin
      samples.push_back(int'(in_data));
      if (samples.size() % 2 == 0) odd_tick = tick;
    end
    tick++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 4000; i++) begin
      @(posedge clk);
      ce <= (i % 2 == 1);
      if (i % 2 == 1) begin
        in_valid <= ($urandom_range(0, 3) != 0);
        case ($urandom_range(0, 5))
          0: in_data <= W'(-(1 << (W-1)));
          1: in_data <= W'((1 << (W-1)) - 1);
          default: in_data <= W'($urandom);
        endcase
      end
    end
    checks++;
    if (npairs < 500) begin failures++; $display("too few pairs %0d", npairs); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

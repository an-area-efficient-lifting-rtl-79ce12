// tb_lift_inv_stage - feeds (a, d) pairs made from random (even, odd) sample
// pairs with the forward lifting formulas, spaced 2*2^LVL ticks apart as in
// the real chain, and checks perfect reconstruction: even on the tick after
// the pair, odd exactly 2^LVL ticks later, and nothing in between.
module tb_lift_inv_stage;
  import tb_haar_pkg::*;
  localparam int RW = 13, DW = 12, LVL = 2;
  localparam int SP = 1 << LVL;
  logic clk = 0, rst = 1, ce = 0, in_valid = 0;
  logic signed [RW-1:0] in_a = '0;
  logic signed [DW-1:0] in_d = '0;
  logic out_valid;
  logic signed [RW-1:0] out_x;
  int checks = 0, failures = 0;
  int tick = 0;
  int exp_val[int];     // tick -> expected output
  int nout = 0;

  lift_inv_stage #(.RW(RW), .DW(DW), .LVL(LVL)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst && ce) begin
    checks++;
    if (exp_val.exists(tick)) begin
      if (!out_valid || int'(out_x) != exp_val[tick]) begin
        failures++;
        if (failures < 10) $display("tick %0d: valid=%0b x=%0d expected %0d", tick, out_valid, out_x, exp_val[tick]);
      end
      nout++;
    end else if (out_valid) begin
      failures++;
      if (failures < 10) $display("tick %0d: unexpected output", tick);
    end
    tick++;
  end

  initial begin
    int t_next;
    repeat (3) @(posedge clk);
    rst <= 0;
    t_next = 3;
    for (int cyc = 0; cyc < 3 * 2 * SP * 400; cyc++) begin
      @(posedge clk);
      ce <= (cyc % 3 == 0);
      if (cyc % 3 == 0) begin
        // 'tick' here is the index of the tick about to be presented
        if (tick == t_next && tick < 2 * SP * 350) begin
          int e, o, d;
          e = $signed(11'($urandom));
          o = $signed(11'($urandom));
          d = o - e;
          in_valid <= 1;
          in_a <= RW'(e + floor_half(d));
          in_d <= DW'(d);
          exp_val[tick + 1] = e;
          exp_val[tick + 1 + SP] = o;
          t_next = tick + 2 * SP;
        end else begin
          in_valid <= 0;
        end
      end
    end
    checks++;
    if (nout != 700) begin failures++; $display("outputs seen %0d", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

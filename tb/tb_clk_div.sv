// tb_clk_div - checks the sample-tick generator against a cycle model: one
// tick every DIV cycles while enb is high, none while enb is low or in reset,
// and the count resumes where it stopped after a pause.
module tb_clk_div;
  localparam int DIV = 5;
  logic clk = 0, rst = 1, enb = 0, ce;
  int checks = 0, failures = 0;
  int model_cnt = 0;
  logic model_ce = 0;
  int ticks = 0;

  clk_div #(.DIV(DIV)) dut (.clk(clk), .rst(rst), .enb(enb), .ce(ce));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // cycle model, updated on the same edge as the DUT
  always @(posedge clk) begin
    if (rst) begin
      model_cnt <= 0; model_ce <= 0;
    end else if (enb) begin
      if (model_cnt == DIV - 1) begin model_cnt <= 0; model_ce <= 1; end
      else begin model_cnt <= model_cnt + 1; model_ce <= 0; end
    end else model_ce <= 0;
  end

  always @(negedge clk) begin
    checks++;
    if (ce !== model_ce) begin
      failures++;
      if (failures < 10) $display("mismatch at %0t: ce=%0b model=%0b", $time, ce, model_ce);
    end
    if (ce) ticks++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (4) @(posedge clk);
    enb <= 1;
    repeat (10 * DIV) @(posedge clk);
    enb <= 0;                     // pause
    repeat (7) @(posedge clk);
    enb <= 1;
    repeat (10 * DIV + 3) @(posedge clk);
    rst <= 1;
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (5 * DIV) @(posedge clk);
    @(negedge clk);
    checks++;
    // 10 + 10 + 5 ticks, minus the partial periods around the pause/reset
    if (ticks < 24 || ticks > 26) begin
      failures++;
      $display("unexpected tick count %0d", ticks);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// clk_div - sample-rate enable generator ("clock divider") for the lifting
// wavelet denoiser.
//
// The whole datapath runs on the system clock and advances only on the cycles
// where this block raises `ce`, one per ECG sample. Every DIV system-clock
// cycles (while `enb` is high) `ce` is high for exactly one cycle, so all
// stages downstream are phase-locked to the same sample tick. A divided
// enable is used instead of a derived clock so that the design stays in a
// single clock domain.
//
// Interface: clk, rst (synchronous, active high), enb (engine enable: when low
// the counter holds and no ticks are produced), ce (one-cycle tick).
// Timing: after reset the first tick comes DIV cycles after enb is first seen
// high; with DIV = 1, ce equals enb.
//
// That a clock divider feeds timing signals to the processing stages follows
// the design's block diagram; the enable-style output and the default ratio
// are this implementation's choices.
module clk_div #(
  parameter int unsigned DIV = 4   // system clocks per ECG sample
) (
  input  logic clk,
  input  logic rst,
  input  logic enb,
  output logic ce
);
  localparam int unsigned CW = (DIV > 1) ? $clog2(DIV) : 1;

  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt <= '0;
      ce  <= 1'b0;
    end else if (enb) begin
      if (cnt == CW'(DIV - 1)) begin
        cnt <= '0;
        ce  <= 1'b1;
      end else begin
        cnt <= cnt + 1'b1;
        ce  <= 1'b0;
      end
    end else begin
      ce <= 1'b0;
    end
  end
endmodule

// lift_inv_stage - one level of the inverse lifting wavelet transform.
//
// The forward steps are undone in reverse order and the two halves merged:
//     even = a - (d >>> 1)       (undo update)
//     odd  = even + d            (undo predict)
// With unmodified coefficients this is an exact inverse of lift_fwd_stage.
//
// Rate: the stage receives one (a, d) pair every 2*2^LVL sample ticks and must
// hand its output on at twice that rate, one sample every 2^LVL ticks, so
// that the level below (or the output) sees an evenly spaced stream. The even
// sample is put out on the tick after the pair arrives; the odd sample is held
// and put out 2^LVL ticks later, counted on `ce`.
//
// Interface: registers advance only when `ce` is high. in_valid marks a tick
// carrying a pair. out_valid is high for every tick that carries an output
// sample in out_x. a and the output are RW bits; d is DW bits.
// Timing: pair at tick t -> even during tick t+1, odd during tick t+1+2^LVL.
// A new pair must not arrive while the odd sample is still held; with pairs
// spaced 2*2^LVL ticks apart that never happens (asserted).
//
// The undo-update / undo-predict / merge order follows the design's
// description; the Haar steps and the output pacing are this
// implementation's.
module lift_inv_stage #(
  parameter int unsigned RW  = 13,
  parameter int unsigned DW  = 12,
  parameter int unsigned LVL = 0
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 ce,
  input  logic                 in_valid,
  input  logic signed [RW-1:0] in_a,
  input  logic signed [DW-1:0] in_d,
  output logic                 out_valid,
  output logic signed [RW-1:0] out_x
);
  localparam int unsigned SPACING = 1 << LVL;
  localparam int unsigned CW      = $clog2(SPACING + 1);

  logic signed [RW-1:0] even_c;
  logic signed [RW-1:0] odd_c;
  logic signed [RW-1:0] odd_q;
  logic                 pending;
  logic [CW-1:0]        cnt;

  always_comb begin
    even_c = in_a - RW'(in_d >>> 1);
    odd_c  = even_c + RW'(in_d);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      out_x     <= '0;
      odd_q     <= '0;
      pending   <= 1'b0;
      cnt       <= '0;
    end else if (ce) begin
      out_valid <= 1'b0;
      if (in_valid) begin
        out_x     <= even_c;
        out_valid <= 1'b1;
        odd_q     <= odd_c;
        pending   <= 1'b1;
        cnt       <= CW'(SPACING);
      end else if (pending) begin
        if (cnt == CW'(1)) begin
          out_x     <= odd_q;
          out_valid <= 1'b1;
          pending   <= 1'b0;
        end else begin
          cnt <= cnt - 1'b1;
        end
      end
    end
  end

  // A pair must not overwrite an odd sample that has not been put out yet.
  a_no_overrun: assert property (@(posedge clk) disable iff (rst)
    (ce && in_valid) |-> !pending)
    else $error("lift_inv_stage L%0d: pair arrived before odd sample left", LVL);
endmodule

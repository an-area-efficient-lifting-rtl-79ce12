// lift_fwd_stage - one level of the forward lifting wavelet transform.
//
// The incoming approximation stream is split into even and odd samples (lazy
// wavelet). The odd sample is predicted from the even one and the prediction
// error becomes the detail coefficient; the detail then updates the even
// sample into the next approximation:
//     d = odd - even
//     a = even + (d >>> 1)          ( = floor((even + odd) / 2) )
// This is the integer Haar lifting pair: the only constant, 1/2, is an
// arithmetic shift, so the stage has no multiplier. Because `a` is the floor of
// a mean it stays within the input range (W bits); `d` needs W+1 bits.
//
// Interface: all registers advance only when `ce` (sample tick) is high.
// in_valid marks a tick carrying an input sample. out_valid is high for the
// one tick after each odd input, holding out_a / out_d.
// Timing: a pair (even at tick t, odd at tick t+k) is presented on the output
// during tick t+k+1.
//
// Split / predict / update follow the design's description of its lifting
// stages; the choice of the Haar predictor and update (the shortest ones that
// need no multiplier) is this implementation's.
module lift_fwd_stage #(
  parameter int unsigned W = 11
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                ce,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_data,
  output logic                out_valid,
  output logic signed [W-1:0] out_a,
  output logic signed [W:0]   out_d
);
  logic                have_even;
  logic signed [W-1:0] even_q;
  logic signed [W:0]   d_c;
  logic signed [W-1:0] a_c;

  always_comb begin
    d_c = in_data - even_q;              // evaluated at W+1 bits, signed
    a_c = W'(even_q + (d_c >>> 1));      // floor of the pair's mean: fits W bits
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      have_even <= 1'b0;
      even_q    <= '0;
      out_valid <= 1'b0;
      out_a     <= '0;
      out_d     <= '0;
    end else if (ce) begin
      out_valid <= 1'b0;
      if (in_valid) begin
        if (!have_even) begin
          even_q    <= in_data;
          have_even <= 1'b1;
        end else begin
          out_d     <= d_c;
          out_a     <= a_c;
          out_valid <= 1'b1;
          have_even <= 1'b0;
        end
      end
    end
  end
endmodule

// heart_rate - beats per minute from an R-R interval.
//
//     bpm = floor(60 * FS / rr)       saturated to BPM_W bits
//
// with FS the sample rate and rr the interval in samples. The quotient is
// formed by restoring division, one quotient bit per clock from the MSB: the
// partial remainder takes in the next dividend bit, the divisor is
// subtracted, and the sign of the difference decides the bit and whether the
// difference is kept. No multiplier or comparator is needed, and the dividend
// is a constant.
//
// Interface: start (one cycle) with rr begins a division; bpm and valid (one
// cycle) follow NW + 1 cycles later, where NW is the width of 60 * FS (15 for
// FS = 360). A start while busy is ignored. rr must not be 0.
//
// Heart-rate estimation from the detected R peaks follows the design's
// description; the divider, FS = 360 samples/s and the 8-bit result are this
// implementation's choices.
module heart_rate #(
  parameter int unsigned FS    = 360,  // samples per second
  parameter int unsigned RR_W  = 12,
  parameter int unsigned BPM_W = 8
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             start,
  input  logic [RR_W-1:0]  rr,
  output logic [BPM_W-1:0] bpm,
  output logic             valid
);
  localparam int unsigned NUM = 60 * FS;
  localparam int unsigned NW  = $clog2(NUM + 1);
  localparam int unsigned BW  = $clog2(NW + 1);
  localparam logic [NW-1:0] DIVIDEND = NW'(NUM);

  logic            busy;
  logic [BW-1:0]   bit_idx;
  logic [RR_W-1:0] divisor;
  logic [RR_W-1:0] rem;                 // always below the divisor
  logic [NW-1:0]   quot;
  logic [RR_W+1:0] trial;
  logic [RR_W:0]   shifted;

  always_comb begin
    shifted = {rem, DIVIDEND[bit_idx]};
    trial   = {1'b0, shifted} - {2'b00, divisor};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy    <= 1'b0;
      bit_idx <= '0;
      divisor <= '0;
      rem     <= '0;
      quot    <= '0;
      bpm     <= '0;
      valid   <= 1'b0;
    end else begin
      valid <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy    <= 1'b1;
          bit_idx <= BW'(NW - 1);
          divisor <= rr;
          rem     <= '0;
          quot    <= '0;
        end
      end else begin
        if (trial[RR_W+1]) begin            // negative: bit is 0
          rem <= shifted[RR_W-1:0];       // shifted < divisor here
        end else begin
          rem           <= trial[RR_W-1:0];
          quot[bit_idx] <= 1'b1;
        end
        if (bit_idx == '0) begin
          busy  <= 1'b0;
          valid <= 1'b1;
          if (trial[RR_W+1]) bpm <= sat_bpm(quot);
          else               bpm <= sat_bpm(quot | NW'(1));
        end else begin
          bit_idx <= bit_idx - 1'b1;
        end
      end
    end
  end

  function automatic logic [BPM_W-1:0] sat_bpm(input logic [NW-1:0] q);
    return (|(q >> BPM_W)) ? '1 : BPM_W'(q);
  endfunction
endmodule

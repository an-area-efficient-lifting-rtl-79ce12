// mad_thresh - universal-threshold estimator for one detail band.
//
// For every frame of NCOEF coefficients of its band the block finds the
// median m of |d| and turns it into the universal threshold
//     thr = sigma * sqrt(2 ln 256),  sigma = m / 0.6745,
// i.e. thr = 4.937 * m. The constant is applied in canonical signed digit
// form, 4.9375 = 2^2 + 2^0 - 2^-4, as two shifts, one add and one subtract:
//     thr = (m << 2) + m - (m >> 4)      (m >> 4 rounds down)
// and the result is saturated to TW bits.
//
// Median without magnitude comparators: the magnitudes of a frame are stored
// in one half of a two-bank buffer while the other half, holding the previous
// frame, is searched bit by bit from the MSB (radix selection). For each bit
// the buffer is scanned once and the values that agree with the bits chosen
// so far and have a 0 in this bit are counted (an equality test on the upper
// bits). If the wanted rank lies below that count the median has a 0 here,
// otherwise a 1 and the rank drops by the count. Only equality tests and a
// subtraction's sign are used. The rank is NCOEF/2 - 1, the lower of the two
// middle values.
//
// Interface: coefficients are written on ce && d_valid (sample-tick domain);
// the search runs on every system clock and takes DW * NCOEF + 1 cycles, which
// must be shorter than the frame (asserted). thr is the threshold applied to
// the current frame; it changes only at a frame boundary of this band.
// Timing: a frame's estimate is ready during the next frame and applied from
// the frame after that (two frames of lag). thr is 0 until then.
//
// The universal threshold, the median of the detail magnitudes, the absence
// of comparators and the CSD constant follow the design's description; the
// radix-selection search, the frame of 2^LEVELS samples, the lower median
// and the two-frame lag are this implementation's choices.
module mad_thresh #(
  parameter int unsigned DW    = 12,   // coefficient width
  parameter int unsigned TW    = 11,   // threshold width
  parameter int unsigned NCOEF = 128   // coefficients of this band per frame
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 ce,
  input  logic                 d_valid,
  input  logic signed [DW-1:0] d,
  output logic [TW-1:0]        thr,
  output logic [DW-1:0]        median
);
  localparam int unsigned IW = (NCOEF > 1) ? $clog2(NCOEF) : 1;
  localparam int unsigned BW = $clog2(DW);
  localparam int unsigned KW = IW + 1;              // rank / count width
  localparam int unsigned XW = DW + 3;              // 4.9375 * m < 2^(DW+3)

  logic [DW-1:0] mem [2 * NCOEF];

  // write side (sample-tick domain)
  logic [IW-1:0] wr_idx;
  logic          wr_bank;
  logic          frame_done;                        // one-cycle pulse
  logic [DW-1:0] mag;

  // search side (system clock)
  logic          busy;
  logic          rd_bank;
  logic [IW-1:0] rd_idx;
  logic [BW-1:0] bit_idx;
  logic [DW-1:0] prefix;
  logic [KW-1:0] rank;
  logic [KW-1:0] cnt;
  logic [DW-1:0] rd_val;
  logic          match0;
  logic [KW-1:0] cnt_next;
  logic [KW:0]   rank_minus;
  logic [TW-1:0] est_thr;
  logic [XW-1:0] csd;

  assign mag    = d[DW-1] ? DW'(-d) : DW'(d);
  assign rd_val = mem[{rd_bank, rd_idx}];

  always_comb begin
    // value agrees with the chosen upper bits and has 0 in bit bit_idx
    match0     = ((rd_val >> bit_idx) == (prefix >> bit_idx));
    cnt_next   = cnt + KW'(match0);
    rank_minus = {1'b0, rank} - {1'b0, cnt_next};  // sign set: rank < count
    csd        = (XW'(prefix) << 2) + XW'(prefix) - (XW'(prefix) >> 4);
  end

  always_ff @(posedge clk) begin
    if (ce && d_valid) begin
      mem[{wr_bank, wr_idx}] <= mag;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_idx     <= '0;
      wr_bank    <= 1'b0;
      frame_done <= 1'b0;
      thr        <= '0;
      est_thr    <= '0;
      median     <= '0;
      busy       <= 1'b0;
      rd_bank    <= 1'b0;
      rd_idx     <= '0;
      bit_idx    <= '0;
      prefix     <= '0;
      rank       <= '0;
      cnt        <= '0;
    end else begin
      frame_done <= 1'b0;
      if (ce && d_valid) begin
        if (wr_idx == IW'(NCOEF - 1)) begin
          wr_idx     <= '0;
          wr_bank    <= ~wr_bank;
          frame_done <= 1'b1;
          thr        <= est_thr;          // estimate of the frame before
        end else begin
          wr_idx <= wr_idx + 1'b1;
        end
      end

      if (frame_done) begin
        busy    <= 1'b1;
        rd_bank <= ~wr_bank;              // the bank just filled
        rd_idx  <= '0;
        bit_idx <= BW'(DW - 1);
        prefix  <= '0;
        rank    <= KW'(NCOEF / 2 - 1);
        cnt     <= '0;
      end else if (busy) begin
        if (rd_idx == IW'(NCOEF - 1)) begin
          rd_idx <= '0;
          cnt    <= '0;
          if (!rank_minus[KW]) begin      // rank >= count: this bit is 1
            prefix[bit_idx] <= 1'b1;
            rank            <= rank_minus[KW-1:0];
          end
          if (bit_idx == '0) begin
            busy <= 1'b0;
          end else begin
            bit_idx <= bit_idx - 1'b1;
          end
        end else begin
          rd_idx <= rd_idx + 1'b1;
          cnt    <= cnt_next;
        end
      end else begin
        median  <= prefix;
        est_thr <= (|csd[XW-1:TW]) ? '1 : TW'(csd);   // saturate to TW bits
      end
    end
  end

  a_search_in_time: assert property (@(posedge clk) disable iff (rst)
    frame_done |-> !busy)
    else $error("mad_thresh: frame finished before the previous search");
endmodule

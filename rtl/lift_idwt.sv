// lift_idwt - multi-level inverse lifting wavelet transform (reconstruction).
//
// LEVELS copies of lift_inv_stage are chained from the coarsest level down:
// stage LEVELS-1 combines the top approximation with the coarsest detail
// band, and each stage j below combines the approximation stream rebuilt by
// stage j+1 with detail band j. Stage 0 puts out the reconstructed signal at
// the full sample rate, one sample per tick with no gaps.
//
// Alignment: detail band j is produced by the forward transform long before
// the approximation it belongs to has been rebuilt (the coarsest level only
// completes after 2^LEVELS samples). Each band j < LEVELS-1 is therefore
// held in a coef_fifo and popped when stage j receives its approximation
// sample. Band LEVELS-1 arrives together with the top approximation and is
// used directly. The buffer of band j holds about 2^(LEVELS-j-1) coefficients.
//
// Interface: registers advance on `ce`. d_valid[j]/d[j] are the (possibly
// thresholded) detail bands, a_valid/a_top the top approximation, both exactly
// as lift_dwt times them. x_valid/x is the reconstructed stream (RW bits).
// Timing: if the top level's pair is presented during tick t, reconstructed
// samples follow during ticks t+LEVELS, t+LEVELS+1, ...; fed by lift_dwt
// this makes sample n come out during tick n + 2^LEVELS + 2*LEVELS - 1.
//
// Reconstruction by the inverse lifting stages follows the design; the
// buffering scheme is this implementation's.
module lift_idwt #(
  parameter int unsigned LEVELS = 8,
  parameter int unsigned DW     = 12,
  parameter int unsigned RW     = 13
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 ce,
  input  logic                 d_valid [LEVELS],
  input  logic signed [DW-1:0] d       [LEVELS],
  input  logic                 a_valid,
  input  logic signed [RW-1:0] a_top,
  output logic                 x_valid,
  output logic signed [RW-1:0] x
);
  // Coefficients of band j that are waiting: 2^(LEVELS-j-1) from the frame
  // delay, plus those made during the 2*LEVELS ticks of pipeline, plus margin.
  function automatic int unsigned band_depth(input int unsigned j);
    return (1 << (LEVELS - j - 1)) + ((2 * LEVELS) >> (j + 1)) + 2;
  endfunction

  logic                 rec_valid [LEVELS+1];
  logic signed [RW-1:0] rec       [LEVELS+1];
  logic signed [DW-1:0] d_aligned [LEVELS];

  assign rec_valid[LEVELS] = a_valid;
  assign rec[LEVELS]       = a_top;

  for (genvar j = 0; j < LEVELS; j++) begin : g_level
    if (j == LEVELS - 1) begin : g_direct
      assign d_aligned[j] = d[j];
    end else begin : g_buf
      logic [DW-1:0] rdata;
      coef_fifo #(.W(DW), .DEPTH(band_depth(j))) u_fifo (
        .clk   (clk),
        .rst   (rst),
        .ce    (ce),
        .push  (d_valid[j]),
        .wdata (d[j]),
        .pop   (rec_valid[j+1]),
        .rdata (rdata),
        .empty ()
      );
      assign d_aligned[j] = rdata;
    end

    lift_inv_stage #(.RW(RW), .DW(DW), .LVL(j)) u_stage (
      .clk       (clk),
      .rst       (rst),
      .ce        (ce),
      .in_valid  (rec_valid[j+1]),
      .in_a      (rec[j+1]),
      .in_d      (d_aligned[j]),
      .out_valid (rec_valid[j]),
      .out_x     (rec[j])
    );
  end

  assign x_valid = rec_valid[0];
  assign x       = rec[0];
endmodule

// coef_fifo - first-word-fall-through buffer for one band of detail
// coefficients.
//
// The inverse transform needs each detail coefficient only when the matching
// approximation has come back up from the coarser levels, roughly 2^LEVELS
// samples after the forward transform produced it. This buffer holds the
// coefficients of one band in arrival order until then. It is a plain
// circular array with read and write pointers and an occupancy count.
//
// Interface: registers advance only when `ce` is high. push writes wdata;
// pop discards the head, which is always visible on rdata while empty is low.
// Push and pop in the same tick are allowed. Overflow and popping when empty
// are design errors and are asserted against.
// Timing: a word pushed in tick t can be popped from tick t+1 on.
//
// The buffer is this implementation's means of aligning the bands; the
// design does not describe how detail and approximation are brought back
// together in time.
module coef_fifo #(
  parameter int unsigned W     = 12,
  parameter int unsigned DEPTH = 4
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         ce,
  input  logic         push,
  input  logic [W-1:0] wdata,
  input  logic         pop,
  output logic [W-1:0] rdata,
  output logic         empty
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned NW = $clog2(DEPTH + 1);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wr_ptr;
  logic [AW-1:0] rd_ptr;
  logic [NW-1:0] count;

  function automatic logic [AW-1:0] next_ptr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  assign rdata = mem[rd_ptr];
  assign empty = (count == '0);

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else if (ce) begin
      if (push) begin
        wr_ptr <= next_ptr(wr_ptr);
      end
      if (pop) begin
        rd_ptr <= next_ptr(rd_ptr);
      end
      count <= count + NW'(push) - NW'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (ce && push) begin
      mem[wr_ptr] <= wdata;
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (rst)
    (ce && push && !pop) |-> (count != NW'(DEPTH)))
    else $error("coef_fifo: overflow");
  a_no_underflow: assert property (@(posedge clk) disable iff (rst)
    (ce && pop) |-> !empty)
    else $error("coef_fifo: pop while empty");
endmodule

// dc_accum: the k = 0 bin of the recursive DCT.
//
// The DC coefficient needs no resonator: it is the plain sum of the N
// samples of a block. One adder and one register accumulate the samples;
// with first high the register is ignored so that blocks follow each other
// without a gap. The result is returned in the common bin format (SW bits,
// FRAC fractional bits) so that the output register bank can treat all bins
// alike.
//
// Timing: a sample is taken on each clock with en high; y is combinational
// and holds the finished sum in the cycle that carries sample N-1. The use of
// a plain accumulator follows the published architecture; widths, reset and
// start-of-block handling are this design's choices.
module dc_accum
  import dct_pkg::*;
#(
  parameter int N    = 8,
  parameter int IN_W = 10,
  parameter int FRAC = 16,
  parameter int SW   = state_w(IN_W, N, FRAC)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   en,
  input  logic                   first,
  input  logic signed [IN_W-1:0] x,
  output logic signed [SW-1:0]   y
);

  localparam int AW = IN_W + $clog2(N) + 1;

  logic signed [AW-1:0] acc_q, sum;

  assign sum = (first ? AW'(0) : acc_q) + AW'(x);
  assign y   = SW'(sum) <<< FRAC;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  acc_q <= '0;
    else if (en) acc_q <= sum;
  end

endmodule

// rm_type_a: Type A Goertzel recursive module (bins near DC).
//
// Computes y = sum_{n=0}^{N-1} x(n) cos((2n+1)k*pi/2N) / cos(k*pi/2N) over a
// block of N samples, one sample per clock. The loop is the Type A form of
// the 2nd-order Goertzel resonator 1 - 2cos(theta)z^-1 + z^-2, theta = k*pi/N,
// rewritten with 2cos(theta) = 2 - 2*alpha_k so that the only multiplier
// carries the small constant alpha_k = 1 - cos(theta):
//   d(n) = (-1)^k x(n) + d(n-1) - 2*alpha_k*v(n-1)    (input adder)
//   v(n) = v(n-1) + d(n)                              (second adder)
// d(n) equals v(n) - v(n-1), the module output, so Type A needs no output
// adder. The (-1)^k input sign is an adder turned into a subtractor for odd k.
// Two registers hold d(n) - 2*alpha_k*v(n) (the delayed feedback) and v(n).
//
// Timing: a sample is taken on each clock with en high. With first high the
// stored state is ignored, so blocks can follow each other without a gap.
// y is combinational and is the finished bin result in the cycle that
// carries sample N-1. The structure follows the published Type A filter;
// the word widths and the start-of-block handling are this design's choices.
module rm_type_a
  import dct_pkg::*;
#(
  parameter int       N         = 8,
  parameter int       K         = 1,
  parameter int       IN_W      = 10,
  parameter int       FRAC      = 16,
  parameter int       COEF_FRAC = 24,
  parameter bit       USE_MB    = 1'b1,
  parameter int       SW        = state_w(IN_W, N, FRAC)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,      // x is a valid sample
  input  logic                 first,   // x is sample 0 of a block: loop starts from zero
  input  logic signed [IN_W-1:0] x,
  output logic signed [SW-1:0]   y      // bin result including the current sample
);

  logic signed [SW-1:0] fb_q, vp_q;     // z^-1 registers
  logic signed [SW-1:0] xin, fb, vp, d, v, m;

  assign xin = SW'(x) <<< FRAC;
  assign fb  = first ? '0 : fb_q;
  assign vp  = first ? '0 : vp_q;
  assign d   = (K % 2 == 1) ? fb - xin : fb + xin;
  assign v   = vp + d;
  assign y   = d;

  loop_mult #(.N(N), .K(K), .TYPE(RM_A), .W(SW), .COEF_FRAC(COEF_FRAC), .USE_MB(USE_MB))
    u_mult (.x(v), .y(m));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fb_q <= '0;
      vp_q <= '0;
    end else if (en) begin
      fb_q <= d - (m <<< 1);
      vp_q <= v;
    end
  end

endmodule

// rm_type_b: Type B Goertzel recursive module (middle bins).
//
// Computes y = sum_{n=0}^{N-1} x(n) cos((2n+1)k*pi/2N) / cos(k*pi/2N) over a
// block of N samples, one sample per clock, with the conventional Goertzel
// form of the DCT resonator (theta = k*pi/N):
//   v(n) = (-1)^k x(n) + 2*beta_k*v(n-1) - v(n-2),  beta_k = cos(theta)
//   y(n) = v(n) - v(n-1)                            (output adder)
// One register holds v(n-1); the other holds the delayed feedback
// 2*beta_k*v(n) - v(n-1). The (-1)^k input sign is an adder turned into a
// subtractor for odd k.
//
// Timing: a sample is taken on each clock with en high. With first high the
// stored state is ignored, so blocks can follow each other without a gap.
// y is combinational and is the finished bin result in the cycle that
// carries sample N-1. The structure follows the published Type B filter;
// the word widths and the start-of-block handling are this design's choices.
module rm_type_b
  import dct_pkg::*;
#(
  parameter int       N         = 8,
  parameter int       K         = 3,
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
  logic signed [SW-1:0] xin, fb, vp, v, m;

  assign xin = SW'(x) <<< FRAC;
  assign fb  = first ? '0 : fb_q;
  assign vp  = first ? '0 : vp_q;
  assign v   = (K % 2 == 1) ? fb - xin : fb + xin;
  assign y   = v - vp;

  loop_mult #(.N(N), .K(K), .TYPE(RM_B), .W(SW), .COEF_FRAC(COEF_FRAC), .USE_MB(USE_MB))
    u_mult (.x(v), .y(m));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fb_q <= '0;
      vp_q <= '0;
    end else if (en) begin
      fb_q <= (m <<< 1) - vp;
      vp_q <= v;
    end
  end

endmodule

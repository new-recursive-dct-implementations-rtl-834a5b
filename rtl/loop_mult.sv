// loop_mult: the constant multiplier inside one recursive module.
//
// Returns y = floor(x * c), where c is the un-doubled loop constant of the
// module (alpha_k, beta_k or gamma_k, selected by TYPE, K and N); the factor
// 2 of the loop is a shift applied by the caller. x and y share one signed
// fixed-point format.
//
// Where a multiplier-block realisation exists (N = 8, bins 1, 2, 3, 5, 6, 7,
// with USE_MB set) it instantiates mult_block. Otherwise the multiplier is
// hard-wired: c is rounded to COEF_FRAC fractional bits at elaboration time
// and written as a product with a constant, so synthesis keeps only the
// partial products of its set bits. A constant of zero (Type B at k = N/2)
// leaves no multiplier at all.
//
// Combinational. COEF_FRAC = 24 is this design's choice; the published word
// lengths of the loop constants for N = 8 to 64 stay below 27 bits.
module loop_mult
  import dct_pkg::*;
#(
  parameter int       N         = 8,
  parameter int       K         = 1,
  parameter rm_type_e TYPE      = RM_A,
  parameter int       W         = 34,
  parameter int       COEF_FRAC = 24,
  parameter bit       USE_MB    = 1'b1
) (
  input  logic signed [W-1:0] x,
  output logic signed [W-1:0] y
);

  localparam mb_sel_e MB  = USE_MB ? mb_select(TYPE, K, N) : MB_NONE;
  localparam bit      NEG = (TYPE == RM_B) && (K == 5);
  localparam int      CW  = COEF_FRAC + 3;
  localparam logic signed [CW-1:0] CQ = CW'(loop_coef_q(TYPE, K, N, COEF_FRAC));

  generate
    if (MB != MB_NONE) begin : g_mb
      mult_block #(.W(W), .SEL(MB), .NEG(NEG)) u_mb (.x(x), .y(y));
    end else begin : g_hw
      logic signed [W+CW-1:0] p;
      assign p = (W+CW)'(x) * (W+CW)'(CQ);
      assign y = W'(p >>> COEF_FRAC);
    end
  endgenerate

endmodule

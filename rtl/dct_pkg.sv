// dct_pkg: shared types and elaboration-time constants of the recursive
// Goertzel DCT.
//
// The N-point DCT-II is computed with one 2nd-order recursive module (RM) per
// frequency bin k = 1..N-1 plus a plain accumulator for k = 0. Three loop
// structures are used: Type A near DC, Type B in the middle and Type C near
// Nyquist. The first floor(N/3) bins after DC are Type A, the last floor(N/3)
// bins are Type C and the rest are Type B. Their loop constants are
//   Type A: alpha_k = 1 - cos(k*pi/N)    (the loop uses -2*alpha_k)
//   Type B: beta_k  =     cos(k*pi/N)    (the loop uses  2*beta_k)
//   Type C: gamma_k = 1 + cos(k*pi/N)    (the loop uses  2*gamma_k)
// The factor 2 is a wired shift, so every coefficient handled here is the
// un-doubled value. All values are computed at elaboration time, so nothing in
// this package costs hardware.
//
// Fixed-point convention: every bin result and every loop state is a signed
// two's-complement number with FRAC fractional bits and state_w() bits in
// all. The integer part allows for the largest gain of a recursive module
// over N samples of full-scale input (see state_w()).
//
// The DCT normalisation (orthonormal DCT-II) and the word widths are this
// design's own choices; the bin-to-type rule and the coefficient formulas
// follow the published architecture.
package dct_pkg;

  localparam real PI = 3.14159265358979323846;

  typedef enum logic [1:0] {
    RM_ACC = 2'd0,   // k = 0: sum of the N inputs, no recursion
    RM_A   = 2'd1,
    RM_B   = 2'd2,
    RM_C   = 2'd3
  } rm_type_e;

  // Multiplier-block realisations available for N = 8 (see mult_block).
  typedef enum logic [1:0] {
    MB_NONE   = 2'd0,
    MB_ALPHA1 = 2'd1,   // alpha_1 = gamma_7
    MB_ALPHA2 = 2'd2,   // alpha_2 = gamma_6
    MB_BETA3  = 2'd3    // beta_3  = -beta_5
  } mb_sel_e;

  // Structure used for bin k of an N-point transform.
  function automatic rm_type_e rm_type(int k, int n);
    int third;
    third = n / 3;
    if (k == 0)               return RM_ACC;
    else if (k <= third)      return RM_A;
    else if (k >= n - third)  return RM_C;
    else                      return RM_B;
  endfunction

  // Un-doubled loop constant of a structure of type t at bin k.
  function automatic real loop_coef(rm_type_e t, int k, int n);
    real c;
    c = $cos(PI * real'(k) / real'(n));
    case (t)
      RM_A:    return 1.0 - c;
      RM_C:    return 1.0 + c;
      default: return c;
    endcase
  endfunction

  // Loop constant rounded to cf fractional bits.
  function automatic longint loop_coef_q(rm_type_e t, int k, int n, int cf);
    return longint'($floor(loop_coef(t, k, n) * (2.0 ** cf) + 0.5));
  endfunction

  // Output scale of bin k: the recursive module for bin k returns
  // sum_n x(n) cos((2n+1)k*pi/2N) / cos(k*pi/2N); multiplying by this value
  // gives the orthonormal DCT-II coefficient X(k).
  function automatic real scale_coef(int k, int n);
    if (k == 0) return $sqrt(1.0 / real'(n));
    return $sqrt(2.0 / real'(n)) * $cos(PI * real'(k) / (2.0 * real'(n)));
  endfunction

  function automatic longint scale_coef_q(int k, int n, int sf);
    return longint'($floor(scale_coef(k, n) * (2.0 ** sf) + 0.5));
  endfunction

  // Multiplier block to use for a structure, or MB_NONE for a hard-wired
  // constant multiplier. Only N = 8 has published multiplier-block forms.
  function automatic mb_sel_e mb_select(rm_type_e t, int k, int n);
    if (n != 8) return MB_NONE;
    if (t == RM_A && k == 1) return MB_ALPHA1;
    if (t == RM_A && k == 2) return MB_ALPHA2;
    if (t == RM_C && k == 7) return MB_ALPHA1;
    if (t == RM_C && k == 6) return MB_ALPHA2;
    if (t == RM_B && (k == 3 || k == 5)) return MB_BETA3;
    return MB_NONE;
  endfunction

  // Total width of loop states and bin results. A recursive module's state
  // v(n) can reach max|x| * N / sin(pi/N) < max|x| * N^2, and its output
  // max|x| * N / cos((N-1)pi/2N) < max|x| * N^2 as well, so the integer part
  // needs in_w + 2*log2(N) bits plus one for the sums formed inside the loop.
  function automatic int state_w(int in_w, int n, int frac);
    return in_w + 2 * $clog2(n) + 2 + frac;
  endfunction

endpackage

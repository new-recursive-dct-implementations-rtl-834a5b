// mult_block: multiplier-less loop multiplier for the 8-point transform.
//
// Multiplies a signed fixed-point value by one of three constants using a
// cascade of shifts, adders and subtractors instead of a multiplier. The
// factorisations are the published N = 8 multiplier-block realisations:
//   MB_ALPHA1: 2^-4 * ((1 - 2^-5)(1 - 2^-10) + 2^-2 + 2^-13)  = alpha_1 = gamma_7
//   MB_ALPHA2: 2^-2 * ((1 + 2^-2)(1 - 2^-4 - 2^-12) + 2^-18)  = alpha_2 = gamma_6
//   MB_BETA3 : 2^-2 * (1 + (2^-1 + 2^-5)(1 - 2^-10) + 2^-19)  = beta_3  = -beta_5
// Each bracketed product is built as a cascade: the first factor is formed
// once and the second factor is then applied to that partial result, which
// is what saves adders against a plain sum of shifted inputs.
//
// To keep the cascade exact the input is first extended with G guard bits
// (enough for the deepest shift, 2^-21), and the result is truncated
// (rounded toward minus infinity) once, at the output. y therefore equals
// floor(x * c) for the exact dyadic constant c, in the same fixed-point
// format as x. NEG negates the constant (beta_5 = -beta_3).
//
// Purely combinational; no clock. The guard-bit width and the truncation at
// the output are this design's choices.
module mult_block
  import dct_pkg::*;
#(
  parameter int      W   = 34,
  parameter mb_sel_e SEL = MB_ALPHA1,
  parameter bit      NEG = 1'b0
) (
  input  logic signed [W-1:0] x,
  output logic signed [W-1:0] y
);

  localparam int G  = 24;      // guard bits: exact down to 2^-24
  localparam int WE = W + G + 2;

  logic signed [WE-1:0] xe, t1, t2, t3, r, rn;

  always_comb begin
    xe = WE'(x) <<< G;
    unique case (SEL)
      MB_ALPHA1: begin
        t1 = xe - (xe >>> 5);                    // (1 - 2^-5)
        t2 = t1 - (t1 >>> 10);                   // * (1 - 2^-10)
        t3 = t2 + (xe >>> 2) + (xe >>> 13);      // + 2^-2 + 2^-13
        r  = t3 >>> 4;                           // * 2^-4
      end
      MB_ALPHA2: begin
        t1 = xe + (xe >>> 2);                    // (1 + 2^-2)
        t2 = t1 - (t1 >>> 4) - (t1 >>> 12);      // * (1 - 2^-4 - 2^-12)
        t3 = t2 + (xe >>> 18);                   // + 2^-18
        r  = t3 >>> 2;                           // * 2^-2
      end
      MB_BETA3: begin
        t1 = (xe >>> 1) + (xe >>> 5);            // (2^-1 + 2^-5)
        t2 = t1 - (t1 >>> 10);                   // * (1 - 2^-10)
        t3 = xe + t2 + (xe >>> 19);              // 1 + ... + 2^-19
        r  = t3 >>> 2;                           // * 2^-2
      end
      default: begin
        t1 = '0;
        t2 = '0;
        t3 = '0;
        r  = '0;
      end
    endcase
    rn = NEG ? -r : r;
    y  = W'(rn >>> G);
  end

endmodule

// scale_rom: the scale-coefficient ROM of the recursive DCT (N words).
//
// Word k holds the factor that turns recursive-module output k into the
// orthonormal DCT-II coefficient X(k):
//   k = 0:  sqrt(1/N)
//   k > 0:  sqrt(2/N) * cos(k*pi/2N)
// (the cos term undoes the 1/cos(k*pi/2N) gain of the Goertzel resonators).
// Words are unsigned values below 1, rounded to SF fractional bits and
// returned as SF+1-bit signed numbers. The table is computed at elaboration
// time and read combinationally. The ROM with one word per bin follows the
// published block diagram; the normalisation and word width are this
// design's choices.
module scale_rom
  import dct_pkg::*;
#(
  parameter int N  = 8,
  parameter int SF = 24,
  parameter int AW = $clog2(N)
) (
  input  logic [AW-1:0]      addr,
  output logic signed [SF:0] coef
);

  typedef logic signed [SF:0] rom_t [N];

  function automatic rom_t rom_table();
    rom_t t;
    for (int k = 0; k < N; k++) t[k] = (SF+1)'(scale_coef_q(k, N, SF));
    return t;
  endfunction

  localparam rom_t ROM = rom_table();

  assign coef = (int'(addr) < N) ? ROM[addr] : '0;

endmodule

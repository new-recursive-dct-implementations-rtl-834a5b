// tb_scale_rom: self-checking test of the scale-coefficient ROM.
//
// For N = 8 and N = 16 reads every word and checks it against the factor
// that turns the resonator output sum x(n)cos((2n+1)k*pi/2N) / cos(k*pi/2N)
// into the orthonormal DCT-II coefficient: c(k) * cos(k*pi/2N), with
// c(0) = 1/sqrt(N) and c(k) = sqrt(2/N). The word must be within half an
// LSB (2^-25) of that value. Out-of-range addresses (none exist for a power
// of two N) are not exercised.
module tb_scale_rom;
  localparam int SF = 24;
  localparam real PI = 3.14159265358979323846;

  logic [2:0] a8;
  logic [3:0] a16;
  logic signed [SF:0] c8, c16;

  scale_rom #(.N(8),  .SF(SF)) u8  (.addr(a8),  .coef(c8));
  scale_rom #(.N(16), .SF(SF)) u16 (.addr(a16), .coef(c16));

  int checks = 0, failures = 0;

  function automatic real expected(int k, int n);
    real ck;
    ck = (k == 0) ? 1.0 / $sqrt(real'(n)) : $sqrt(2.0 / real'(n));
    return ck * $cos(real'(k) * PI / (2.0 * real'(n)));
  endfunction

  task automatic check(int k, int n, logic signed [SF:0] got);
    real e, g;
    e = expected(k, n);
    g = real'(got) / 2.0 ** SF;
    checks++;
    if (g - e > 2.0 ** -(SF + 1) || e - g > 2.0 ** -(SF + 1)) begin
      failures++;
      $display("FAIL: N=%0d k=%0d got %f expected %f", n, k, g, e);
    end
  endtask

  initial begin
    for (int k = 0; k < 16; k++) begin
      a8  = 3'(k);
      a16 = 4'(k);
      #1;
      if (k < 8) check(k, 8, c8);
      check(k, 16, c16);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #100000;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule

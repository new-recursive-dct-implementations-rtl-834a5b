// tb_rm_type_b: self-checking test of rm_type_b.
//
// Runs rm_check, which compares the module's block result with the DCT sum
// computed in floating point, for these configurations:
//   N=8 bins 3 and 5 (multiplier block, +beta_3 and -beta_3), N=8 bin 4
//   (zero constant, no multiplier) and N=16 bin 7 (hard-wired, 24 state and
//   32 coefficient fractional bits).
module tb_rm_type_b;
  import dct_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int NI = 4;
  logic done [NI];
  int   chk [NI], fl [NI];

  rm_check #(.TYPE(RM_B), .N(8), .K(3)) u_c0 (.clk, .rst_n, .done(done[0]), .checks(chk[0]), .failures(fl[0]));
  rm_check #(.TYPE(RM_B), .N(8), .K(4)) u_c1 (.clk, .rst_n, .done(done[1]), .checks(chk[1]), .failures(fl[1]));
  rm_check #(.TYPE(RM_B), .N(8), .K(5)) u_c2 (.clk, .rst_n, .done(done[2]), .checks(chk[2]), .failures(fl[2]));
  rm_check #(.TYPE(RM_B), .N(16), .K(7), .FRAC(24), .COEF_FRAC(32)) u_c3 (.clk, .rst_n, .done(done[3]), .checks(chk[3]), .failures(fl[3]));

  initial begin : main
    int checks = 0, failures = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < NI; i++) wait (done[i]);
    for (int i = 0; i < NI; i++) begin
      checks += chk[i];
      failures += fl[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", 0, 1);
    $finish;
  end

endmodule

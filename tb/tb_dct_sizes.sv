// tb_dct_sizes: the transform lengths N = 16, 32 and 64 with the default
// word widths (16 fractional state bits, 24 fractional coefficient bits),
// and N = 8 with the multiplier blocks replaced by hard-wired constants.
//
// Each length runs in its own dct_harness with random input in (-300, 300),
// streamed back to back with some gaps. Every coefficient must be within
// 0.01 of a floating-point DCT-II, and the mean square error is printed
// per length and must stay below 5e-7.
module tb_dct_sizes;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic done [4];
  int   chk [4], fl [4];
  real  mse [4];

  dct_harness #(.N(16), .NBLK(200)) u16 (.clk, .rst_n, .done(done[0]), .checks(chk[0]), .failures(fl[0]), .mse(mse[0]));
  dct_harness #(.N(32), .NBLK(100)) u32 (.clk, .rst_n, .done(done[1]), .checks(chk[1]), .failures(fl[1]), .mse(mse[1]));
  dct_harness #(.N(64), .NBLK(60))  u64 (.clk, .rst_n, .done(done[2]), .checks(chk[2]), .failures(fl[2]), .mse(mse[2]));
  dct_harness #(.N(8), .NBLK(300), .USE_MB(1'b0)) u8hw (.clk, .rst_n, .done(done[3]), .checks(chk[3]), .failures(fl[3]), .mse(mse[3]));

  initial begin : main
    int checks = 0, failures = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < 4; i++) wait (done[i]);
    for (int i = 0; i < 4; i++) begin
      checks += chk[i];
      failures += fl[i];
    end
    $display("mse: N=16 %g, N=32 %g, N=64 %g, N=8 hard-wired %g", mse[0], mse[1], mse[2], mse[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", 0, 1);
    $finish;
  end

endmodule

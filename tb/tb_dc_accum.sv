// tb_dc_accum: self-checking test of the k = 0 accumulator.
//
// Sends 300 blocks of N = 8 random samples (plus an all -512 and an all 511
// block), back to back and with random gaps (en low). While the last sample
// of a block is applied, y must equal the exact block sum shifted to the
// bin format (16 fractional bits).
module tb_dc_accum;
  localparam int N = 8, IN_W = 10, FRAC = 16;
  localparam int SW = dct_pkg::state_w(IN_W, N, FRAC);

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, first = 1'b0;
  logic signed [IN_W-1:0] x = '0;
  logic signed [SW-1:0]   y;

  dc_accum #(.N(N), .IN_W(IN_W), .FRAC(FRAC)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    int s[N];
    longint sum;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int b = 0; b < 300; b++) begin
      sum = 0;
      for (int n = 0; n < N; n++) begin
        s[n] = (b == 0) ? -512 : (b == 1) ? 511 : int'($urandom_range(0, 1023)) - 512;
        sum += s[n];
      end
      for (int n = 0; n < N; n++) begin
        if (n > 0 && $urandom_range(0, 5) == 0) begin
          en <= 1'b0;
          first <= 1'b0;
          x <= IN_W'($urandom);
          @(posedge clk);
        end
        en    <= 1'b1;
        first <= (n == 0);
        x     <= IN_W'(s[n]);
        if (n == N - 1) begin
          #1;
          checks++;
          if (longint'(y) != (sum <<< FRAC)) begin
            failures++;
            if (failures < 10) $display("FAIL: block %0d sum %0d got %0d", b, sum, y >>> FRAC);
          end
        end
        @(posedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule

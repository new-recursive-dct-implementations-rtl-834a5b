// rm_check: test harness for one recursive module (Type A, B or C).
//
// Instantiates the module selected by TYPE for bin K of an N-point
// transform and feeds it NBLK blocks of random samples in [-512, 511],
// back to back, with occasional gaps (en low) inside a block. On the clock
// carrying sample N-1 the module's combinational result is compared with
//   sum_n s(n) cos((2n+1)K*pi/2N) / cos(K*pi/2N)
// computed here in floating point, where s(n) are the samples of the block.
// The tolerance, 0.05, covers the fixed-point error (at N = 8 mostly the
// rounding of the multiplier-block constants, about 1e-6 of full scale) and
// is far below any structural error. Longer transforms need more state and
// coefficient bits; FRAC and COEF_FRAC set them. Raises done when
// finished and reports its counts.
module rm_check
  import dct_pkg::*;
#(
  parameter rm_type_e TYPE = RM_A,
  parameter int       N    = 8,
  parameter int       K    = 1,
  parameter int       NBLK = 200,
  parameter int       FRAC = 16,
  parameter int       COEF_FRAC = 24
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);

  localparam int  IN_W = 10;
  localparam int  SW   = state_w(IN_W, N, FRAC);
  localparam real TOL  = 0.05;

  logic                   en = 1'b0, first = 1'b0;
  logic signed [IN_W-1:0] x = '0;
  logic signed [SW-1:0]   y;

  if (TYPE == RM_A) begin : g_a
    rm_type_a #(.N(N), .K(K), .FRAC(FRAC), .COEF_FRAC(COEF_FRAC)) u_dut (.clk, .rst_n, .en, .first, .x, .y);
  end else if (TYPE == RM_B) begin : g_b
    rm_type_b #(.N(N), .K(K), .FRAC(FRAC), .COEF_FRAC(COEF_FRAC)) u_dut (.clk, .rst_n, .en, .first, .x, .y);
  end else begin : g_c
    rm_type_c #(.N(N), .K(K), .FRAC(FRAC), .COEF_FRAC(COEF_FRAC)) u_dut (.clk, .rst_n, .en, .first, .x, .y);
  end

  function automatic real ref_out(int s[N]);
    real acc = 0.0;
    for (int n = 0; n < N; n++)
      acc += real'(s[n]) * $cos(PI * real'((2 * n + 1) * K) / (2.0 * N));
    return acc / $cos(PI * real'(K) / (2.0 * N));
  endfunction

  initial begin
    int  s[N];
    real e, got;
    done = 1'b0;
    checks = 0;
    failures = 0;
    @(posedge clk);
    while (!rst_n) @(posedge clk);
    for (int b = 0; b < NBLK; b++) begin
      for (int n = 0; n < N; n++)
        s[n] = (b == 0) ? ((n == 0) ? 300 : 0) :
               (b == 1) ? ((n % 2) ? -512 : 511) :
               int'($urandom_range(0, 1023)) - 512;
      for (int n = 0; n < N; n++) begin
        if (n > 0 && $urandom_range(0, 7) == 0) begin
          en    <= 1'b0;
          first <= 1'b0;
          x     <= IN_W'($urandom);
          @(posedge clk);
        end
        en    <= 1'b1;
        first <= (n == 0);
        x     <= IN_W'(s[n]);
        if (n == N - 1) begin
          // the finished result is on y while the last sample is applied
          #1;
          e   = ref_out(s);
          got = real'(y) / (2.0 ** FRAC);
          checks++;
          if (got - e > TOL || e - got > TOL) begin
            failures++;
            if (failures < 10)
              $display("FAIL: type %0d N=%0d K=%0d block %0d: got %f expected %f",
                       TYPE, N, K, b, got, e);
          end
        end
        @(posedge clk);
      end
    end
    en <= 1'b0;
    done = 1'b1;
  end

endmodule

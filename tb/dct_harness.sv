// dct_harness: streaming test harness for one goertzel_dct configuration.
//
// Instantiates the transform with the given N and word widths, streams NBLK
// blocks of uniform random samples in (-300, 300) back to back (every
// eighth block has gaps inside), and compares each output coefficient with
// an orthonormal DCT-II computed here in floating point. Checks: each
// coefficient within TOL, bins in order 0..N-1, no missing outputs, and the
// mean square error over all coefficients at or below MSE_MAX. Reports its
// counts and the measured mean square error.
module dct_harness #(
  parameter int  N         = 16,
  parameter int  FRAC      = 16,
  parameter int  COEF_FRAC = 24,
  parameter bit  USE_MB    = 1'b1,
  parameter int  NBLK      = 100,
  parameter real TOL       = 0.01,
  parameter real MSE_MAX   = 5e-7
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output real  mse
);
  localparam int  IN_W = 10;
  localparam int  KW   = $clog2(N);
  localparam int  SW   = dct_pkg::state_w(IN_W, N, FRAC);
  localparam real PI   = 3.14159265358979323846;

  logic                   in_valid = 1'b0;
  logic signed [IN_W-1:0] in_data = '0;
  logic                   out_valid;
  logic [KW-1:0]          out_k;
  logic signed [SW-1:0]   out_data;

  goertzel_dct #(.N(N), .FRAC(FRAC), .COEF_FRAC(COEF_FRAC), .USE_MB(USE_MB)) dut (
    .clk, .rst_n, .in_valid, .in_data, .out_valid, .out_k, .out_data
  );

  real exp_q[$];
  int  expk_q[$];
  real sq_err = 0.0;
  int  n_err = 0;

  function automatic real dct_ref(int x[N], int k);
    real s = 0.0;
    for (int n = 0; n < N; n++)
      s += real'(x[n]) * $cos(PI * real'((2 * n + 1) * k) / (2.0 * real'(N)));
    return s * ((k == 0) ? $sqrt(1.0 / N) : $sqrt(2.0 / N));
  endfunction

  initial begin
    int x[N];
    done = 1'b0;
    checks = 0;
    failures = 0;
    mse = 0.0;
    @(posedge clk);
    while (!rst_n) @(posedge clk);
    for (int b = 0; b < NBLK; b++) begin
      for (int n = 0; n < N; n++) x[n] = int'($urandom_range(0, 598)) - 299;
      for (int n = 0; n < N; n++) begin
        if (b % 8 == 7 && n > 0 && $urandom_range(0, 3) == 0) begin
          in_valid <= 1'b0;
          @(posedge clk);
        end
        in_valid <= 1'b1;
        in_data  <= IN_W'(x[n]);
        @(posedge clk);
      end
      for (int k = 0; k < N; k++) begin
        exp_q.push_back(dct_ref(x, k));
        expk_q.push_back(k);
      end
    end
    in_valid <= 1'b0;
    repeat (3 * N) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL: N=%0d: %0d outputs missing", N, exp_q.size());
    end
    mse = (n_err > 0) ? sq_err / n_err : 1.0;
    checks++;
    if (mse > MSE_MAX) begin
      failures++;
      $display("FAIL: N=%0d: mean square error %g above %g", N, mse, MSE_MAX);
    end
    done = 1'b1;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      real got, d;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL: N=%0d: unexpected output", N);
      end else begin
        got = real'(out_data) / (2.0 ** FRAC);
        d = got - exp_q.pop_front();
        if (int'(out_k) != expk_q.pop_front() || d > TOL || d < -TOL) begin
          failures++;
          if (failures < 10) $display("FAIL: N=%0d: X(%0d) off by %f", N, out_k, d);
        end
        sq_err += d * d;
        n_err++;
      end
    end
  end

endmodule

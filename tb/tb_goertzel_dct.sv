// tb_goertzel_dct: end-to-end test of the recursive DCT at its default size
// (N = 8, 10-bit input, 16 fractional bits).
//
// Streams blocks of samples into the transform and compares every output
// coefficient with an orthonormal DCT-II computed here in floating point,
// directly from its definition. Stimulus: uniform random samples in
// (-300, 300), full-scale samples (-512 and 511), single impulses, and
// blocks with gaps (in_valid low in the middle of a block). Most blocks are
// sent back to back, so that a new block is loaded into the output register
// bank on the same clock as the previous block's last coefficient leaves it.
//
// Checks: each coefficient within 0.01 of the reference; bins come out in
// order 0..N-1 on consecutive clocks (X(k) k clocks after X(0)); X(0)
// arrives exactly two clocks after the clock carrying the last sample; the
// mean square error over the random blocks stays below 5e-7. Each
// mechanism (back-to-back load, input gap, full-scale input, every loop
// type) is counted and must occur.
module tb_goertzel_dct;
  import dct_pkg::*;

  localparam int  N    = 8;
  localparam int  IN_W = 10;
  localparam int  FRAC = 16;
  localparam int  KW   = $clog2(N);
  localparam int  SW   = state_w(IN_W, N, FRAC);
  localparam int  NBLK = 400;
  localparam real TOL  = 0.01;

  logic                   clk = 1'b0;
  logic                   rst_n = 1'b0;
  logic                   in_valid = 1'b0;
  logic signed [IN_W-1:0] in_data = '0;
  logic                   out_valid;
  logic [KW-1:0]          out_k;
  logic signed [SW-1:0]   out_data;

  goertzel_dct dut (.*);

  always #5 clk = ~clk;

  int  checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // expected coefficients, their bin numbers and the arrival cycle of X(0)
  real    exp_q[$];
  int     expk_q[$];
  bit     rnd_q[$];
  longint due_q[$];

  longint base_cycle = 0;
  int  n_b2b = 0, n_gap = 0, n_full = 0, n_impulse = 0;
  int  n_type [4] = '{0, 0, 0, 0};
  real sq_err = 0.0;
  int  n_err  = 0;

  function automatic real dct_ref(int x[N], int k);
    real s = 0.0;
    for (int n = 0; n < N; n++)
      s += real'(x[n]) * $cos(PI * real'((2 * n + 1) * k) / (2.0 * real'(N)));
    return s * ((k == 0) ? $sqrt(1.0 / N) : $sqrt(2.0 / N));
  endfunction

  // ---------------- driver ----------------
  task automatic send_block(int x[N], bit gaps, bit rnd);
    for (int n = 0; n < N; n++) begin
      if (gaps && n > 0 && ($urandom_range(0, 2) == 0)) begin
        in_valid <= 1'b0;
        in_data  <= IN_W'($urandom);
        n_gap++;
        repeat ($urandom_range(1, 3)) @(posedge clk);
      end
      in_valid <= 1'b1;
      in_data  <= IN_W'(x[n]);
      @(posedge clk);
      if (n == N - 1) begin
        for (int k = 0; k < N; k++) begin
          exp_q.push_back(dct_ref(x, k));
          expk_q.push_back(k);
          rnd_q.push_back(rnd);
        end
        due_q.push_back(cycle + 2);   // two clocks after the last sample
      end
    end
  endtask

  initial begin : driver
    int x[N];
    int mode;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int b = 0; b < NBLK; b++) begin
      mode = (b < 4) ? b : $urandom_range(0, 9);
      for (int n = 0; n < N; n++) begin
        case (mode)
          0:       x[n] = (n == b % N) ? 299 : 0;                 // impulse
          1:       x[n] = -512;                                   // full scale
          2:       x[n] = 511;
          3:       x[n] = (n % 2) ? -512 : 511;                   // Nyquist-like
          default: x[n] = int'($urandom_range(0, 598)) - 299;     // (-300, 300)
        endcase
      end
      if (mode == 0) n_impulse++;
      if (mode >= 1 && mode <= 3) n_full++;
      send_block(x, (mode == 9), (mode >= 4 && mode != 9));
      if ($urandom_range(0, 15) == 0) begin
        in_valid <= 1'b0;
        repeat ($urandom_range(1, 12)) @(posedge clk);
      end
    end
    in_valid <= 1'b0;
    repeat (3 * N) @(posedge clk);
    // every mechanism must have occurred
    checks++; if (n_b2b == 0)     begin failures++; $display("FAIL: no back-to-back load"); end
    checks++; if (n_gap == 0)     begin failures++; $display("FAIL: no input gap"); end
    checks++; if (n_full == 0)    begin failures++; $display("FAIL: no full-scale block"); end
    checks++; if (n_impulse == 0) begin failures++; $display("FAIL: no impulse block"); end
    for (int t = 0; t < 4; t++) begin
      checks++;
      if (n_type[t] == 0) begin failures++; $display("FAIL: no check on loop type %0d", t); end
    end
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL: %0d outputs missing", exp_q.size()); end
    checks++;
    if (n_err == 0 || sq_err / n_err > 5e-7) begin
      failures++;
      $display("FAIL: mean square error %g over %0d coefficients", sq_err / n_err, n_err);
    end
    $display("blocks=%0d back_to_back=%0d gap_cycles=%0d full_scale=%0d impulse=%0d mse=%g",
             NBLK, n_b2b, n_gap, n_full, n_impulse, (n_err > 0) ? sq_err / n_err : 0.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- monitor ----------------
  always @(posedge clk) begin
    if (rst_n && dut.load && dut.u_ctrl.act_q) n_b2b++;
    if (rst_n && out_valid) begin
      real got, e, d;
      got = real'(out_data) / (2.0 ** FRAC);
      if (exp_q.size() == 0) begin
        checks++; failures++;
        $display("FAIL: unexpected output k=%0d", out_k);
      end else begin
        e = exp_q.pop_front();
        checks++;
        if (int'(out_k) != expk_q[0]) begin
          failures++;
          $display("FAIL: bin order: got k=%0d, expected %0d", out_k, expk_q[0]);
        end
        if (expk_q[0] == 0) begin
          checks++;
          if (due_q.size() == 0 || due_q[0] != cycle) begin
            failures++;
            $display("FAIL: X(0) at cycle %0d, expected %0d", cycle,
                     (due_q.size() != 0) ? due_q[0] : -1);
          end
          if (due_q.size() != 0) void'(due_q.pop_front());
          base_cycle = cycle;
        end else begin
          // one coefficient per clock after X(0)
          checks++;
          if (cycle != base_cycle + expk_q[0]) begin
            failures++;
            $display("FAIL: X(%0d) at cycle %0d, expected %0d", expk_q[0], cycle,
                     base_cycle + expk_q[0]);
          end
        end
        d = got - e;
        checks++;
        n_type[int'(rm_type(expk_q[0], N))]++;
        if (d > TOL || d < -TOL) begin
          failures++;
          if (failures < 20)
            $display("FAIL: X(%0d) = %f, expected %f", out_k, got, e);
        end
        if (rnd_q[0]) begin
          sq_err += d * d;
          n_err++;
        end
        void'(expk_q.pop_front());
        void'(rnd_q.pop_front());
      end
    end
  end

  initial begin : watchdog
    repeat (NBLK * N * 4 + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_loop_mult: self-checking test of the loop multiplier.
//
// Covers the three ways a loop constant is realised:
//   - multiplier block: N = 8, Type C bin 7 (gamma_7 = alpha_1)
//   - hard-wired constant: N = 16, Type A bin 3 and Type B bin 6
//   - zero constant: N = 8, Type B bin 4 (no multiplier)
//   - the multiplier block switched off: N = 8, Type B bin 5 hard-wired
// Each output is compared with x times the constant computed here from its
// cosine definition; the allowed error is one output LSB for the
// truncation plus |x| * 2^-23 for rounding the constant.
module tb_loop_mult;
  import dct_pkg::*;

  localparam int W = 34;

  logic signed [W-1:0] x;
  logic signed [W-1:0] y_c7, y_a3, y_b6, y_b4, y_b5;

  loop_mult #(.N(8),  .K(7), .TYPE(RM_C), .W(W))                u_c7 (.x, .y(y_c7));
  loop_mult #(.N(16), .K(3), .TYPE(RM_A), .W(W))                u_a3 (.x, .y(y_a3));
  loop_mult #(.N(16), .K(6), .TYPE(RM_B), .W(W))                u_b6 (.x, .y(y_b6));
  loop_mult #(.N(8),  .K(4), .TYPE(RM_B), .W(W))                u_b4 (.x, .y(y_b4));
  loop_mult #(.N(8),  .K(5), .TYPE(RM_B), .W(W), .USE_MB(1'b0)) u_b5 (.x, .y(y_b5));

  int checks = 0, failures = 0;

  task automatic check(string name, logic signed [W-1:0] got, real c);
    real exp, err, lim;
    exp = real'(x) * c;
    err = real'(got) - exp;
    lim = 1.0 + (real'(x) < 0 ? -real'(x) : real'(x)) * 2.0 ** -23;
    checks++;
    if (err > lim || err < -lim) begin
      failures++;
      if (failures < 10) $display("FAIL: %s x=%0d got %0d expected %f", name, x, got, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 20000; i++) begin
      x = $signed(W'({$urandom, $urandom})) >>> $urandom_range(0, 20);
      #1;
      check("gamma_7 N=8",  y_c7, 1.0 + $cos(7.0 * PI / 8.0));
      check("alpha_3 N=16", y_a3, 1.0 - $cos(3.0 * PI / 16.0));
      check("beta_6 N=16",  y_b6, $cos(6.0 * PI / 16.0));
      check("beta_4 N=8",   y_b4, 0.0);
      check("beta_5 N=8",   y_b5, $cos(5.0 * PI / 8.0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #1000000;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule

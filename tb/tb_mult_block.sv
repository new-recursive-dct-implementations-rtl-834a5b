// tb_mult_block: self-checking test of the N = 8 multiplier blocks.
//
// Drives random 34-bit signed inputs (and the extremes) into all four
// configurations and checks each output bit-exactly against
// floor(x * C / 2^24), where C is the constant times 2^24, expanded here by
// hand from the power-of-two factorisations:
//   alpha_1 * 2^24 = 2^20 + 2^18 - 2^15 - 2^10 + 2^7 + 2^5        = 1277088
//   alpha_2 * 2^24 = 2^22 + 2^20 - 2^18 - 2^16 - 2^10 - 2^8 + 2^4 = 4913936
//   beta_3  * 2^24 = 2^22 + 2^21 + 2^17 - 2^11 - 2^7 + 2^3        = 6420360
// and compares the constants with the cosines they approximate.
module tb_mult_block;
  import dct_pkg::*;

  localparam int W = 34;
  localparam longint C_A1 = 1277088;
  localparam longint C_A2 = 4913936;
  localparam longint C_B3 = 6420360;

  logic signed [W-1:0] x;
  logic signed [W-1:0] y_a1, y_a2, y_b3, y_b5;

  mult_block #(.W(W), .SEL(MB_ALPHA1))            u_a1 (.x, .y(y_a1));
  mult_block #(.W(W), .SEL(MB_ALPHA2))            u_a2 (.x, .y(y_a2));
  mult_block #(.W(W), .SEL(MB_BETA3))             u_b3 (.x, .y(y_b3));
  mult_block #(.W(W), .SEL(MB_BETA3), .NEG(1'b1)) u_b5 (.x, .y(y_b5));

  int checks = 0, failures = 0;

  task automatic check(string name, longint got, longint c);
    longint exp;
    exp = (longint'(x) * c) >>> 24;
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL: %s x=%0d got %0d expected %0d", name, x, got, exp);
    end
  endtask

  task automatic near(string name, real a, real b);
    checks++;
    if (a - b > 1e-6 || b - a > 1e-6) begin
      failures++;
      $display("FAIL: %s constant %f vs %f", name, a, b);
    end
  endtask

  initial begin
    near("alpha_1", real'(C_A1) / 2.0 ** 24, 1.0 - $cos(PI / 8.0));
    near("alpha_2", real'(C_A2) / 2.0 ** 24, 1.0 - $cos(2.0 * PI / 8.0));
    near("beta_3",  real'(C_B3) / 2.0 ** 24, $cos(3.0 * PI / 8.0));
    for (int i = 0; i < 20000; i++) begin
      case (i)
        0:       x = '0;
        1:       x = {1'b1, {(W-1){1'b0}}} >>> 2;
        2:       x = {2'b00, {(W-2){1'b1}}};
        3:       x = -1;
        4:       x = 1;
        default: x = $signed(W'({$urandom, $urandom})) >>> $urandom_range(0, 20);
      endcase
      #1;
      check("alpha_1", longint'(y_a1), C_A1);
      check("alpha_2", longint'(y_a2), C_A2);
      check("beta_3",  longint'(y_b3), C_B3);
      check("beta_5",  longint'(y_b5), -C_B3);
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

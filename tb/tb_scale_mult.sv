// tb_scale_mult: self-checking test of the output multiplier.
//
// Drives random operands every clock (34-bit bin values, 25-bit scale
// factors with 24 fractional bits) and checks, one clock later, that out is
// exactly floor(a * b / 2^24) and that out_valid and out_k are the inputs
// of the previous clock.
module tb_scale_mult;
  localparam int W = 34, SF = 24, KW = 3;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic [KW-1:0] in_k = '0;
  logic signed [W-1:0] a = '0;
  logic signed [SF:0]  b = '0;
  logic out_valid;
  logic [KW-1:0] out_k;
  logic signed [W-1:0] out;

  scale_mult #(.W(W), .SF(SF), .KW(KW)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    longint pa, pb, exp;
    logic pv;
    logic [KW-1:0] pk;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int c = 0; c < 5000; c++) begin
      #1;
      a        = $signed(W'({$urandom, $urandom})) >>> $urandom_range(0, 16);
      b        = $signed((SF+1)'($urandom)) >>> $urandom_range(0, 8);
      in_valid = $urandom_range(0, 3) != 0;
      in_k     = KW'($urandom);
      pa = a; pb = b; pv = in_valid; pk = in_k;
      @(posedge clk);
      #1;
      exp = (pa * pb) >>> SF;
      checks++;
      if (longint'(out) != exp || out_valid != pv || out_k != pk) begin
        failures++;
        if (failures < 10)
          $display("FAIL: a=%0d b=%0d got %0d/%0d/%0d expected %0d/%0d/%0d",
                   pa, pb, out, out_valid, out_k, exp, pv, pk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule

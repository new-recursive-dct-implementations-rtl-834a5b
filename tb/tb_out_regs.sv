// tb_out_regs: self-checking test of the output register bank.
//
// Loads N = 8 random words and shifts them out, checking that q presents
// d[0], d[1], ... d[N-1] on consecutive clocks and zeros after that. It also
// checks that hold (neither load nor shift) keeps q, and that a load on the
// same clock as a shift wins (back-to-back blocks), against a queue model
// kept here.
module tb_out_regs;
  localparam int N = 8, W = 34;

  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, shift = 1'b0;
  logic signed [W-1:0] d [N];
  logic signed [W-1:0] q;

  out_regs #(.N(N), .W(W)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic signed [W-1:0] model [N];

  initial begin
    for (int i = 0; i < N; i++) begin
      d[i] = '0;
      model[i] = '0;
    end
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int c = 0; c < 3000; c++) begin
      // random control: mostly shifting, sometimes loading or holding
      load  <= ($urandom_range(0, 9) == 0);
      shift <= ($urandom_range(0, 7) != 0);
      for (int i = 0; i < N; i++) d[i] <= $signed(W'({$urandom, $urandom}));
      @(posedge clk);
      if (load) begin
        for (int i = 0; i < N; i++) model[i] = d[i];
      end else if (shift) begin
        for (int i = 0; i < N - 1; i++) model[i] = model[i+1];
        model[N-1] = '0;
      end
      #1;
      checks++;
      if (q !== model[0]) begin
        failures++;
        if (failures < 10) $display("FAIL: cycle %0d q=%0d expected %0d", c, q, model[0]);
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

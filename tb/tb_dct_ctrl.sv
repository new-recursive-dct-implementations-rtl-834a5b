// tb_dct_ctrl: self-checking test of the block sequencer (N = 8).
//
// Drives in_valid with random gaps and long back-to-back runs. Counting the
// accepted samples itself, it checks every clock that
//   first is high exactly when the accepted count is a multiple of N,
//   load  is high exactly when in_valid is high on sample N-1 of a block,
//   shift is high exactly when a read-out is running and no load occurs,
//   rd_valid / rd_k run 0, 1, ..., N-1 on the N clocks after each load.
// It counts loads that come on the last read-out clock (back to back) and
// fails if none occurred.
module tb_dct_ctrl;
  localparam int N = 8, KW = 3;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic first, load, shift, rd_valid;
  logic [KW-1:0] rd_k;

  dct_ctrl #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, b2b = 0;
  int accepted = 0;
  int rd_left = 0, rd_next = 0;    // model of the read-out

  task automatic expect_eq(string name, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL: %s=%0b expected %0b (accepted %0d)", name, got, exp, accepted);
    end
  endtask

  initial begin
    logic exp_load;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int c = 0; c < 4000; c++) begin
      in_valid <= (c % 500 < 250) ? 1'b1 : ($urandom_range(0, 3) != 0);
      #1;
      exp_load = in_valid && (accepted % N == N - 1);
      expect_eq("first", first, accepted % N == 0);
      expect_eq("load", load, exp_load);
      expect_eq("rd_valid", rd_valid, rd_left > 0);
      expect_eq("shift", shift, rd_left > 0 && !exp_load);
      if (rd_left > 0) begin
        checks++;
        if (int'(rd_k) != rd_next) begin
          failures++;
          if (failures < 10) $display("FAIL: rd_k=%0d expected %0d", rd_k, rd_next);
        end
      end
      if (exp_load && rd_left == 1) b2b++;
      @(posedge clk);
      if (in_valid) accepted++;
      if (exp_load) begin
        rd_left = N;
        rd_next = 0;
      end else if (rd_left > 0) begin
        rd_left--;
        rd_next++;
      end
    end
    checks++;
    if (b2b == 0) begin
      failures++;
      $display("FAIL: no back-to-back load");
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

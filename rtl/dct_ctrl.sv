// dct_ctrl: block sequencing of the recursive DCT.
//
// The recursive modules run at the input sample rate: each block of N
// samples enters one per clock (a clock with in_valid low is a gap and
// freezes the loops). This controller counts samples within the block and
// gives
//   first  - the current sample is sample 0: the loops restart from zero
//   load   - in_valid on sample N-1: the bin results are final and are
//            captured into the register bank
// and then walks the N captured results out of the bank, one per clock:
//   shift  - move the bank one place toward the output multiplier
//   rd_valid / rd_k - the bank's output register holds bin rd_k
// Because a block takes at least N clocks and the read-out exactly N, a new
// load can coincide with the last read-out clock, so back-to-back blocks
// stream without a pause. Reset is asynchronous, active low. The assertion
// below is disabled during reset, so lint tools see rst_n used both as an
// asynchronous reset and as a synchronous signal; the flip-flops use it only
// asynchronously.
// Counting N clocks per result follows the published timing; the signal set
// is this design's choice.
module dct_ctrl #(
  parameter int N  = 8,
  parameter int KW = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          first,
  output logic          load,
  output logic          shift,
  output logic          rd_valid,
  output logic [KW-1:0] rd_k
);

  logic [KW-1:0] cnt_q;     // index of the next input sample
  logic          last;      // the current sample is sample N-1
  logic [KW-1:0] rd_q;
  logic          act_q;

  assign first    = (cnt_q == '0);
  assign last     = (int'(cnt_q) == N - 1);
  assign load     = in_valid && last;
  assign shift    = act_q && !load;
  assign rd_valid = act_q;
  assign rd_k     = rd_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q <= '0;
      rd_q  <= '0;
      act_q <= 1'b0;
    end else begin
      if (in_valid) cnt_q <= last ? '0 : cnt_q + 1'b1;
      if (load) begin
        rd_q  <= '0;
        act_q <= 1'b1;
      end else if (act_q) begin
        rd_q  <= rd_q + 1'b1;
        if (int'(rd_q) == N - 1) act_q <= 1'b0;
      end
    end
  end

  // The bank must be empty (read-out finished or finishing) when it is
  // reloaded; guaranteed because a block lasts at least N clocks.
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
    load |-> (!act_q || int'(rd_q) == N - 1));

endmodule

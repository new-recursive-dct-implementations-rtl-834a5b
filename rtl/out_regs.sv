// out_regs: the output register bank R of the recursive DCT.
//
// One register per bin. On load all N bin results are captured at once (the
// end of a block); on every other clock with shift high the bank moves one
// place toward entry 0, whose content feeds the single output multiplier, so
// the bins leave in the order k = 0, 1, ..., N-1, one per clock. The recursive
// modules can therefore start the next block immediately while the previous
// results are scaled and sent out.
//
// Interface: d[k] is bin k's result, q is the register nearest the output
// (bin index given by the controller). Load has priority over shift. Entries
// shifted in at the far end are zero. Registers chained toward the multiplier
// follow the published block diagram; the load/shift control is this
// design's choice.
module out_regs #(
  parameter int N = 8,
  parameter int W = 34
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                load,
  input  logic                shift,
  input  logic signed [W-1:0] d [N],
  output logic signed [W-1:0] q
);

  logic signed [W-1:0] r [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) r[i] <= '0;
    end else if (load) begin
      for (int i = 0; i < N; i++) r[i] <= d[i];
    end else if (shift) begin
      for (int i = 0; i < N - 1; i++) r[i] <= r[i+1];
      r[N-1] <= '0;
    end
  end

  assign q = r[0];

endmodule

// scale_mult: the single general-purpose output multiplier of the DCT.
//
// Multiplies the bin result leaving the register bank by its scale
// coefficient from the ROM and registers the product, truncated back to the
// bin format: out = floor(a * b / 2^SF). a is signed with any fixed point,
// b is signed with SF fractional bits, out keeps the fixed point of a.
// The bin index and a valid flag travel with the product.
//
// Timing: one product per clock, one clock of latency. One shared
// general-purpose multiplier for all bins follows the published architecture;
// the pipeline register and truncation are this design's choices.
module scale_mult #(
  parameter int W  = 34,
  parameter int SF = 24,
  parameter int KW = 3
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [KW-1:0]        in_k,
  input  logic signed [W-1:0]  a,
  input  logic signed [SF:0]   b,
  output logic                 out_valid,
  output logic [KW-1:0]        out_k,
  output logic signed [W-1:0]  out
);

  logic signed [W+SF:0] p;

  assign p = (W+SF+1)'(a) * (W+SF+1)'(b);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_k     <= '0;
      out       <= '0;
    end else begin
      out_valid <= in_valid;
      out_k     <= in_k;
      out       <= W'(p >>> SF);
    end
  end

endmodule

// goertzel_dct: N-point 1D DCT-II built from Type A, B and C Goertzel
// recursive modules.
//
// Every frequency bin k has its own 2nd-order recursive module (RM) and all
// of them take the same input sample on the same clock, so the transform
// starts with the first sample and needs no input buffer. Bin 0 is a plain
// accumulator. Bins 1..floor(N/3) use Type A modules, the last floor(N/3)
// bins Type C modules and the middle bins Type B modules, so that each loop
// multiplier carries the smallest possible constant (alpha_k near DC,
// beta_k in the middle, gamma_k near Nyquist). With N = 8 the loop
// multipliers of bins 1, 2, 3, 5, 6 and 7 are shift-and-add multiplier
// blocks; the Type B bin 4 has a zero constant and no multiplier.
//
// After sample N-1 the N bin results are captured in the register bank R
// and leave it one per clock, k = 0 first, through one general-purpose
// multiplier that applies the per-bin scale factor from the scale ROM. The
// next block is accepted meanwhile, so the transform sustains one sample in
// and one coefficient out per clock.
//
// Interface: in_data is a signed integer sample, taken when in_valid is high
// (a low in_valid is a gap; it does not end the block). out_data is X(out_k)
// of the orthonormal DCT-II, signed with FRAC fractional bits, valid when
// out_valid is high. Latency: X(0) of a block appears two clocks after the
// clock that carries its last sample, X(k) k clocks later.
//
// The architecture (bin-to-type rule, loop structures, multiplier blocks,
// R bank, scale ROM, single output multiplier) follows the published design;
// word widths, normalisation, reset, handshake and the start-of-block
// restart are this design's choices.
module goertzel_dct
  import dct_pkg::*;
#(
  parameter int N         = 8,
  parameter int IN_W      = 10,
  parameter int FRAC      = 16,
  parameter int COEF_FRAC = 24,
  parameter int SCALE_FRAC = 24,
  parameter bit USE_MB    = 1'b1,
  parameter int SW        = state_w(IN_W, N, FRAC),
  parameter int KW        = $clog2(N)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic signed [IN_W-1:0] in_data,
  output logic                   out_valid,
  output logic [KW-1:0]          out_k,
  output logic signed [SW-1:0]   out_data
);

  logic first, load, shift, rd_valid;
  logic [KW-1:0] rd_k;
  logic signed [SW-1:0] bin [N];
  logic signed [SW-1:0] r0;
  logic signed [SCALE_FRAC:0] scale;

  dct_ctrl #(.N(N), .KW(KW)) u_ctrl (
    .clk, .rst_n, .in_valid,
    .first, .load, .shift, .rd_valid, .rd_k
  );

  dc_accum #(.N(N), .IN_W(IN_W), .FRAC(FRAC), .SW(SW)) u_bin0 (
    .clk, .rst_n, .en(in_valid), .first, .x(in_data), .y(bin[0])
  );

  for (genvar k = 1; k < N; k++) begin : g_rm
    if (rm_type(k, N) == RM_A) begin : g_a
      rm_type_a #(.N(N), .K(k), .IN_W(IN_W), .FRAC(FRAC), .COEF_FRAC(COEF_FRAC),
                  .USE_MB(USE_MB), .SW(SW))
        u_rm (.clk, .rst_n, .en(in_valid), .first, .x(in_data), .y(bin[k]));
    end else if (rm_type(k, N) == RM_C) begin : g_c
      rm_type_c #(.N(N), .K(k), .IN_W(IN_W), .FRAC(FRAC), .COEF_FRAC(COEF_FRAC),
                  .USE_MB(USE_MB), .SW(SW))
        u_rm (.clk, .rst_n, .en(in_valid), .first, .x(in_data), .y(bin[k]));
    end else begin : g_b
      rm_type_b #(.N(N), .K(k), .IN_W(IN_W), .FRAC(FRAC), .COEF_FRAC(COEF_FRAC),
                  .USE_MB(USE_MB), .SW(SW))
        u_rm (.clk, .rst_n, .en(in_valid), .first, .x(in_data), .y(bin[k]));
    end
  end

  out_regs #(.N(N), .W(SW)) u_r (
    .clk, .rst_n, .load, .shift, .d(bin), .q(r0)
  );

  scale_rom #(.N(N), .SF(SCALE_FRAC), .AW(KW)) u_rom (
    .addr(rd_k), .coef(scale)
  );

  scale_mult #(.W(SW), .SF(SCALE_FRAC), .KW(KW)) u_mult (
    .clk, .rst_n, .in_valid(rd_valid), .in_k(rd_k), .a(r0), .b(scale),
    .out_valid, .out_k, .out(out_data)
  );

endmodule

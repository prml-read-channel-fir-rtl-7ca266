// compressor_24_2: the 24:2 compressor that sums the Booth partial products of all
// taps in carry-save form, with the filter's second pipeline register inside it.
//
// Structure (TAPS = 8, three rows per tap):
//   row alignment  each 7-bit row i of a tap is shifted left by 2i and its sign bit
//                  is inverted (sign-extension elimination); the conversion bit of
//                  row 0 goes into the free bit 0 of row 1 and that of row 1 into the
//                  free bit 2 of row 2.
//   3:2 stage      one 3:2 compressor row per tap: 24 rows -> 16 rows.
//   4:2 level 1    16 -> 8 rows, then the second pipeline register.
//   4:2 levels 2,3 8 -> 4 -> 2 rows, returned combinationally; the caller registers
//                  them as the third pipeline stage.
// The number of 4:2 levels is log2(TAPS_P), with the register after the first.
//
// The three rows of a tap cannot also hold the conversion bit of the third row
// (weight 16): columns 0-4 would carry more than two rows can represent. That bit
// depends on the coefficient only, so the caller sums the third-row conversion bits
// of all taps, together with the sign-extension constant, into one correction row
// `corr`; tap 0's stage is a 4:2 compressor that takes this row as a fourth input.
// The 4:2 cell has the same three-mux depth as the 3:2 cell, so the stage delay is
// unchanged. This correction row is this design's choice; the rest of the split
// (one 3:2 stage, three 4:2 stages, the register after the first 4:2 level)
// follows the published architecture.
// All rows are OW bits; everything is computed modulo 2^OW.
module compressor_24_2
  import fir_pkg::*;
#(
  parameter int unsigned TAPS_P = TAPS
) (
  input  logic     clk,
  input  logic     rst_n,
  input  pp_row_t  pp      [TAPS_P][NPP],   // partial-product rows, first pipeline stage
  input  logic [1:0] conv  [TAPS_P],        // conversion bits of rows 0 and 1 per tap
  input  row_t     corr,                    // correction row (see above)
  output row_t     sum_row,
  output row_t     carry_row
);

  localparam int unsigned NL = $clog2(TAPS_P);   // number of 4:2 levels
  localparam int unsigned NR = 2 * TAPS_P;       // rows after the 3:2 stage

  // ---- row alignment -------------------------------------------------------
  row_t al [TAPS_P][NPP];

  always_comb begin
    for (int t = 0; t < TAPS_P; t++) begin
      for (int i = 0; i < NPP; i++) begin
        al[t][i] = row_t'({~pp[t][i][PPW-1], pp[t][i][PPW-2:0]}) << (2 * i);
        if (i > 0) al[t][i][2*(i-1)] = conv[t][i-1];
      end
    end
  end

  // ---- 3:2 stage (tap 0: 4:2 with the correction row) ------------------------
  row_t st0 [NR];

  compressor_4_2 #(.W(OW)) u_tap0 (
    .a(al[0][0]), .b(al[0][1]), .c(al[0][2]), .d(corr),
    .s(st0[0]), .cy(st0[1]));

  for (genvar t = 1; t < TAPS_P; t++) begin : g_tap
    compressor_3_2 #(.W(OW)) u_c32 (
      .a(al[t][0]), .b(al[t][1]), .c(al[t][2]),
      .s(st0[2*t]), .cy(st0[2*t+1]));
  end

  // ---- 4:2 levels, second pipeline register after level 1 --------------------
  row_t l1_q [NR/2];

  for (genvar l = 1; l <= NL; l++) begin : g_lvl
    row_t in_r  [NR >> (l - 1)];
    row_t out_r [NR >> l];
    if (l == 1) begin : g_src0
      assign in_r = st0;
    end else if (l == 2) begin : g_src_reg
      assign in_r = l1_q;
    end else begin : g_src_prev
      assign in_r = g_lvl[l-1].out_r;
    end
    for (genvar k = 0; k < (NR >> (l + 1)); k++) begin : g_c42
      compressor_4_2 #(.W(OW)) u_c42 (
        .a(in_r[4*k]), .b(in_r[4*k+1]), .c(in_r[4*k+2]), .d(in_r[4*k+3]),
        .s(out_r[2*k]), .cy(out_r[2*k+1]));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < NR/2; r++) l1_q[r] <= '0;
    end else begin
      l1_q <= g_lvl[1].out_r;
    end
  end

  if (NL == 1) begin : g_out_reg
    assign sum_row   = l1_q[0];
    assign carry_row = l1_q[1];
  end else begin : g_out_comb
    assign sum_row   = g_lvl[NL].out_r[0];
    assign carry_row = g_lvl[NL].out_r[1];
  end

endmodule

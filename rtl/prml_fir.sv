// prml_fir: 8-tap, 6-bit FIR filter for the adaptive equalizer of a PRML disk-drive
// read channel, computing
//     dout(n) = sum_{t=0..7} coef[t] * din(n - t)
// with 6-bit two's-complement samples and coefficients and a 15-bit two's-complement
// result, one result per clock, four clocks after the sample enters.
//
// Datapath (the published four-stage organisation):
//   input stage  input_delay gives every tap its sample; each tap_ppg Booth-recodes
//                its coefficient and forms three partial-product rows (24 in all)
//                plus their two's-complement conversion bits.
//                -> 1st pipeline register
//   stage 2      compressor_24_2: 3:2 stage and first 4:2 level
//                -> 2nd pipeline register (inside compressor_24_2)
//   stage 3      second and third 4:2 levels -> two rows
//                -> 3rd pipeline register
//   stage 4      final_adder (carry-select of 4-bit conditional sum adders)
//                -> 4th pipeline register -> dout
//
// The coefficients are plain inputs: the published design makes them programmable but does not say
// how they are loaded, so whatever adapts them drives coef directly; they are
// sampled through the first pipeline stage together with the data. The correction
// row added in stage 2 (sign-extension constant plus the conversion bits of every
// tap's third row, which depend on the coefficients only) is formed here in the
// input stage and registered with the partial products; see compressor_24_2.
// All registers clear on the active-low asynchronous reset, which is this design's
// choice.
//
// Timing: if din holds x(n) before rising edge n, dout shows y(n) after edge n+3,
// i.e. four rising edges after x(n) is first sampled.
module prml_fir
  import fir_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  sample_t din,
  input  coef_t   coef [TAPS],
  output row_t    dout
);

  // ---- input delay stage and partial-product generators ---------------------
  sample_t        x_tap [TAPS];
  pp_row_t        pp    [TAPS][NPP];
  logic [NPP-1:0] conv  [TAPS];
  row_t           corr;

  input_delay #(.TAPS_P(TAPS), .W(DW)) u_delay (
    .clk(clk), .rst_n(rst_n), .din(din), .x_tap(x_tap));

  for (genvar t = 0; t < TAPS; t++) begin : g_tap
    tap_ppg u_ppg (.x(x_tap[t]), .coef(coef[t]), .pp(pp[t]), .conv(conv[t]));
  end

  // Correction row: sign-extension constant + 4^(NPP-1) per negative last row.
  always_comb begin
    corr = sign_ext_const(OW'(TAPS));
    for (int t = 0; t < TAPS; t++)
      corr = corr + (OW'(conv[t][NPP-1]) << (2 * (NPP - 1)));
  end

  // ---- 1st pipeline stage ---------------------------------------------------
  pp_row_t    pp_q   [TAPS][NPP];
  logic [1:0] conv_q [TAPS];
  row_t       corr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int t = 0; t < TAPS; t++) begin
        for (int i = 0; i < NPP; i++) pp_q[t][i] <= '0;
        conv_q[t] <= '0;
      end
      corr_q <= sign_ext_const(OW'(TAPS));   // matches all-zero rows: sum 0
    end else begin
      pp_q <= pp;
      for (int t = 0; t < TAPS; t++) conv_q[t] <= conv[t][1:0];
      corr_q <= corr;
    end
  end

  // ---- 24:2 compressor (2nd pipeline stage inside) ---------------------------
  row_t sum_row, carry_row;

  compressor_24_2 #(.TAPS_P(TAPS)) u_comp (
    .clk(clk), .rst_n(rst_n), .pp(pp_q), .conv(conv_q), .corr(corr_q),
    .sum_row(sum_row), .carry_row(carry_row));

  // ---- 3rd pipeline stage ---------------------------------------------------
  row_t sum_q, carry_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum_q   <= '0;
      carry_q <= '0;
    end else begin
      sum_q   <= sum_row;
      carry_q <= carry_row;
    end
  end

  // ---- final adder and 4th pipeline stage ------------------------------------
  row_t fa_sum;

  final_adder #(.W(OW)) u_fadd (.a(sum_q), .b(carry_q), .s(fa_sum));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dout <= '0;
    else        dout <= fa_sum;
  end

endmodule

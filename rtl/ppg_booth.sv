// ppg_booth: partial-product generator row for the second and third Booth digits.
//
// Each output bit is built from two multiplexers, as in the published bit slice:
// the first picks M(i) = X(i) or ~X(i) under NEG, the second passes M(i+1) when ONE
// is high, M(i) when TWO is high, and 0 when neither is (the clear case, which the
// transistor circuit realises with series PMOS devices instead of a CLR signal).
// A negative multiple therefore comes out in one's complement; the missing +1 is a
// separate sign-conversion bit generated by tap_ppg.
//
// The row is DW+1 bits wide so that 2X fits; X is sign-extended by one bit and
// X(-1) = 0. Bit PPW-1 is the row's sign bit. Combinational.
module ppg_booth
  import fir_pkg::*;
(
  input  sample_t    x,     // multiplicand: input sample
  input  booth_sel_t sel,
  output pp_row_t    pp
);

  // xe[k] holds X(k-1): xe[0] = X(-1) = 0, xe[PPW] = sign extension.
  logic [PPW:0] xe;
  logic [PPW:0] m;

  always_comb begin
    xe = {x[DW-1], x, 1'b0};
    for (int k = 0; k <= PPW; k++)
      m[k] = sel.neg ? ~xe[k] : xe[k];          // first MUX
    for (int j = 0; j < PPW; j++)
      pp[j] = sel.one ? m[j+1] : (sel.two ? m[j] : 1'b0);  // second MUX with clear
  end

endmodule

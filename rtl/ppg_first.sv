// ppg_first: partial-product generator row for the first Booth digit.
//
// Driven by the ONE / NT / NO lines of booth_encoder_first, bit i+1 of the row is
// X(i+1) for ONE (+1X), ~X(i) for NT (-2X) and ~X(i+1) for NO (-1X), and 0 when no
// line is high. That is a single three-input multiplexer per bit with an implied
// clear, one mux stage deep, as in the published bit slice. Negative multiples are
// one's complement; tap_ppg supplies the +1.
//
// Row width and the extension of X (X(-1) = 0, one sign-extension bit) are the same
// as in ppg_booth. Combinational.
module ppg_first
  import fir_pkg::*;
(
  input  sample_t          x,
  input  booth_first_sel_t sel,
  output pp_row_t          pp
);

  logic [PPW:0] xe;   // xe[k] = X(k-1)

  always_comb begin
    xe = {x[DW-1], x, 1'b0};
    for (int j = 0; j < PPW; j++)
      pp[j] = sel.one ? xe[j+1] :
              sel.nt  ? ~xe[j]  :
              sel.no  ? ~xe[j+1] : 1'b0;
  end

endmodule

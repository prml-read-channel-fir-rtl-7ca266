// booth_encoder_first: simplified Booth encoder of a tap's first partial product.
//
// The lowest Booth digit has Y(-1) = 0, so only Y1 Y0 matter and +2X can never be
// asked for. The four cases map to: "00" clear (0X), "01" ONE (+1X), "10" NT (-2X),
// "11" NO (-1X); at most one output is high. This three-line encoding, with its
// signal names, follows the filter's published table. Combinational.
module booth_encoder_first
  import fir_pkg::*;
(
  input  logic [1:0]       y,    // {Y1, Y0}
  output booth_first_sel_t sel
);

  always_comb begin
    sel.one = ~y[1] &  y[0];
    sel.nt  =  y[1] & ~y[0];
    sel.no  =  y[1] &  y[0];
  end

endmodule

// booth_encoder: radix-4 (modified) Booth encoder for the second and third partial
// products of a tap.
//
// It looks at three coefficient bits Y(2i+1) Y(2i) Y(2i-1) and raises ONE (use 1X),
// TWO (use 2X) and NEG (the multiple is negative) exactly as the filter's encoding
// table prescribes. For "000" and "111" neither ONE nor TWO is raised, so the
// partial-product generator clears its row; NEG is still 1 for "111", which is why
// the tap PPG only asks for a two's-complement correction when the row is not clear.
// Purely combinational; no clock.
module booth_encoder
  import fir_pkg::*;
(
  input  logic [2:0]  y,    // {Y(2i+1), Y(2i), Y(2i-1)}
  output booth_sel_t  sel
);

  always_comb begin
    sel.one = y[1] ^ y[0];
    sel.two = (y[2] & ~y[1] & ~y[0]) | (~y[2] & y[1] & y[0]);
    sel.neg = y[2];
  end

endmodule

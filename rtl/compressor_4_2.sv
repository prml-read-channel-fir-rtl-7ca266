// compressor_4_2: one row of compact 4:2 compressors.
//
// Four W-bit rows are reduced to a sum row s and a carry row cy with
// a + b + c + d == s + cy (mod 2^W). Each column cell takes a, b, c, d and a
// lateral carry ci from the column to its right and gives
//   co    = (a ^ b) ? c : a            (lateral carry to the left, independent of ci)
//   sum   = (a ^ b ^ c ^ d) ? ~ci : ci
//   carry = (a ^ b ^ c ^ d) ?  ci : d
// which is the usual compact cell: three XOR/MUX levels and no rippling, because co
// does not depend on ci. Column 0 gets ci = 0; carries out of the top column are
// dropped. The published design names the compact 4:2 compressor and its three mux stages
// but does not draw the cell; these equations are this design's choice.
// Combinational.
module compressor_4_2 #(
  parameter int unsigned W = 15
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  input  logic [W-1:0] d,
  output logic [W-1:0] s,
  output logic [W-1:0] cy
);

  logic [W-1:0] t, v, co, ca;
  logic [W:0]   ci;

  always_comb begin
    ci[0] = 1'b0;
    for (int k = 0; k < W; k++) begin
      t[k]    = a[k] ^ b[k];
      co[k]   = t[k] ? c[k] : a[k];
      ci[k+1] = co[k];
      v[k]    = t[k] ^ c[k] ^ d[k];
      s[k]    = v[k] ? ~ci[k] : ci[k];
      ca[k]   = v[k] ?  ci[k] : d[k];
    end
    cy = {ca[W-2:0], 1'b0};
  end

endmodule

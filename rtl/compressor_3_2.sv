// compressor_3_2: one row of 3:2 compressors (a carry-save adder).
//
// Three W-bit rows a, b, c are reduced to a sum row s and a carry row cy with
// a + b + c == s + cy (mod 2^W). Each column is a full adder written in the
// multiplexer form used throughout the filter: p = a ^ b, sum = p ? ~c : c,
// carry = p ? c : a. The carry of column k lands in column k+1 of cy, so cy[0] is
// always 0 and the carry out of the top column is dropped (the filter works
// modulo 2^W). No carry ripples across columns. Combinational.
module compressor_3_2 #(
  parameter int unsigned W = 15
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] s,
  output logic [W-1:0] cy
);

  logic [W-1:0] p, co;

  always_comb begin
    for (int k = 0; k < W; k++) begin
      p[k]  = a[k] ^ b[k];
      s[k]  = p[k] ? ~c[k] : c[k];
      co[k] = p[k] ?  c[k] : a[k];
    end
    cy = {co[W-2:0], 1'b0};
  end

endmodule

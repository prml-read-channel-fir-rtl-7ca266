// final_adder: the carry-select adder that turns the two carry-save rows into the
// filter output.
//
// The operands are cut into 4-bit blocks of conditional sum adders:
//   bits 3:0   one adder with carry-in 0, giving the carry into bit 4 (c4);
//   bits 7:4   two adders, for carry-in 0 and 1; c4 selects sum and carry (c8);
//   bits 11:8  two adders likewise; c8 selects the sum;
//   bits W-1:12 a conditional cell computes the top bits for carry-in 0 and 1.
// The top block does not wait for the carry out of bits 11:8: two "carry select
// zero / one" muxes pick its result once with that block's carry-out for c8 = 0
// (C0) and once with the one for c8 = 1 (C1), and a last mux chooses with c8.
// The critical path is then the 4-bit adder (three mux stages) plus two selects,
// five mux stages, as published. Five 4-bit conditional sum adders in all.
//
// The published block diagram ends with a one-bit conditional cell on bits a12/b12
// producing S12 and S13, while the text calls the adder 15 bits wide; here the top
// cell spans bits 12 to W-1 (three bits for W = 15) so that all 15 output bits are
// sums, and the carry out of bit W-1 is dropped (the datapath is modulo 2^W).
// Combinational.
module final_adder #(
  parameter int unsigned W = 15
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] s
);

  localparam int unsigned TW = W - 12;   // width of the top conditional cell

  logic [3:0] sb0;          logic cb0;
  logic [3:0] sb1 [2];      logic cb1 [2];
  logic [3:0] sb2 [2];      logic cb2 [2];
  logic [TW-1:0] st [2];    // top cell result for carry-in 0 / 1
  logic c4, c8;
  logic [TW-1:0] st_zero, st_one;

  cond_sum_adder_4b u_b0 (.a(a[3:0]), .b(b[3:0]), .cin(1'b0), .s(sb0), .cout(cb0));

  for (genvar x = 0; x < 2; x++) begin : g_sel
    cond_sum_adder_4b u_b1 (.a(a[7:4]),  .b(b[7:4]),  .cin(x[0]), .s(sb1[x]), .cout(cb1[x]));
    cond_sum_adder_4b u_b2 (.a(a[11:8]), .b(b[11:8]), .cin(x[0]), .s(sb2[x]), .cout(cb2[x]));
  end

  // Conditional cell of the top bits.
  always_comb begin
    st[0] = a[W-1:12] + b[W-1:12];
    st[1] = a[W-1:12] + b[W-1:12] + TW'(1);
  end

  always_comb begin
    c4      = cb0;
    c8      = c4 ? cb1[1] : cb1[0];
    st_zero = cb2[0] ? st[1] : st[0];   // carry select zero (block 2 carry-in 0)
    st_one  = cb2[1] ? st[1] : st[0];   // carry select one  (block 2 carry-in 1)
    s[3:0]    = sb0;
    s[7:4]    = c4 ? sb1[1] : sb1[0];
    s[11:8]   = c8 ? sb2[1] : sb2[0];
    s[W-1:12] = c8 ? st_one : st_zero;
  end

endmodule

// fir_pkg: sizes and shared types of the 8-tap, 6-bit PRML equalizer FIR filter.
//
// The filter multiplies each of 8 delayed 6-bit two's-complement samples by a 6-bit
// two's-complement coefficient with radix-4 (modified) Booth recoding, giving three
// partial-product rows per tap (24 in all). The rows are reduced to two by a
// compressor tree and added by a 15-bit carry-select / conditional-sum adder.
// The 8 taps, the 6-bit data and coefficients, the 15-bit result and the three
// rows per tap follow the filter's published description; the type names are
// this design's own.
package fir_pkg;

  parameter int unsigned TAPS   = 8;   // filter taps
  parameter int unsigned DW     = 6;   // input sample width (two's complement)
  parameter int unsigned CW     = 6;   // coefficient width (two's complement)
  parameter int unsigned OW     = 15;  // output / compressor row width
  parameter int unsigned PPW    = DW + 1;  // width of one Booth partial-product row
  parameter int unsigned NPP    = CW / 2;  // partial products per tap (3)

  // Control lines of one radix-4 Booth digit (second and third rows).
  typedef struct packed {
    logic one;  // select 1X
    logic two;  // select 2X
    logic neg;  // invert (negative multiple)
  } booth_sel_t;

  // Control lines of the first Booth digit, whose lowest bit Y(-1) is always 0.
  typedef struct packed {
    logic one;  // +1X
    logic nt;   // -2X
    logic no;   // -1X
  } booth_first_sel_t;

  // Sign-extension elimination: the top bit of every partial-product row is
  // inverted when the row enters the compressor tree, which adds 2^(PPW-1) to the
  // row's weight-aligned value. This constant undoes that for all TAPS*NPP rows,
  // modulo 2^OW.
  function automatic logic [OW-1:0] sign_ext_const(logic [OW-1:0] taps);
    logic [OW-1:0] acc;
    acc = '0;
    for (int unsigned i = 0; i < NPP; i++)
      acc = acc + (taps << (PPW - 1 + 2 * i));
    return -acc;
  endfunction

  typedef logic [DW-1:0]  sample_t;
  typedef logic [CW-1:0]  coef_t;
  typedef logic [PPW-1:0] pp_row_t;
  typedef logic [OW-1:0]  row_t;

endpackage

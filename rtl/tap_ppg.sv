// tap_ppg: the partial-product generator of one filter tap.
//
// It Booth-recodes the tap's 6-bit coefficient into three digits and produces three
// partial-product rows of the 6-bit sample: row 0 (weight 1) from ppg_first with
// the simplified encoding, rows 1 and 2 (weights 4 and 16) from ppg_booth with the
// standard modified Booth encoding. Rows of negative multiples are in one's
// complement, so the tap also emits one sign-conversion bit per row, conv[i], whose
// weight is that of row i's least significant bit (4^i). conv[i] is 1 only when the
// row is negative and not cleared: the encoding of "111" sets NEG with neither ONE
// nor TWO, and the row is then a true zero that must not be corrected.
// An immediate assertion checks that each digit selects at most one multiple.
// The gating is this design's choice; the published design states only that sign-conversion
// bits are added. Combinational.
module tap_ppg
  import fir_pkg::*;
(
  input  sample_t  x,          // sample X
  input  coef_t    coef,       // coefficient Y
  output pp_row_t  pp [NPP],   // pp[i] has weight 4^i
  output logic [NPP-1:0] conv  // two's-complement conversion bit of each row
);

  booth_first_sel_t sel0;
  booth_sel_t       sel [1:NPP-1];

  booth_encoder_first u_enc0 (.y(coef[1:0]), .sel(sel0));
  ppg_first           u_ppg0 (.x(x), .sel(sel0), .pp(pp[0]));

  for (genvar i = 1; i < NPP; i++) begin : g_digit
    booth_encoder u_enc (.y(coef[2*i+1 -: 3]), .sel(sel[i]));
    ppg_booth     u_ppg (.x(x), .sel(sel[i]), .pp(pp[i]));
  end

  // The encoders raise at most one multiple select per digit.
  always_comb begin
    assert ((32'(sel0.one) + 32'(sel0.nt) + 32'(sel0.no)) <= 1)
      else $error("first Booth digit selects more than one multiple");
    for (int i = 1; i < NPP; i++)
      assert (!(sel[i].one && sel[i].two))
        else $error("Booth digit %0d selects both 1X and 2X", i);
  end

  always_comb begin
    conv[0] = sel0.nt | sel0.no;
    for (int i = 1; i < NPP; i++)
      conv[i] = sel[i].neg & (sel[i].one | sel[i].two);
  end

endmodule

// tb_ppg_first: exhaustive test of the first-row partial-product generator. For
// every sample X and each of clear, ONE (+1X), NT (-2X) and NO (-1X), the signed
// 7-bit row plus 1 for the negative cases must equal multiple * X.
module tb_ppg_first;
  import fir_pkg::*;

  sample_t          x;
  booth_first_sel_t sel;
  pp_row_t          pp;
  int checks = 0, failures = 0;

  ppg_first dut (.x(x), .sel(sel), .pp(pp));

  localparam logic [2:0] SELS [4] = '{3'b000, 3'b100, 3'b010, 3'b001};  // {ONE,NT,NO}
  localparam int         MULT [4] = '{0, 1, -2, -1};

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v, corr;
    for (int s = 0; s < 4; s++) begin
      for (int xv = -32; xv < 32; xv++) begin
        x = sample_t'(xv);
        {sel.one, sel.nt, sel.no} = SELS[s];
        #1;
        corr = (sel.nt || sel.no) ? 1 : 0;
        v = int'($signed(pp)) + corr;
        checks++;
        if (v != MULT[s] * xv) begin
          failures++;
          if (failures < 10)
            $display("X=%0d mult=%0d: row %b (+%0d) = %0d", xv, MULT[s], pp, corr, v);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

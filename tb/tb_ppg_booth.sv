// tb_ppg_booth: exhaustive test of the second/third-row partial-product generator.
// For every 6-bit sample X and every legal select combination (0, +1X, +2X, -1X,
// -2X and the cleared negative "111" case) the 7-bit row, read as a signed number,
// plus 1 when the multiple is negative and not cleared, must equal multiple * X.
module tb_ppg_booth;
  import fir_pkg::*;

  sample_t    x;
  booth_sel_t sel;
  pp_row_t    pp;
  int checks = 0, failures = 0;

  ppg_booth dut (.x(x), .sel(sel), .pp(pp));

  // {ONE, TWO, NEG} and the multiple it stands for
  localparam logic [2:0] SELS [6] = '{3'b000, 3'b100, 3'b010, 3'b101, 3'b011, 3'b001};
  localparam int         MULT [6] = '{0, 1, 2, -1, -2, 0};

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v, corr;
    for (int s = 0; s < 6; s++) begin
      for (int xv = -32; xv < 32; xv++) begin
        x = sample_t'(xv);
        {sel.one, sel.two, sel.neg} = SELS[s];
        #1;
        corr = (sel.neg && (sel.one || sel.two)) ? 1 : 0;
        v = int'($signed(pp)) + corr;
        checks++;
        if (v != MULT[s] * xv) begin
          failures++;
          if (failures < 10)
            $display("X=%0d mult=%0d: row %b (+%0d) = %0d", xv, MULT[s], pp, corr, v);
        end
        if (s == 0 || s == 5) begin   // cleared row must be all zeros
          checks++;
          if (pp !== '0) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

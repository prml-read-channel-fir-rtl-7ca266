// tb_tap_ppg: exhaustive test of one tap's partial-product generator. For all
// 64 x 64 sample/coefficient pairs, the three rows (signed, weights 1, 4, 16) plus
// their conversion bits at the same weights must add up to sample * coefficient.
// It also checks that the cleared "111" digit gets no conversion bit.
module tb_tap_ppg;
  import fir_pkg::*;

  sample_t        x;
  coef_t          coef;
  pp_row_t        pp [NPP];
  logic [NPP-1:0] conv;
  int checks = 0, failures = 0;

  tap_ppg dut (.x(x), .coef(coef), .pp(pp), .conv(conv));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int acc;
    for (int cv = -32; cv < 32; cv++) begin
      for (int xv = -32; xv < 32; xv++) begin
        x = sample_t'(xv);
        coef = coef_t'(cv);
        #1;
        acc = 0;
        for (int i = 0; i < NPP; i++)
          acc += (int'($signed(pp[i])) + int'(conv[i])) * (4 ** i);
        checks++;
        if (acc != xv * cv) begin
          failures++;
          if (failures < 10) $display("X=%0d C=%0d: sum %0d", xv, cv, acc);
        end
      end
      // digit "111" of the top row (coef bits 5:3) must not request a correction
      if (coef[5:3] == 3'b111) begin
        checks++;
        if (conv[2] !== 1'b0) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

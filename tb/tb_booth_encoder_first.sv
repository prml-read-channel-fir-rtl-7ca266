// tb_booth_encoder_first: checks the first-digit Booth encoder against its table:
// "00" clear, "01" ONE (+1X), "10" NT (-2X), "11" NO (-1X).
module tb_booth_encoder_first;
  import fir_pkg::*;

  logic [1:0]       y;
  booth_first_sel_t sel;
  int checks = 0, failures = 0;

  booth_encoder_first dut (.y(y), .sel(sel));

  // {ONE, NT, NO} per input code 0..3
  localparam logic [2:0] TABLE [4] = '{3'b000, 3'b100, 3'b010, 3'b001};

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 4; c++) begin
      y = 2'(c);
      #1;
      checks++;
      if ({sel.one, sel.nt, sel.no} !== TABLE[c]) begin
        failures++;
        $display("code %02b: got ONE=%b NT=%b NO=%b", y, sel.one, sel.nt, sel.no);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

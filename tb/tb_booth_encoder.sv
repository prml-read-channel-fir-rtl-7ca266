// tb_booth_encoder: checks the modified Booth encoder against the encoding table
// (ONE, TWO, NEG for every value of Y(2i+1) Y(2i) Y(2i-1)), written out here as
// literals, for all eight inputs.
module tb_booth_encoder;
  import fir_pkg::*;

  logic [2:0] y;
  booth_sel_t sel;
  int checks = 0, failures = 0;

  booth_encoder dut (.y(y), .sel(sel));

  // {ONE, TWO, NEG} per input code 0..7
  localparam logic [2:0] TABLE [8] = '{3'b000, 3'b100, 3'b100, 3'b010,
                                        3'b011, 3'b101, 3'b101, 3'b001};

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 8; c++) begin
      y = 3'(c);
      #1;
      checks++;
      if ({sel.one, sel.two, sel.neg} !== TABLE[c]) begin
        failures++;
        $display("code %03b: got ONE=%b TWO=%b NEG=%b", y, sel.one, sel.two, sel.neg);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_final_adder: tests the 15-bit carry-select final adder against a + b modulo
// 2^15 on random operands and on operands built to drive every combination of the
// carries into bits 4, 8 and 12 (including the case where the top cell's result
// must be taken with the carry of the upper 4-bit block for a carry-in of 1).
module tb_final_adder;
  localparam int W = 15;
  logic [W-1:0] a, b, s;
  int checks = 0, failures = 0;
  int combo [8];

  final_adder dut (.a(a), .b(b), .s(s));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    logic [4:0]  l4;
    logic [8:0]  l8;
    logic [12:0] l12;
    #1;
    checks++;
    if (s !== W'(a + b)) begin
      failures++;
      if (failures < 10) $display("%h + %h: got %h", a, b, s);
    end
    l4  = {1'b0, a[3:0]}  + {1'b0, b[3:0]};
    l8  = {1'b0, a[7:0]}  + {1'b0, b[7:0]};
    l12 = {1'b0, a[11:0]} + {1'b0, b[11:0]};
    combo[{l4[4], l8[8], l12[12]}]++;
  endtask

  initial begin
    a = '1; b = 15'd1; check();     // carry ripples through every block
    a = 15'h0FFF; b = 15'h0001; check();
    a = 15'h00F0; b = 15'h0010; check();
    for (int n = 0; n < 50000; n++) begin
      a = W'($urandom); b = W'($urandom);
      check();
    end
    for (int k = 0; k < 8; k++) begin
      checks++;
      if (combo[k] == 0) begin
        failures++;
        $display("carry combination %03b never seen", k[2:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

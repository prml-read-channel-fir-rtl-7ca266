// tb_cond_sum_adder_4b: exhaustive test of the 4-bit conditional sum adder over all
// operand pairs and both carry-ins: {cout, s} must equal a + b + cin.
module tb_cond_sum_adder_4b;
  logic [3:0] a, b, s;
  logic       cin, cout;
  int checks = 0, failures = 0;

  cond_sum_adder_4b dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ci = 0; ci < 2; ci++)
      for (int av = 0; av < 16; av++)
        for (int bv = 0; bv < 16; bv++) begin
          a = 4'(av); b = 4'(bv); cin = ci[0];
          #1;
          checks++;
          if ({cout, s} !== 5'(av + bv + ci)) begin
            failures++;
            if (failures < 10) $display("%0d+%0d+%0d: got %0d", av, bv, ci, {cout, s});
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

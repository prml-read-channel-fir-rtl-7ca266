// tb_compressor_3_2: random and corner-case test of the 3:2 compressor row. The two
// outputs must add to a + b + c modulo 2^W, the sum row must be the bitwise parity
// and the carry row's bit 0 must be 0.
module tb_compressor_3_2;
  localparam int W = 15;
  logic [W-1:0] a, b, c, s, cy;
  int checks = 0, failures = 0;

  compressor_3_2 dut (.a(a), .b(b), .c(c), .s(s), .cy(cy));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    logic [W-1:0] want;
    #1;
    want = a + b + c;
    checks++;
    if (W'(s + cy) !== want || s !== (a ^ b ^ c) || cy[0] !== 1'b0) begin
      failures++;
      if (failures < 10) $display("a=%h b=%h c=%h: s=%h cy=%h", a, b, c, s, cy);
    end
  endtask

  initial begin
    a = '1; b = '1; c = '1; check();
    a = '0; b = '0; c = '0; check();
    a = '1; b = '0; c = '1; check();
    for (int n = 0; n < 20000; n++) begin
      a = W'($urandom); b = W'($urandom); c = W'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

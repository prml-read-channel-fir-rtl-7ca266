// tb_compressor_4_2: random and corner-case test of the 4:2 compressor row: the sum
// and carry rows must add to a + b + c + d modulo 2^W, and the sum row must be the
// parity of the four inputs and the lateral carries.
module tb_compressor_4_2;
  localparam int W = 15;
  logic [W-1:0] a, b, c, d, s, cy;
  int checks = 0, failures = 0;

  compressor_4_2 dut (.a(a), .b(b), .c(c), .d(d), .s(s), .cy(cy));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    logic [W-1:0] want;
    #1;
    want = a + b + c + d;
    checks++;
    if (W'(s + cy) !== want || cy[0] !== 1'b0) begin
      failures++;
      if (failures < 10) $display("a=%h b=%h c=%h d=%h: s=%h cy=%h", a, b, c, d, s, cy);
    end
  endtask

  initial begin
    a = '1; b = '1; c = '1; d = '1; check();
    a = '0; b = '0; c = '0; d = '0; check();
    a = '1; b = '1; c = '1; d = '0; check();
    a = '0; b = '1; c = '0; d = '1; check();
    for (int n = 0; n < 20000; n++) begin
      a = W'($urandom); b = W'($urandom); c = W'($urandom); d = W'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

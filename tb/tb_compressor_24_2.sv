// tb_compressor_24_2: random test of the 24:2 compressor. Arbitrary 7-bit rows,
// conversion bits and correction row go in; one clock later (the pipeline register
// after the first 4:2 level) the two output rows must add, modulo 2^15, to
//   sum over taps and rows of signed(row) * 4^i  +  conv0 + 4*conv1  +  corr
//   + TAPS * (2^6 + 2^8 + 2^10)
// where the last term is what inverting each row's sign bit adds.
module tb_compressor_24_2;
  import fir_pkg::*;

  logic       clk = 1'b0, rst_n;
  pp_row_t    pp   [TAPS][NPP];
  logic [1:0] conv [TAPS];
  row_t       corr, sum_row, carry_row;
  int checks = 0, failures = 0;

  compressor_24_2 dut (.clk(clk), .rst_n(rst_n), .pp(pp), .conv(conv), .corr(corr),
                       .sum_row(sum_row), .carry_row(carry_row));

  always #5 clk = ~clk;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic row_t expected();
    int acc;
    acc = int'(corr) + TAPS * (64 + 256 + 1024);
    for (int t = 0; t < TAPS; t++) begin
      for (int i = 0; i < NPP; i++) acc += int'($signed(pp[t][i])) * (4 ** i);
      acc += int'(conv[t][0]) + 4 * int'(conv[t][1]);
    end
    return row_t'(acc);
  endfunction

  initial begin
    row_t want;
    rst_n = 1'b0;
    for (int t = 0; t < TAPS; t++) begin
      for (int i = 0; i < NPP; i++) pp[t][i] = '0;
      conv[t] = '0;
    end
    corr = '0;
    @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 20000; n++) begin
      for (int t = 0; t < TAPS; t++) begin
        for (int i = 0; i < NPP; i++) pp[t][i] = pp_row_t'($urandom);
        conv[t] = 2'($urandom);
      end
      corr = row_t'($urandom);
      if (n % 1000 == 0)   // extreme: every row all ones
        for (int t = 0; t < TAPS; t++) begin
          for (int i = 0; i < NPP; i++) pp[t][i] = '1;
          conv[t] = '1;
        end
      want = expected();
      @(negedge clk);
      checks++;
      if (row_t'(sum_row + carry_row) !== want) begin
        failures++;
        if (failures < 10) $display("n=%0d: %h expected %h", n, row_t'(sum_row + carry_row), want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

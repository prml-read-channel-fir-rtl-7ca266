// tb_input_delay: drives a random sample stream into the delay line and checks that
// tap k shows the sample from k clocks earlier (0 before any sample has arrived,
// after reset), over many cycles and across a mid-stream reset.
module tb_input_delay;
  import fir_pkg::*;

  logic    clk = 1'b0, rst_n;
  sample_t din;
  sample_t x_tap [TAPS];
  int checks = 0, failures = 0;
  sample_t hist [TAPS];

  input_delay dut (.clk(clk), .rst_n(rst_n), .din(din), .x_tap(x_tap));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int n);
    for (int c = 0; c < n; c++) begin
      din = sample_t'($urandom);
      for (int k = TAPS - 1; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = din;
      #1;
      for (int k = 0; k < TAPS; k++) begin
        checks++;
        if (x_tap[k] !== hist[k]) begin
          failures++;
          if (failures < 10) $display("cycle %0d tap %0d: %0d expected %0d", c, k, x_tap[k], hist[k]);
        end
      end
      @(negedge clk);
    end
  endtask

  initial begin
    din = '0;
    rst_n = 1'b0;
    for (int k = 0; k < TAPS; k++) hist[k] = '0;
    @(negedge clk);
    rst_n = 1'b1;
    run(500);
    rst_n = 1'b0;
    #1;
    rst_n = 1'b1;
    for (int k = 0; k < TAPS; k++) hist[k] = '0;
    run(500);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

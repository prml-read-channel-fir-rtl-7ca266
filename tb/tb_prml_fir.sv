// tb_prml_fir: end-to-end test of the 8-tap PRML FIR filter at its default size.
//
// A reference model in plain integer arithmetic keeps the last 8 samples and the
// coefficients in force when each sample entered, and predicts
//   y(n) = sum_t coef_n[t] * x(n - t)
// which must appear on dout exactly four clocks later (the filter's four pipeline
// stages). Phases: reset, an impulse that measures the latency, the two full-scale
// extremes, a long random run in which the coefficients are re-programmed at random
// moments, and a reset in the middle of a stream. The test counts how often each
// mechanism of the design was exercised (every Booth digit code in the first and the
// other rows, the cleared "111" digit, carries into each block of the final adder,
// coefficient changes, full-scale results, mid-stream reset) and fails any that never
// occurred.
module tb_prml_fir;
  import fir_pkg::*;

  localparam int LAT    = 4;
  localparam int NRAND  = 30000;

  logic    clk = 1'b0;
  logic    rst_n;
  sample_t din;
  coef_t   coef [TAPS];
  row_t    dout;

  int checks = 0, failures = 0;

  prml_fir dut (.clk(clk), .rst_n(rst_n), .din(din), .coef(coef), .dout(dout));

  always #5 clk = ~clk;

  initial begin
    repeat (NRAND + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- reference model ----------------------------------------------------
  int hist [TAPS];          // hist[t] = x(n - t)
  int expq [$];             // expected outputs, oldest first
  int n_applied = 0;

  // mechanism counters
  int cnt_first_code [4];
  int cnt_booth_code [8];
  int cnt_c4 = 0, cnt_c8 = 0, cnt_c12 = 0, cnt_coef_change = 0;
  int cnt_full_pos = 0, cnt_full_neg = 0, cnt_midreset = 0;

  function automatic int sext6(logic [5:0] v);
    return int'($signed(v));
  endfunction

  function automatic int sext15(logic [14:0] v);
    return int'($signed(v));
  endfunction

  task automatic clear_model();
    for (int t = 0; t < TAPS; t++) hist[t] = 0;
    expq.delete();
  endtask

  // Apply one sample (and the current coef) at a falling edge, check the output
  // that belongs to the sample applied LAT clocks earlier.
  task automatic step(input int x, input bit check_out);
    int y;
    // check before changing inputs: dout belongs to sample n_applied - LAT
    if (check_out && expq.size() >= LAT) begin
      int e;
      e = expq.pop_front();
      checks++;
      if (sext15(dout) !== e) begin
        failures++;
        if (failures < 10)
          $display("mismatch at sample %0d: dout=%0d expected %0d",
                   n_applied - LAT, sext15(dout), e);
      end
      if (e == 8192)  cnt_full_pos++;
      if (e == -7936) cnt_full_neg++;
    end
    din = sample_t'(x);
    for (int t = TAPS - 1; t > 0; t--) hist[t] = hist[t-1];
    hist[0] = x;
    y = 0;
    for (int t = 0; t < TAPS; t++) begin
      y += sext6(coef[t]) * hist[t];
      cnt_first_code[coef[t][1:0]]++;
      cnt_booth_code[coef[t][3:1]]++;
      cnt_booth_code[coef[t][5:3]]++;
    end
    expq.push_back(y);
    n_applied++;
    @(negedge clk);
  endtask

  // Carries into the final adder's blocks, recomputed from its operand rows.
  always @(posedge clk) if (rst_n) begin
    logic [4:0]  lo4;
    logic [8:0]  lo8;
    logic [12:0] lo12;
    lo4  = {1'b0, dut.sum_q[3:0]}  + {1'b0, dut.carry_q[3:0]};
    lo8  = {1'b0, dut.sum_q[7:0]}  + {1'b0, dut.carry_q[7:0]};
    lo12 = {1'b0, dut.sum_q[11:0]} + {1'b0, dut.carry_q[11:0]};
    if (lo4[4])   cnt_c4++;
    if (lo8[8])   cnt_c8++;
    if (lo12[12]) cnt_c12++;
  end

  initial begin
    int x, lat_seen;
    din = '0;
    for (int t = 0; t < TAPS; t++) coef[t] = coef_t'($urandom);
    rst_n = 1'b0;
    clear_model();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // ---- reset state: output 0 ----------------------------------------------
    repeat (LAT + 2) begin
      checks++;
      if (dout !== '0) begin failures++; $display("dout not 0 after reset"); end
      @(negedge clk);
    end

    // ---- latency: an impulse must appear exactly LAT clocks later -------------
    for (int t = 0; t < TAPS; t++) coef[t] = coef_t'(t + 1);
    din = 6'd1;
    @(negedge clk);
    din = '0;
    lat_seen = -1;
    for (int k = 1; k <= 12; k++) begin
      if (lat_seen < 0 && dout != '0) lat_seen = k;
      @(negedge clk);
    end
    checks++;
    if (lat_seen != LAT) begin
      failures++;
      $display("latency %0d clocks, expected %0d", lat_seen, LAT);
    end
    repeat (TAPS) @(negedge clk);
    clear_model();

    // ---- full-scale extremes -----------------------------------------------
    for (int t = 0; t < TAPS; t++) coef[t] = 6'b100000;      // -32
    repeat (TAPS + LAT + 1) step(-32, 1'b1);                 // -> +8192
    for (int t = 0; t < TAPS; t++) coef[t] = 6'b011111;      // +31
    repeat (TAPS + LAT + 1) step(-32, 1'b1);                 // -> -7936

    // ---- random run with coefficient re-programming ---------------------------
    for (int n = 0; n < NRAND; n++) begin
      if (($urandom % 64) == 0) begin
        for (int t = 0; t < TAPS; t++) coef[t] = coef_t'($urandom);
        cnt_coef_change++;
      end else if (($urandom % 16) == 0) begin
        coef[$urandom % TAPS] = coef_t'($urandom);
        cnt_coef_change++;
      end
      x = int'($signed(6'($urandom)));
      step(x, 1'b1);
    end
    repeat (LAT) step(0, 1'b1);

    // ---- reset in the middle of a stream --------------------------------------
    for (int n = 0; n < 20; n++) step(int'($signed(6'($urandom))), 1'b0);
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    cnt_midreset++;
    clear_model();
    for (int n = 0; n < 3 * TAPS; n++) step(int'($signed(6'($urandom))), 1'b1);
    repeat (LAT) step(0, 1'b1);

    // ---- mechanism coverage ----------------------------------------------------
    for (int c = 0; c < 4; c++) begin
      checks++;
      if (cnt_first_code[c] == 0) begin failures++; $display("first digit code %0d never seen", c); end
    end
    for (int c = 0; c < 8; c++) begin
      checks++;
      if (cnt_booth_code[c] == 0) begin failures++; $display("Booth digit code %0d never seen", c); end
    end
    checks++; if (cnt_c4 == 0)  begin failures++; $display("no carry into bits 7:4"); end
    checks++; if (cnt_c8 == 0)  begin failures++; $display("no carry into bits 11:8"); end
    checks++; if (cnt_c12 == 0) begin failures++; $display("no carry into the top cell"); end
    checks++; if (cnt_coef_change == 0) begin failures++; $display("no coefficient change"); end
    checks++; if (cnt_full_pos == 0) begin failures++; $display("+8192 never checked"); end
    checks++; if (cnt_full_neg == 0) begin failures++; $display("-7936 never checked"); end
    checks++; if (cnt_midreset == 0) begin failures++; $display("no mid-stream reset"); end

    $display("coverage: first-digit codes %p, Booth codes %p", cnt_first_code, cnt_booth_code);
    $display("coverage: carry into b1 %0d, b2 %0d, top %0d, coef changes %0d, +full %0d, -full %0d, mid resets %0d",
             cnt_c4, cnt_c8, cnt_c12, cnt_coef_change, cnt_full_pos, cnt_full_neg, cnt_midreset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

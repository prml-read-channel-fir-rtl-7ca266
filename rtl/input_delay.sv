// input_delay: the input delay stage, a chain of D flip-flops on the sample input.
//
// Tap 0 sees the current sample directly and tap k sees the sample taken k clocks
// earlier, so the partial-product generators of all taps work in parallel on one
// window of the input (direct-form FIR). The registers are cleared by the
// active-low asynchronous reset; the reset is this design's choice, the chain itself
// follows the published input-stage diagram.
// Timing: x_tap[k] at cycle n equals din at cycle n-k (x_tap[0] is combinational).
module input_delay
  import fir_pkg::*;
#(
  parameter int unsigned TAPS_P = TAPS,
  parameter int unsigned W      = DW
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] din,
  output logic [W-1:0] x_tap [TAPS_P]
);

  logic [W-1:0] dly [1:TAPS_P-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 1; k < TAPS_P; k++) dly[k] <= '0;
    end else begin
      dly[1] <= din;
      for (int k = 2; k < TAPS_P; k++) dly[k] <= dly[k-1];
    end
  end

  always_comb begin
    x_tap[0] = din;
    for (int k = 1; k < TAPS_P; k++) x_tap[k] = dly[k];
  end

endmodule

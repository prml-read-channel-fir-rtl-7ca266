// cond_sum_adder_4b: 4-bit conditional sum adder.
//
// Every bit first forms, in a conditional cell, its sum and carry for both
// possible carry-ins (sum0/carry0 for carry-in 0, sum1/carry1 for carry-in 1).
// Two levels of multiplexers then merge neighbouring groups (1+1 bits, then 2+2
// bits): the upper group's pair of results is chosen by the lower group's carry
// for the same assumed carry-in. The last level picks the 4-bit result with the
// real carry-in. That gives the cell plus three mux levels; the published design counts the
// block as three mux stages. final_adder instantiates it twice, with carry-in tied
// to 0 and to 1, where it needs both results; the cell equations are this design's
// choice. Combinational.
module cond_sum_adder_4b (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       cin,
  output logic [3:0] s,
  output logic       cout
);

  // Per assumed carry-in x (index 0 or 1): sums and group carry-outs.
  logic [3:0] s1b  [2];   // level 0: single-bit conditional cells
  logic [3:0] c1b  [2];
  logic [3:0] s2b  [2];   // level 1: 2-bit groups {3:2} and {1:0}
  logic [1:0] c2b  [2];   // carry-out of group 0 (bits 1:0) and group 1 (bits 3:2)
  logic [3:0] s4b  [2];   // level 2: whole 4-bit block
  logic       c4b  [2];

  always_comb begin
    for (int x = 0; x < 2; x++) begin
      for (int k = 0; k < 4; k++) begin
        s1b[x][k] = (x == 1) ? ~(a[k] ^ b[k]) : (a[k] ^ b[k]);
        c1b[x][k] = (x == 1) ?  (a[k] | b[k]) : (a[k] & b[k]);
      end
    end
    for (int x = 0; x < 2; x++) begin
      for (int g = 0; g < 2; g++) begin
        s2b[x][2*g]   = s1b[x][2*g];
        s2b[x][2*g+1] = c1b[x][2*g] ? s1b[1][2*g+1] : s1b[0][2*g+1];
        c2b[x][g]     = c1b[x][2*g] ? c1b[1][2*g+1] : c1b[0][2*g+1];
      end
    end
    for (int x = 0; x < 2; x++) begin
      s4b[x][1:0] = s2b[x][1:0];
      s4b[x][3:2] = c2b[x][0] ? s2b[1][3:2] : s2b[0][3:2];
      c4b[x]      = c2b[x][0] ? c2b[1][1]   : c2b[0][1];
    end
    s    = cin ? s4b[1] : s4b[0];
    cout = cin ? c4b[1] : c4b[0];
  end

endmodule

// ml_parallel_adder -- multi-level parallel adder (ones counter).
//
// Counts the ones among N_IN = 2^(LEVELS+1)-1 input bits with a tree of
// ripple adders: level 1 is 2^(LEVELS-1) one-bit full adders, level 2 half
// as many two-bit adders, and so on to a single LEVELS-bit adder at the
// last level. Level l adds pairs of level l-1 results and one further input
// bit on each adder's carry-in, so the tree takes 2^LEVELS operand bits plus
// 2^(LEVELS-1) + ... + 1 carry-in bits. With the default LEVELS = 6 that is
// 32 FA, 16 2-bit, 8 3-bit, 4 4-bit, 2 5-bit and 1 6-bit adder over 64
// operand bits and 32+16+8+4+2+1 carry-ins: 127 inputs, as in the design.
// The sum needs LEVELS+1 bits (0..127); the last adder's carry-out is its
// top bit. Operand bits are bits[2^LEVELS-1:0]; the carry-ins of level l
// follow them in order of level. Purely combinational.
module ml_parallel_adder #(
  parameter int unsigned LEVELS = 6
) (
  input  logic [(2**(LEVELS+1))-2:0] bits,
  output logic [LEVELS:0]            sum
);

  // Level l holds NADD results of l+1 bits each; level 1 reads the operand
  // bits directly, every later level reads the results of the one before.
  for (genvar l = 1; l <= LEVELS; l++) begin : g_level
    localparam int unsigned NADD = 2 ** (LEVELS - l);
    localparam int unsigned CIN0 = 2 ** (LEVELS + 1) - 2 ** (LEVELS - l + 1);
    logic [l:0] res [NADD];
    for (genvar j = 0; j < NADD; j++) begin : g_add
      if (l == 1) begin : g_fa
        assign res[j] = 2'(bits[2*j]) + 2'(bits[2*j+1]) + 2'(bits[CIN0+j]);
      end else begin : g_rca
        assign res[j] = (l + 1)'(g_level[l-1].res[2*j])
                      + (l + 1)'(g_level[l-1].res[2*j+1])
                      + (l + 1)'(bits[CIN0 + j]);
      end
    end
  end

  assign sum = g_level[LEVELS].res[0];

endmodule

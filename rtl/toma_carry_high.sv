// toma_carry_high: the two upper carries of the X+Y adder, computed in the
// second logic layer from the registered c3.
//
//   c4 = g3 + c3 t3
//   c5 = g4 + g3 t4 + c3 t3 t4
//
// Both are formed in parallel from c3, so the carry chain of the five-bit
// adder is two short NAND-NAND levels rather than a ripple. c5 is the
// carry-out of X+Y ("carry A"). NAND-NAND form as in the reference
// schematic. Purely combinational.
module toma_carry_high (
  input  logic       c3,
  input  logic [4:3] g,
  input  logic [4:3] t,
  output logic       c4,
  output logic       c5
);

  logic g3_n, g4_n;
  logic n_c3t3, n_g3t4, n_c3t3t4;

  always_comb begin
    g3_n     = ~g[3];
    g4_n     = ~g[4];
    n_c3t3   = ~(c3 & t[3]);
    n_g3t4   = ~(g[3] & t[4]);
    n_c3t3t4 = ~(c3 & t[3] & t[4]);

    c4 = ~(g3_n & n_c3t3);
    c5 = ~(g4_n & n_g3t4 & n_c3t3t4);
  end

endmodule

// toma_carry_low: the three low carries of the X+Y adder, computed side by
// side in the first logic layer.
//
//   c1 = g0
//   c2 = g1 + g0 t1
//   c3 = g2 + g1 t2 + g0 t1 t2
//
// with t_i = a_i | b_i the transfer function. The sums of products are
// written in the NAND-NAND form of the reference schematic: an inverter on
// the lone generate term and a NAND per product, joined by a final NAND.
// c3 is registered and feeds toma_carry_high in the next layer.
// Purely combinational.
module toma_carry_low (
  input  logic [2:0] g,
  input  logic [2:1] t,
  output logic       c1,
  output logic       c2,
  output logic       c3
);

  logic g1_n, g2_n;
  logic n_g0t1, n_g1t2, n_g0t1t2;

  always_comb begin
    g1_n     = ~g[1];
    g2_n     = ~g[2];
    n_g0t1   = ~(g[0] & t[1]);
    n_g1t2   = ~(g[1] & t[2]);
    n_g0t1t2 = ~(g[0] & t[1] & t[2]);

    c1 = g[0];
    c2 = ~(g1_n & n_g0t1);
    c3 = ~(g2_n & n_g1t2 & n_g0t1t2);
  end

endmodule

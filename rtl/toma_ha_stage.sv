// toma_ha_stage: input summation stage of the X+Y adder.
//
// Each bit pair (a_i, b_i) goes through a half adder that gives the
// generate g_i = a_i & b_i and the propagate p_i = a_i ^ b_i. Bits 1..4
// also get an OR gate for the transfer function t_i = a_i | b_i, which the
// carry network uses in place of p_i (c_{i+1} = g_i + c_i t_i holds because
// t_i = g_i + p_i). Bit 0 needs no transfer term since the carry-in is 0.
// This follows the published structure (five half adders and four OR
// gates). Purely combinational.
module toma_ha_stage
  import toma_pkg::*;
(
  input  residue_t         a,
  input  residue_t         b,
  output residue_t         g,
  output residue_t         p,
  output logic [N-1:1]     t
);

  always_comb begin
    g = a & b;
    p = a ^ b;
    t = a[N-1:1] | b[N-1:1];
  end

endmodule

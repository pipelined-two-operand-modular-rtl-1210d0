// toma_sum_unit: sum bits of the X+Y adder.
//
//   s0 = p0,  s_i = p_i ^ c_i  (i = 1..4)
//
// where p_i = a_i ^ b_i is the half-adder propagate and c_i the carry into
// bit i (carry-in of the whole adder is 0). Four XOR gates; s0 is a wire.
// s = (x + y) mod 32. Purely combinational.
module toma_sum_unit
  import toma_pkg::*;
(
  input  residue_t     p,
  input  logic [N-1:1] c,
  output residue_t     s
);

  always_comb begin
    s = {p[N-1:1] ^ c, p[0]};
  end

endmodule

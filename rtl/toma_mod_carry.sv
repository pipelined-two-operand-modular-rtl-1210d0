// toma_mod_carry: carries c'1..c'5 of the X+Y-m adder.
//
// The second adder adds the constant m~ = 2^5 - m (the two's complement of
// -m without its sign bit) to s = (x + y) mod 32. With one operand constant
// the carry-lookahead equations collapse; they are written here in their
// general sum-of-products form
//
//   c'1 = s0 m0
//   c'2 = s1 m1 + s0 s1 m0 + s0 m0 m1
//   c'3 = s2 m2 + s1 s2 m1 + s0 s1 s2 m0 + s0 s2 m0 m1
//         + s1 m1 m2 + s0 s1 m0 m2 + s0 m0 m1 m2
//   c'4 = s3 m3 + c'3 s3 + c'3 m3
//   c'5 = s4 m4 + s3 s4 m3 + c'3 s3 s4 + c'3 s4 m3 + s3 m3 m4
//         + c'3 s3 m4 + c'3 m3 m4
//
// (m_i short for m~_i) and the constant m~ is folded in by elaboration.
// These are the expansions of c'_{i+1} = s_i m_i + (s_i + m_i) c'_i; the
// c'3 term s1 m1 m2 is what that expansion gives (a form with an extra s2
// factor would make c'3 wrong for m = 17 and m = 25). For
// the reference modulus m = 29 (m~ = 00011) they reduce to
//   c'1 = s0, c'2 = s1 + s0, c'3 = s2 (s1 + s0), c'4 = s3 c'3,
//   c'5 = c'3 s4 s3,
// i.e. an OR, an AND2 and two gates fed from c'3, as in the reference
// schematic. Like the X+Y adder, c'4 and c'5 branch from c'3 in parallel.
// c'5 is the carry-out of X+Y-m ("carry B").
//
// Parameter M: the modulus, a five-bit value 17..31 (default 29).
// Purely combinational.
module toma_mod_carry
  import toma_pkg::*;
#(
  parameter int unsigned M = M_DEFAULT
) (
  input  residue_t     s,
  output logic [N:1]   cm
);

  localparam residue_t MT = neg_m_bits(M);

  if (!modulus_ok(M)) begin : g_bad_modulus
    $error("toma_mod_carry: M must be a five-bit modulus (17..31)");
  end

  logic m0, m1, m2, m3, m4;
  assign {m4, m3, m2, m1, m0} = MT;

  always_comb begin
    cm[1] = s[0] & m0;
    cm[2] = (s[1] & m1) | (s[0] & s[1] & m0) | (s[0] & m0 & m1);
    cm[3] = (s[2] & m2) | (s[1] & s[2] & m1) | (s[0] & s[1] & s[2] & m0)
          | (s[0] & s[2] & m0 & m1) | (s[1] & m1 & m2)
          | (s[0] & s[1] & m0 & m2) | (s[0] & m0 & m1 & m2);
    cm[4] = (s[3] & m3) | (cm[3] & s[3]) | (cm[3] & m3);
    cm[5] = (s[4] & m4) | (s[3] & s[4] & m3) | (cm[3] & s[3] & s[4])
          | (cm[3] & s[4] & m3) | (s[3] & m3 & m4) | (cm[3] & s[3] & m4)
          | (cm[3] & m3 & m4);
  end

endmodule

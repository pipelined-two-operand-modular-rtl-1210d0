// toma_mod_select: last logic layer of the modular adder.
//
// Forms the sum bits of the X+Y-m adder, decides whether the result must be
// corrected and selects it:
//
//   s'_0 = h_0,   s'_i = h_i ^ c'_i  (i = 1..4)
//   carry = c5 | c'5
//   z = carry ? s' : s
//
// h_i = s_i ^ m~_i is the half sum of s with the constant m~ (s_i itself
// where m~_i = 0, its inverse where m~_i = 1); it arrives ready-made from
// the register layer in front, so the sum path here is one XOR. carry is
// set when x + y >= 32 (c5, carry A) or when (x + y) mod 32 + m~ >= 32
// (c'5, carry B), which together mean x + y >= m. The OR output drives all
// five multiplexer selects through a buffer (the NID6 cell of the
// reference layout; a plain wire in RTL). Purely combinational.
module toma_mod_select
  import toma_pkg::*;
(
  input  residue_t     s,    // (x + y) mod 32
  input  residue_t     h,    // s ^ m~
  input  logic [N-1:1] cm,   // c'1..c'4
  input  logic         c5,   // carry A: carry-out of x + y
  input  logic         cm5,  // carry B: carry-out of s + m~
  output residue_t     z
);

  residue_t s_m;   // (x + y - m) mod 32
  logic     carry;

  always_comb begin
    s_m   = {h[N-1:1] ^ cm, h[0]};
    carry = c5 | cm5;
    z     = carry ? s_m : s;
  end

endmodule

// toma_pkg: shared types and constants of the five-bit two-operand modular
// adder (TOMA) that computes z = |x + y|_m.
//
// The adder works on five-bit residues. The second adder of the pair adds
// the constant Z = 2^5 - m, which is the two's complement of -m with its
// sign bit dropped (written m~ below). For m = 29, m~ = 5'b00011.
// The moduli the structure is laid out for are the five-bit moduli
// 17..31; m = 29 is the reference configuration.
//
// The pipeline register layers carry named bundles; the structs below give
// the contents of the first two layers, bit for bit, in the order the
// flip-flops sit in the reference schematic (most significant bit first).
package toma_pkg;

  // Operand / result width of the modular adder.
  localparam int unsigned N = 5;

  // Reference modulus.
  localparam int unsigned M_DEFAULT = 29;

  typedef logic [N-1:0] residue_t;

  // Low N bits of the two's complement of -m, i.e. Z = 2^N - m.
  function automatic residue_t neg_m_bits(input int unsigned m);
    return residue_t'((1 << N) - m);
  endfunction

  // Number of ones in m~: each one costs an extra inverted-sum flip-flop in
  // the third register layer.
  function automatic int unsigned ones(input residue_t v);
    int unsigned n = 0;
    for (int i = 0; i < N; i++) n += v[i];
    return n;
  endfunction

  // A five-bit modulus: 2^(N-1) < m < 2^N.
  function automatic bit modulus_ok(input int unsigned m);
    return (m > (1 << (N - 1))) && (m < (1 << N));
  endfunction

  // Register layer 1: what the carry-lookahead part of the X+Y adder hands
  // from logic layer 1 to logic layer 2 (12 flip-flops).
  typedef struct packed {
    logic t4, g4, p4;
    logic t3, g3, p3;
    logic c3;
    logic p2, c2;
    logic p1;
    logic c1;   // c1 = g0
    logic p0;
  } layer1_t;

  // Register layer 2: the carry-out of X+Y and its five sum bits
  // (6 flip-flops).
  typedef struct packed {
    logic     c5;
    residue_t s;
  } layer2_t;

  // Register layer 3, common part: carry-outs of both adders, the sum s and
  // the carries c'2..c'4 of the X+Y-m adder (10 flip-flops). c'1 is s0 or 0
  // and needs no flip-flop; the inverted sum bits s_i' for m~_i = 1 are
  // registered separately (2 flip-flops for m = 29).
  typedef struct packed {
    logic           c5;
    logic           cm5;
    residue_t       s;
    logic [N-1:2]   cm;
  } layer3_t;

endpackage

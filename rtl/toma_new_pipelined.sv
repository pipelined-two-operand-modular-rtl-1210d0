// toma_new_pipelined: pipelined five-bit two-operand modular adder (TOMA),
// z = |x + y|_m, built from two modified carry-lookahead adders in series.
//
// The first adder forms s = (x + y) mod 32 with its carry-out c5; the
// second adds the constant m~ = 32 - m to s, giving (x + y - m) mod 32 and
// its carry-out c'5. x + y >= m exactly when c5 | c'5, and then the second
// result is the answer. Both adders replace the propagate by the transfer
// function t_i = a_i | b_i and compute their carries in two parallel
// groups: c1..c3 directly, then c4 and c5 both from c3. With one operand
// constant, the second adder's carries shrink to a handful of gates.
//
// Logic layers and register layers (PIPELINED = 1):
//   layer 1  half adders + OR gates, c1..c3         (toma_ha_stage,
//            toma_carry_low)
//   reg 1    12 FFs: t4 g4 p4 t3 g3 p3 c3 p2 c2 p1 c1 p0
//   layer 2  c4, c5 from c3; sum bits s4..s0        (toma_carry_high,
//            toma_sum_unit)
//   reg 2    6 FFs: c5 s4..s0
//   layer 3  carries c'1..c'5 of s + m~              (toma_mod_carry)
//   reg 3    10 FFs: c5 c'5 s4..s0 c'4..c'2, plus one FF of ~s_i for each
//            bit with m~_i = 1 (two for m = 29, making 12)
//   layer 4  s + m~ sum bits, carry = c5 | c'5, 5 multiplexers
//            (toma_mod_select)
// For m = 29 that is three register layers of 30 flip-flops, as in the
// published structure; this module checks the count at elaboration.
//
// Interface: clk; x, y residues in 0..M-1 (an assertion checks this: the
// adder gives wrong results for larger inputs); z = |x + y|_M.
// Timing: one new operand pair per clock; z appears three rising edges
// after x, y are applied (latency 3, throughput 1). No reset: the first
// three outputs after power-up are meaningless. With PIPELINED = 0 the
// register layers become wires and the adder is combinational.
//
// Parameters: M, the modulus, 17..31 (default 29, the reference case);
// PIPELINED (default 1).
// Design choices not fixed by the published structure: the pipeline has no
// reset, enable or valid bit; c'1 (s0 or constant 0) is taken from the s0
// flip-flop instead of being registered, which is how the flip-flop count
// of 12 in the third layer comes out.
module toma_new_pipelined
  import toma_pkg::*;
#(
  parameter int unsigned M         = M_DEFAULT,
  parameter bit          PIPELINED = 1'b1
) (
  input  logic     clk,
  input  residue_t x,
  input  residue_t y,
  output residue_t z
);

  localparam residue_t    MT      = neg_m_bits(M);
  localparam int unsigned L1_W    = $bits(layer1_t);
  localparam int unsigned L2_W    = $bits(layer2_t);
  localparam int unsigned L3_W    = $bits(layer3_t) + ones(MT);
  localparam int unsigned FF_BITS = L1_W + L2_W + L3_W;

  if (!modulus_ok(M)) begin : g_bad_modulus
    $error("toma_new_pipelined: M must be a five-bit modulus (17..31)");
  end
  if (M == 29 && FF_BITS != 30) begin : g_bad_count
    $error("toma_new_pipelined: m = 29 must use 30 pipeline flip-flops");
  end

  // ---------------------------------------------------------------- layer 1
  residue_t     g, p;
  logic [N-1:1] t;
  logic         c1, c2, c3;
  layer1_t      l1_d, l1_q;

  toma_ha_stage u_ha (.a(x), .b(y), .g(g), .p(p), .t(t));

  toma_carry_low u_clo (
    .g (g[2:0]), .t (t[2:1]),
    .c1(c1), .c2(c2), .c3(c3)
  );

  always_comb begin
    l1_d = '{t4: t[4], g4: g[4], p4: p[4],
             t3: t[3], g3: g[3], p3: p[3],
             c3: c3, p2: p[2], c2: c2, p1: p[1], c1: c1, p0: p[0]};
  end

  toma_pipe_reg #(.W(L1_W), .PIPELINED(PIPELINED)) u_reg1 (
    .clk(clk), .d(l1_d), .q(l1_q)
  );

  // ---------------------------------------------------------------- layer 2
  logic     c4, c5;
  residue_t s;
  layer2_t  l2_d, l2_q;

  toma_carry_high u_chi (
    .c3(l1_q.c3),
    .g ({l1_q.g4, l1_q.g3}),
    .t ({l1_q.t4, l1_q.t3}),
    .c4(c4), .c5(c5)
  );

  toma_sum_unit u_su (
    .p({l1_q.p4, l1_q.p3, l1_q.p2, l1_q.p1, l1_q.p0}),
    .c({c4, l1_q.c3, l1_q.c2, l1_q.c1}),
    .s(s)
  );

  assign l2_d = '{c5: c5, s: s};

  toma_pipe_reg #(.W(L2_W), .PIPELINED(PIPELINED)) u_reg2 (
    .clk(clk), .d(l2_d), .q(l2_q)
  );

  // ---------------------------------------------------------------- layer 3
  logic [N:1] cm;
  layer3_t    l3_d, l3_q;
  residue_t   h_q;   // s ^ m~ after register layer 3

  toma_mod_carry #(.M(M)) u_mc (.s(l2_q.s), .cm(cm));

  assign l3_d = '{c5: l2_q.c5, cm5: cm[5], s: l2_q.s, cm: cm[N-1:2]};

  toma_pipe_reg #(.W($bits(layer3_t)), .PIPELINED(PIPELINED)) u_reg3 (
    .clk(clk), .d(l3_d), .q(l3_q)
  );

  // Inverted sum bits for the positions where m~ has a one; elsewhere the
  // half sum s_i ^ m~_i is s_i itself and reuses its flip-flop.
  for (genvar i = 0; i < N; i++) begin : g_half
    if (MT[i]) begin : g_inv
      toma_pipe_reg #(.W(1), .PIPELINED(PIPELINED)) u_reg3n (
        .clk(clk), .d(~l2_q.s[i]), .q(h_q[i])
      );
    end else begin : g_pass
      assign h_q[i] = l3_q.s[i];
    end
  end

  // ---------------------------------------------------------------- layer 4
  logic [N-1:1] cm_q;
  assign cm_q = {l3_q.cm, l3_q.s[0] & MT[0]};   // c'1 = s0 m~0

  toma_mod_select u_sel (
    .s  (l3_q.s),
    .h  (h_q),
    .cm (cm_q),
    .c5 (l3_q.c5),
    .cm5(l3_q.cm5),
    .z  (z)
  );

  // Operands must be residues modulo M.
  always_ff @(posedge clk) begin
    assert (32'(x) < M && 32'(y) < M)
      else $error("toma_new_pipelined: operand not below M (x=%0d y=%0d)", x, y);
  end

endmodule

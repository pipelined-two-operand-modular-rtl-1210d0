// tb_toma_mod_carry: exhaustive check of the carries of s + m~.
// One instance per five-bit odd modulus 17..31 (the default m = 29 among
// them). For every s in 0..31 each carry c'_i must equal the integer carry
// ((s mod 2^i) + (Z mod 2^i)) >> i with Z = 32 - m. For m = 29 the carries
// are also compared with the reduced gate forms c'1 = s0, c'2 = s1 + s0,
// c'3 = s2 (s1 + s0), c'4 = s3 c'3, c'5 = s4 s3 c'3.
module tb_toma_mod_carry;
  import toma_pkg::*;

  localparam int NMOD = 8;
  localparam int unsigned MODS [NMOD] = '{17, 19, 21, 23, 25, 27, 29, 31};

  residue_t   s;
  logic [N:1] cm [NMOD];
  int checks = 0, failures = 0;

  for (genvar k = 0; k < NMOD; k++) begin : g_dut
    toma_mod_carry #(.M(MODS[k])) dut (.s(s), .cm(cm[k]));
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int sv = 0; sv < 32; sv++) begin
      s = residue_t'(sv);
      #1;
      for (int k = 0; k < NMOD; k++) begin
        int z;
        z = 32 - int'(MODS[k]);
        for (int i = 1; i <= N; i++) begin
          logic exp_c;
          exp_c = logic'(((sv % (1 << i)) + (z % (1 << i))) >> i);
          checks++;
          if (cm[k][i] !== exp_c) begin
            failures++;
            $display("m=%0d s=%0d c'%0d=%b expected %b", MODS[k], sv, i, cm[k][i], exp_c);
          end
        end
        if (MODS[k] == 29) begin
          logic e1, e2, e3, e4, e5;
          e1 = s[0];
          e2 = s[1] | s[0];
          e3 = s[2] & (s[1] | s[0]);
          e4 = s[3] & e3;
          e5 = e3 & s[4] & s[3];
          checks++;
          if (cm[k] !== {e5, e4, e3, e2, e1}) begin
            failures++;
            $display("m=29 s=%0d reduced form mismatch %b", sv, cm[k]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

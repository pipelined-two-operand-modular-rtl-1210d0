// tb_toma_mod_select: check of the correction and selection layer.
// For every modulus 17..31 and every sum x + y in 0..2m-2 (the range two
// residues can reach) the testbench forms, from integer arithmetic, the
// inputs the layer receives (s = (x+y) mod 32, h = s ^ m~, the carries of
// s + m~, and carry A = (x+y) >= 32) and expects z = (x + y) mod m.
module tb_toma_mod_select;
  import toma_pkg::*;

  residue_t     s, h, z;
  logic [N-1:1] cm;
  logic         c5, cm5;
  int checks = 0, failures = 0;

  toma_mod_select dut (.s(s), .h(h), .cm(cm), .c5(c5), .cm5(cm5), .z(z));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 17; m < 32; m++) begin
      int zc;
      zc = 32 - m;
      for (int sum = 0; sum <= 2 * m - 2; sum++) begin
        int sv;
        sv  = sum % 32;
        s   = residue_t'(sv);
        h   = residue_t'(sv) ^ residue_t'(zc);
        for (int i = 1; i < N; i++)
          cm[i] = logic'(((sv % (1 << i)) + (zc % (1 << i))) >> i);
        cm5 = logic'((sv + zc) >> 5);
        c5  = logic'(sum >> 5);
        #1;
        checks++;
        if (z !== residue_t'(sum % m)) begin
          failures++;
          $display("m=%0d x+y=%0d z=%0d expected %0d", m, sum, z, sum % m);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_toma_ha_stage: exhaustive check of the input half-adder / OR stage.
// For every pair a, b of five-bit values, each bit pair is added as a
// two-bit integer: its high bit must be g_i, its low bit p_i, and t_i
// (bits 1..4) must be 1 whenever the pair sum is non-zero.
module tb_toma_ha_stage;
  import toma_pkg::*;

  residue_t     a, b, g, p;
  logic [N-1:1] t;
  int checks = 0, failures = 0;

  toma_ha_stage dut (.a(a), .b(b), .g(g), .p(p), .t(t));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ia = 0; ia < 32; ia++) begin
      for (int ib = 0; ib < 32; ib++) begin
        a = residue_t'(ia);
        b = residue_t'(ib);
        #1;
        for (int i = 0; i < N; i++) begin
          int unsigned pair;
          pair = int'(a[i]) + int'(b[i]);
          checks++;
          if (g[i] !== pair[1] || p[i] !== pair[0]) begin
            failures++;
            $display("bit %0d a=%0d b=%0d: g=%b p=%b", i, ia, ib, g[i], p[i]);
          end
          if (i > 0) begin
            checks++;
            if (t[i] !== (pair != 0)) begin
              failures++;
              $display("bit %0d a=%0d b=%0d: t=%b", i, ia, ib, t[i]);
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

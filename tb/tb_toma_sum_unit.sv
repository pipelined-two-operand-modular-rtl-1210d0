// tb_toma_sum_unit: exhaustive check of the sum bits of x + y.
// For every pair of five-bit operands the testbench supplies p = x ^ y and
// the integer carries c_i into bits 1..4, and expects s = (x + y) mod 32.
module tb_toma_sum_unit;
  import toma_pkg::*;

  residue_t     p, s;
  logic [N-1:1] c;
  int checks = 0, failures = 0;

  toma_sum_unit dut (.p(p), .c(c), .s(s));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 32; x++) begin
      for (int y = 0; y < 32; y++) begin
        p = residue_t'(x) ^ residue_t'(y);
        for (int i = 1; i < N; i++)
          c[i] = logic'(((x % (1 << i)) + (y % (1 << i))) >> i);
        #1;
        checks++;
        if (s !== residue_t'((x + y) % 32)) begin
          failures++;
          $display("x=%0d y=%0d s=%0d", x, y, s);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

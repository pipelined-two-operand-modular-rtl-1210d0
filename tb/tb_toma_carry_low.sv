// tb_toma_carry_low: exhaustive check of the carries c1..c3 of x + y.
// For every pair of five-bit operands the generate and transfer bits are
// formed in the testbench, and each carry c_i is compared with the carry
// out of adding the low i bits as integers: ((x mod 2^i) + (y mod 2^i)) >> i.
module tb_toma_carry_low;
  logic [2:0] g;
  logic [2:1] t;
  logic       c1, c2, c3;
  int checks = 0, failures = 0;

  toma_carry_low dut (.g(g), .t(t), .c1(c1), .c2(c2), .c3(c3));

  function automatic logic carry_into(input int x, input int y, input int i);
    int lo;
    lo = (x % (1 << i)) + (y % (1 << i));
    return logic'(lo >> i);
  endfunction

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
        logic [4:0] xv, yv;
        xv = 5'(x);
        yv = 5'(y);
        g = xv[2:0] & yv[2:0];
        t = xv[2:1] | yv[2:1];
        #1;
        checks += 3;
        if (c1 !== carry_into(x, y, 1)) begin
          failures++; $display("x=%0d y=%0d c1=%b", x, y, c1);
        end
        if (c2 !== carry_into(x, y, 2)) begin
          failures++; $display("x=%0d y=%0d c2=%b", x, y, c2);
        end
        if (c3 !== carry_into(x, y, 3)) begin
          failures++; $display("x=%0d y=%0d c3=%b", x, y, c3);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

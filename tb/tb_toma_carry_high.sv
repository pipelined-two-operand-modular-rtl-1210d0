// tb_toma_carry_high: exhaustive check of the carries c4, c5 of x + y.
// For every pair of five-bit operands the testbench forms c3 and the bit-3/4
// generate and transfer terms, and compares c4 and c5 with the integer
// carries ((x mod 2^i) + (y mod 2^i)) >> i for i = 4, 5.
module tb_toma_carry_high;
  logic       c3;
  logic [4:3] g, t;
  logic       c4, c5;
  int checks = 0, failures = 0;

  toma_carry_high dut (.c3(c3), .g(g), .t(t), .c4(c4), .c5(c5));

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
        c3 = carry_into(x, y, 3);
        g  = xv[4:3] & yv[4:3];
        t  = xv[4:3] | yv[4:3];
        #1;
        checks += 2;
        if (c4 !== carry_into(x, y, 4)) begin
          failures++; $display("x=%0d y=%0d c4=%b", x, y, c4);
        end
        if (c5 !== carry_into(x, y, 5)) begin
          failures++; $display("x=%0d y=%0d c5=%b", x, y, c5);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

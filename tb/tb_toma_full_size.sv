// tb_toma_full_size: the adder with every parameter at its default
// (m = 29, pipelined), taken through all 29 * 29 operand pairs at one pair
// per clock. Each output is compared with (x + y) mod 29 of the pair
// applied exactly three rising edges earlier. Counts the three ways a
// result is formed (no correction, correction through carry A, through
// carry B only) and fails if one never happens.
module tb_toma_full_size;
  import toma_pkg::*;

  localparam int M   = 29;
  localparam int LAT = 3;

  logic     clk = 1'b0;
  residue_t x, y, z;
  int checks = 0, failures = 0;
  int n_plain = 0, n_carry_a = 0, n_carry_b = 0;
  int exp_z [$];

  toma_new_pipelined dut (.clk(clk), .x(x), .y(y), .z(z));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = '0;
    y = '0;
    @(negedge clk);
    for (int n = 0; n < M * M + LAT; n++) begin
      if (n >= LAT) begin
        int e;
        e = exp_z.pop_front();
        checks++;
        if (int'(z) != e) begin
          failures++;
          $display("cycle %0d: z=%0d expected %0d", n, z, e);
        end
      end
      if (n < M * M) begin
        int a, b;
        a = n / M;
        b = n % M;
        x = residue_t'(a);
        y = residue_t'(b);
        exp_z.push_back((a + b) % M);
        if (a + b < M)        n_plain++;
        else if (a + b >= 32) n_carry_a++;
        else                  n_carry_b++;
      end else begin
        x = '0;
        y = '0;
      end
      @(negedge clk);
    end
    $display("uncorrected=%0d carryA=%0d carryB=%0d", n_plain, n_carry_a, n_carry_b);
    if (n_plain == 0)   begin failures++; $display("no uncorrected sum seen"); end
    if (n_carry_a == 0) begin failures++; $display("no carry-A correction seen"); end
    if (n_carry_b == 0) begin failures++; $display("no carry-B correction seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

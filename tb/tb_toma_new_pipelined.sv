// tb_toma_new_pipelined: end-to-end test of the pipelined modular adder.
//
// Instances: the pipelined adder for every odd five-bit modulus 17..31
// (m = 29, the reference case, among them) and the unpipelined form for
// m = 29. Each pipelined instance is fed a new operand pair on every clock,
// walking through all m*m pairs of residues, and its output is compared
// with (x + y) mod m of the pair applied exactly three rising edges
// earlier (latency 3, one result per clock). The unpipelined instance is
// checked right after its inputs settle.
//
// Mechanisms counted, each must occur: results passed through uncorrected
// (x + y < m), corrected through carry A (x + y >= 32), corrected through
// carry B only (m <= x + y < 32), and results of the unpipelined form.
module tb_toma_new_pipelined;
  import toma_pkg::*;

  localparam int NMOD = 8;
  localparam int unsigned MODS [NMOD] = '{17, 19, 21, 23, 25, 27, 29, 31};
  localparam int LAT = 3;

  logic     clk = 1'b0;
  residue_t x [NMOD], y [NMOD], z [NMOD];
  residue_t xu, yu, zu;
  int checks = 0, failures = 0;
  int n_plain = 0, n_carry_a = 0, n_carry_b = 0, n_comb = 0;

  // expected results, indexed by the cycle the operands were applied in
  int exp_z [NMOD][$];

  for (genvar k = 0; k < NMOD; k++) begin : g_dut
    toma_new_pipelined #(.M(MODS[k])) dut (.clk(clk), .x(x[k]), .y(y[k]), .z(z[k]));
  end

  toma_new_pipelined #(.M(29), .PIPELINED(1'b0)) dut_comb (
    .clk(clk), .x(xu), .y(yu), .z(zu)
  );

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int total;
    total = 31 * 31 + LAT;
    for (int k = 0; k < NMOD; k++) begin
      x[k] = '0;
      y[k] = '0;
    end
    xu = '0;
    yu = '0;
    @(negedge clk);
    for (int n = 0; n < total; n++) begin
      // outputs now belong to the operands applied LAT cycles ago
      for (int k = 0; k < NMOD; k++) begin
        int m;
        m = int'(MODS[k]);
        if (n >= LAT && n - LAT < m * m) begin
          int e;
          e = exp_z[k].pop_front();
          checks++;
          if (int'(z[k]) != e) begin
            failures++;
            $display("m=%0d cycle %0d: z=%0d expected %0d", m, n, z[k], e);
          end
        end
      end
      // apply the next pair
      for (int k = 0; k < NMOD; k++) begin
        int m, a, b;
        m = int'(MODS[k]);
        if (n < m * m) begin
          a = n / m;
          b = n % m;
          x[k] = residue_t'(a);
          y[k] = residue_t'(b);
          exp_z[k].push_back((a + b) % m);
          if (a + b < m)        n_plain++;
          else if (a + b >= 32) n_carry_a++;
          else                  n_carry_b++;
        end else begin
          x[k] = '0;
          y[k] = '0;
        end
      end
      if (n < 29 * 29) begin
        xu = residue_t'(n / 29);
        yu = residue_t'(n % 29);
        #1;
        checks++;
        n_comb++;
        if (int'(zu) != (n / 29 + n % 29) % 29) begin
          failures++;
          $display("unpipelined m=29: %0d + %0d gave %0d", n / 29, n % 29, zu);
        end
      end
      @(negedge clk);
    end
    $display("uncorrected=%0d carryA=%0d carryB=%0d unpipelined=%0d",
             n_plain, n_carry_a, n_carry_b, n_comb);
    if (n_plain == 0)   begin failures++; $display("no uncorrected sum seen"); end
    if (n_carry_a == 0) begin failures++; $display("no carry-A correction seen"); end
    if (n_carry_b == 0) begin failures++; $display("no carry-B correction seen"); end
    if (n_comb == 0)    begin failures++; $display("unpipelined form not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

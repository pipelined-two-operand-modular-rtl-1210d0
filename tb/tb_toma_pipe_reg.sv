// tb_toma_pipe_reg: checks both forms of the pipeline register layer.
// Random 12-bit words are applied once per clock; the registered instance
// must show each word exactly one rising edge later and hold it for the
// whole cycle, the PIPELINED = 0 instance must show it at once.
module tb_toma_pipe_reg;
  localparam int W = 12;

  logic         clk = 1'b0;
  logic [W-1:0] d, q_ff, q_wire, prev;
  int checks = 0, failures = 0;

  toma_pipe_reg #(.W(W), .PIPELINED(1'b1)) dut_ff   (.clk(clk), .d(d), .q(q_ff));
  toma_pipe_reg #(.W(W), .PIPELINED(1'b0)) dut_wire (.clk(clk), .d(d), .q(q_wire));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '0;
    @(negedge clk);
    for (int n = 0; n < 500; n++) begin
      prev = d;
      d = W'($urandom);
      #1;
      checks++;
      if (q_wire !== d) begin
        failures++; $display("wire form: q=%h d=%h", q_wire, d);
      end
      checks++;
      if (q_ff !== prev) begin
        failures++; $display("cycle %0d: q=%h changed before the edge", n, q_ff);
      end
      @(posedge clk);
      #1;
      checks++;
      if (q_ff !== d) begin
        failures++; $display("cycle %0d: q=%h expected %h", n, q_ff, d);
      end
      @(negedge clk);
      checks++;
      if (q_ff !== d) begin
        failures++; $display("cycle %0d: q did not hold %h", n, d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

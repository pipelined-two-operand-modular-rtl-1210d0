// toma_pipe_reg: one layer of pipeline flip-flops.
//
// W plain D flip-flops clocked on the rising edge, without reset or enable,
// like the FD1Q cells the pipelined adder is costed with. The pipeline
// carries no state worth resetting: every output is a function of the
// inputs applied three cycles earlier, and the first three outputs after
// power-up are simply not valid. With PIPELINED = 0 the layer is a wire, which gives
// the unpipelined (purely combinational) form of the same adder.
//
// Parameters: W, the number of flip-flops (default 12, the widest layer of
// the reference adder); PIPELINED, 1 for registers, 0 for a wire.
// Timing: q follows d one clock later (PIPELINED = 1) or at once (0).
module toma_pipe_reg #(
  parameter int unsigned W         = 12,
  parameter bit          PIPELINED = 1'b1
) (
  input  logic         clk,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  if (PIPELINED) begin : g_ff
    always_ff @(posedge clk) q <= d;
  end else begin : g_wire
    assign q = d;
  end

endmodule

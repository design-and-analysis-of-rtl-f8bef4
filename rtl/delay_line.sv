// delay_line: delays a W-bit value by DEPTH clock cycles.
//
// A plain shift register with no reset and no enable, used to skew adder
// operands into their pipeline stage and to de-skew the partial sums back
// into one word. DEPTH = 0 makes it a wire. Output dout(t) = din(t - DEPTH).
module delay_line #(
  parameter int unsigned W     = 4,
  parameter int unsigned DEPTH = 1
) (
  input  logic         clk,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);
  if (DEPTH == 0) begin : g_wire
    assign dout = din;
  end else begin : g_regs
    logic [W-1:0] stage_q [DEPTH];
    always_ff @(posedge clk) begin
      stage_q[0] <= din;
      for (int i = 1; i < DEPTH; i++) stage_q[i] <= stage_q[i-1];
    end
    assign dout = stage_q[DEPTH-1];
  end
endmodule

// shift_reg: custom-length delay line of DEPTH registers, W bits wide.
//
// The kernel pipeline uses it to line up operands whose producers finish at
// different clock cycles (the "delay stages" of the scheduled data-flow
// graph), and the arithmetic units use it to give their results the latency
// the library table assigns them. Each stage is a plain register, so the
// line can be mapped to shift-register primitives. DEPTH = 0 is a wire.
// There is no reset: the payload is qualified by a valid bit that travels in
// a reset line of its own.
module shift_reg #(
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 4
) (
  input  logic         clk,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);
  if (DEPTH == 0) begin : g_wire
    assign dout = din;
  end else begin : g_line
    logic [W-1:0] stage [DEPTH];
    always_ff @(posedge clk) begin
      stage[0] <= din;
      for (int unsigned i = 1; i < DEPTH; i++) stage[i] <= stage[i-1];
    end
    assign dout = stage[DEPTH-1];
  end
endmodule

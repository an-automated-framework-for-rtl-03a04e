// valid_line: DEPTH-cycle delay of a single valid bit, cleared by reset.
//
// Travels beside a shift_reg so that the payload needs no reset while the
// qualifier is always defined. DEPTH = 0 is a wire.
module valid_line #(
  parameter int unsigned DEPTH = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic din,
  output logic dout
);
  if (DEPTH == 0) begin : g_wire
    assign dout = din;
  end else begin : g_line
    logic [DEPTH-1:0] v;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) v <= '0;
      else        v <= DEPTH'({v, din});
    end
    assign dout = v[DEPTH-1];
  end
endmodule

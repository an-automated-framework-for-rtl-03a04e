// spram: single-port RAM holding one target tile, LANES words per address.
//
// The data-flow control keeps the targets of a tile in two of these (one
// being filled while the other is read). Lane l of address a holds the
// target that kernel pipeline l uses in step a of a source, so one read
// feeds all pipelines at once. A write stores din into the lanes selected by
// lane_we; a read returns the whole word one cycle later (registered
// output, as in a block RAM). One port: a write and a read cannot happen in
// the same cycle, and a write takes priority.
module spram #(
  parameter int unsigned W     = 44,
  parameter int unsigned LANES = 3,
  parameter int unsigned DEPTH = 16
) (
  input  logic                          clk,
  input  logic                          en,
  input  logic [LANES-1:0]              lane_we,
  input  logic [$clog2(DEPTH)-1:0]      addr,
  input  logic [W-1:0]                  din,
  output logic [LANES-1:0][W-1:0]       dout
);
  logic [LANES-1:0][W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (|lane_we) begin
        for (int l = 0; l < int'(LANES); l++) if (lane_we[l]) mem[addr][l] <= din;
      end else begin
        dout <= mem[addr];
      end
    end
  end
endmodule

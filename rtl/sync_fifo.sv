// sync_fifo: single-clock first-word-fall-through FIFO, W bits by DEPTH.
//
// Used for every queue of the accelerator: the input (RX) and output (TX)
// buffers of the host interface, the source FIFO of the data-flow control,
// the accumulator (ACC) FIFOs and the local buffer of each MAC. The head
// word is visible on dout whenever empty is low; pop consumes it, push
// writes din. Push and pop may happen in the same cycle. count and free
// give the fill level for flow control. Pushing when full or popping when
// empty is a protocol error, caught by assertions.
module sync_fifo #(
  parameter int unsigned W     = 64,
  parameter int unsigned DEPTH = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     push,
  input  logic [W-1:0]             din,
  input  logic                     pop,
  output logic [W-1:0]             dout,
  output logic                     empty,
  output logic                     full,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic [$clog2(DEPTH+1)-1:0] free
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wptr, rptr;

  function automatic logic [AW-1:0] inc(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + AW'(1);
  endfunction

  always_ff @(posedge clk) if (push) mem[wptr] <= din;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (push) wptr <= inc(wptr);
      if (pop)  rptr <= inc(rptr);
      count <= count + CW'(push) - CW'(pop);
    end
  end

  assign dout  = mem[rptr];
  assign empty = (count == '0);
  assign full  = (count == CW'(DEPTH));
  assign free  = CW'(DEPTH) - count;

  assert property (@(posedge clk) disable iff (!rst_n) !(push && full))
    else $error("sync_fifo: push while full");
  assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty))
    else $error("sync_fifo: pop while empty");
endmodule

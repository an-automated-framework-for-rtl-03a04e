// mac_unit: floating-point multiply-accumulate block with a FIFO local
// buffer, one per kernel output.
//
// A fixed-point kernel value enters with a floating-point weight (the
// source mass) and two flags. The value is converted to floating point
// (fx2fp), multiplied by the weight (fp_mult), and added (fp_add) to the
// partial sum of the same target, which waits at the head of the local
// buffer FIFO. A multiplexer in front of the buffer writes either the sum
// or, for the first source of a target, the product itself (delayed by the
// adder latency so that the buffer is written in order). For the last
// source the value leaves on out_sum instead of returning to the buffer.
//
// Because the adder takes many cycles, consecutive terms of one target must
// not follow each other directly: the caller interleaves the terms of K
// targets (k = 0..K-1 for source 0, then for source 1, ...), with K at
// least ADD latency + 1, which the pop assertion checks. K is bounded by
// DEPTH. All operands have the document's default single precision
// (EW = 8, MW = 23); latency from input to out_valid is
// 2 + fp_mult + fp_add + 1 = 20 cycles at the defaults. The chain of
// converter, multiplier, adder, multiplexer and local buffer follows the
// document's block diagram. The diagram branches the multiplexer's second
// input off ahead of the multiplier; here it is taken after it, so that
// the first term of a target carries its weight too. The in-order FIFO
// protocol and the first/last flags are this design's own.
module mac_unit #(
  parameter int unsigned IW    = tanor_pkg::OUT_I,
  parameter int unsigned FW    = tanor_pkg::OUT_F,
  parameter int unsigned EW    = 8,
  parameter int unsigned MW    = 23,
  parameter int unsigned DEPTH = 32
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic                  in_first,
  input  logic                  in_last,
  input  logic signed [IW+FW:0] in_kernel,
  input  logic [EW+MW:0]        in_weight,
  output logic                  out_valid,
  output logic [EW+MW:0]        out_sum
);
  localparam int unsigned FPW   = 1 + EW + MW;
  localparam int unsigned LAT_C = 2;
  localparam int unsigned LAT_M = tanor_pkg::fp_mult_lat(MW);
  localparam int unsigned LAT_A = tanor_pkg::fp_add_lat(MW);
  localparam int unsigned LATENCY = LAT_C + LAT_M + LAT_A + 1;

  // Stage C: format conversion, weight aligned with it.
  logic [FPW-1:0] kv, wv;
  logic           c_valid;
  logic [1:0]     c_flags;
  fx2fp #(.IW(IW), .FW(FW), .EW(EW), .MW(MW), .LAT(LAT_C)) u_conv (.clk, .din(in_kernel), .dout(kv));
  shift_reg #(.W(FPW), .DEPTH(LAT_C)) u_wdly (.clk, .din(in_weight), .dout(wv));
  valid_line #(.DEPTH(LAT_C)) u_cv (.clk, .rst_n, .din(in_valid), .dout(c_valid));
  shift_reg #(.W(2), .DEPTH(LAT_C)) u_cf (.clk, .din({in_first, in_last}), .dout(c_flags));

  // Stage P: product.
  logic [FPW-1:0] prod;
  logic           p_valid;
  logic [1:0]     p_flags;
  fp_mult #(.EW(EW), .MW(MW), .LAT(LAT_M)) u_mul (.clk, .a(kv), .b(wv), .dout(prod));
  valid_line #(.DEPTH(LAT_M)) u_pv (.clk, .rst_n, .din(c_valid), .dout(p_valid));
  shift_reg #(.W(2), .DEPTH(LAT_M)) u_pf (.clk, .din(c_flags), .dout(p_flags));

  // Stage S: accumulate with the partial sum from the local buffer.
  logic [FPW-1:0] head, sum, byp, sel;
  logic           s_valid, buf_pop, buf_push, buf_empty, buf_full;
  logic [1:0]     s_flags;
  logic [$clog2(DEPTH+1)-1:0] buf_count, buf_free;

  assign buf_pop = p_valid && !p_flags[1];
  fp_add #(.EW(EW), .MW(MW), .LAT(LAT_A)) u_add (.clk, .a(prod), .b(head), .dout(sum));
  shift_reg #(.W(FPW), .DEPTH(LAT_A)) u_byp (.clk, .din(prod), .dout(byp));
  valid_line #(.DEPTH(LAT_A)) u_sv (.clk, .rst_n, .din(p_valid), .dout(s_valid));
  shift_reg #(.W(2), .DEPTH(LAT_A)) u_sf (.clk, .din(p_flags), .dout(s_flags));

  assign sel      = s_flags[1] ? byp : sum;       // first source: start a new sum
  assign buf_push = s_valid && !s_flags[0];       // not yet last: back to the buffer

  sync_fifo #(.W(FPW), .DEPTH(DEPTH)) u_buf (
    .clk, .rst_n, .push(buf_push), .din(sel), .pop(buf_pop), .dout(head),
    .empty(buf_empty), .full(buf_full), .count(buf_count), .free(buf_free));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_sum   <= '0;
    end else begin
      out_valid <= s_valid && s_flags[0];
      if (s_valid && s_flags[0]) out_sum <= sel;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) buf_pop |-> !buf_empty)
    else $error("mac_unit: partial sum not ready, interleave more targets");

  initial assert (LATENCY == LAT_C + LAT_M + LAT_A + 1);
endmodule

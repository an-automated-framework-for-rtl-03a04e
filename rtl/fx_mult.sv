// fx_mult: fixed-point multiplier, dout = a * b.
//
// The full product has F1 + F2 fraction bits (the document's binary-point
// rule for *); fx_round then brings it to Q IO.FO, truncating and
// saturating. The latency defaults to the document's estimate for an FX
// multiplier, 3 + floor(W1/18) + floor(W2/18) with Wi the operand widths
// (one 18x18 multiplier block per 18 bits of each operand). The product is
// computed in one step and delayed to that latency, which leaves retiming
// to the synthesis tool; the latency seen at the ports is the document's.
module fx_mult #(
  parameter int unsigned I1  = 7,
  parameter int unsigned F1  = 15,
  parameter int unsigned I2  = 7,
  parameter int unsigned F2  = 15,
  parameter int unsigned IO  = 11,
  parameter int unsigned FO  = 15,
  parameter int unsigned LAT = tanor_pkg::fx_mult_lat(1 + I1 + F1, 1 + I2 + F2)
) (
  input  logic                  clk,
  input  logic signed [I1+F1:0] a,
  input  logic signed [I2+F2:0] b,
  output logic signed [IO+FO:0] dout
);
  localparam int unsigned WP = (1 + I1 + F1) + (1 + I2 + F2);

  logic signed [WP-1:0] p;
  logic signed [IO+FO:0] r;

  assign p = WP'(a) * WP'(b);

  fx_round #(.II(WP - 1 - F1 - F2), .FI(F1 + F2), .IO(IO), .FO(FO)) u_rnd (.din(p), .dout(r));

  shift_reg #(.W(1 + IO + FO), .DEPTH(LAT)) u_dly (.clk(clk), .din(r), .dout(dout));
endmodule

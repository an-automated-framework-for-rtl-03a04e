// fx_round: converts a fixed-point value from Q II.FI to Q IO.FO.
//
// This is the "Round" component of the operator library: every fixed-point
// operator ends in one. The fraction is aligned first, by appending zeros
// below the LSB when FO > FI or by dropping LSBs (truncation toward minus
// infinity) when FO < FI; the integer part is then saturated to the range of
// the output format. Truncation and saturation are this design's choice of
// the truncation and overflow modes the bit-width analysis assigns.
// Purely combinational. The defaults are the kernel's rd10 node: the exact
// product of rd8 (Q7.15) and rd9 (Q13.15), Q21.30, brought to Q19.15.
module fx_round #(
  parameter int unsigned II = 21,
  parameter int unsigned FI = 30,
  parameter int unsigned IO = 19,
  parameter int unsigned FO = 15
) (
  input  logic signed [II+FI:0] din,
  output logic signed [IO+FO:0] dout
);
  localparam int unsigned WI = 1 + II + FI;
  localparam int unsigned WO = 1 + IO + FO;
  localparam int unsigned SH = (FO >= FI) ? FO - FI : FI - FO;
  localparam int unsigned WA = (FO >= FI) ? WI + SH : WI - SH;

  logic signed [WA-1:0] a;

  if (FO >= FI) begin : g_up
    assign a = {din, {SH{1'b0}}};
  end else begin : g_down
    assign a = din[WI-1:SH];
  end

  if (WA > WO) begin : g_sat
    localparam logic signed [WA-1:0] MAXV = WA'({1'b0, {(WO-1){1'b1}}});
    localparam logic signed [WA-1:0] MINV = -MAXV - WA'(1);
    always_comb begin
      if (a > MAXV)      dout = {1'b0, {(WO-1){1'b1}}};
      else if (a < MINV) dout = {1'b1, {(WO-1){1'b0}}};
      else               dout = a[WO-1:0];
    end
  end else begin : g_ext
    assign dout = WO'(a);
  end
endmodule

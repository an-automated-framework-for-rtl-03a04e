// fx2fp: format converter from signed fixed point Q IW.FW to the custom
// floating-point format {sign, EW-bit exponent, MW-bit mantissa}.
//
// The magnitude is normalised so that its leading one becomes the hidden
// bit; the exponent is the position of that one minus FW, plus the bias.
// Bits below the mantissa are truncated, a zero input gives zero, and a
// value beyond the exponent range saturates to the largest finite number or
// flushes to zero. It sits between the fixed-point kernel and the
// floating-point accumulator. LAT registers follow the combinational
// conversion (the document gives no latency for the converter; 2 is this
// design's choice, 0 makes it combinational).
module fx2fp #(
  parameter int unsigned IW  = 25,
  parameter int unsigned FW  = 15,
  parameter int unsigned EW  = 8,
  parameter int unsigned MW  = 23,
  parameter int unsigned LAT = 2
) (
  input  logic                  clk,
  input  logic signed [IW+FW:0] din,
  output logic [EW+MW:0]        dout
);
  localparam int unsigned WI   = 1 + IW + FW;
  localparam int unsigned BIAS = (1 << (EW - 1)) - 1;
  localparam int unsigned EMAX = (1 << EW) - 2;
  localparam int unsigned WP   = $clog2(WI) + 1;

  logic [WI-1:0]    mag;
  logic [WI+MW-1:0] nrm;
  logic [WP-1:0]    p;
  logic [EW+MW:0]   r;

  assign mag = din[WI-1] ? WI'(-din) : WI'(din);

  always_comb begin
    int e;
    p = '0;
    for (int i = 0; i < int'(WI); i++) if (mag[i]) p = WP'(i);
    nrm = {mag, {MW{1'b0}}} << (WI - 1 - int'(p));
    e   = int'(p) - int'(FW) + int'(BIAS);
    if (mag == '0 || e <= 0) r = '0;
    else if (e > int'(EMAX)) r = {din[WI-1], EW'(EMAX), {MW{1'b1}}};
    else                     r = {din[WI-1], EW'(e), nrm[WI+MW-2 -: MW]};
  end

  shift_reg #(.W(1 + EW + MW), .DEPTH(LAT)) u_dly (.clk(clk), .din(r), .dout(dout));
endmodule

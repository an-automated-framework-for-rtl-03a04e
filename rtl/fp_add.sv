// fp_add: floating-point adder for the {sign, EW, MW} format.
//
// The operand of larger magnitude is kept, the other significand is shifted
// right by the exponent difference (three guard bits kept, the rest
// dropped), the two are added or subtracted, and the result is normalised
// and truncated toward zero. x + (-x) gives exactly zero. Zero operands,
// underflow and overflow are handled as in fp_mult. The latency defaults to
// the document's estimate for an FP adder as a function of the mantissa
// width (11 for single precision). Three register stages do the work
// (1: order the operands and align the smaller one, 2: add or subtract,
// 3: find the leading one, normalise and pack); a delay line makes up the
// rest of LAT, which must be at least 3. One addition per clock. The stage
// split and the rounding are this design's choices.
module fp_add #(
  parameter int unsigned EW  = 8,
  parameter int unsigned MW  = 23,
  parameter int unsigned LAT = tanor_pkg::fp_add_lat(MW)
) (
  input  logic             clk,
  input  logic [EW+MW:0]   a,
  input  logic [EW+MW:0]   b,
  output logic [EW+MW:0]   dout
);
  localparam int G    = 3;                 // guard bits
  localparam int WS   = MW + G + 2;        // significand + guard + carry
  localparam int EMAX = (1 << EW) - 2;
  localparam int WP   = $clog2(WS) + 1;

  // stage 1: order by magnitude, align the smaller significand
  logic          s1_sign, s1_sub, s1_zero;
  logic [EW-1:0] s1_exp;
  logic [WS-1:0] s1_mb, s1_ms;

  always_ff @(posedge clk) begin
    logic [EW+MW:0] big, sml;
    logic [WS-1:0]  ms;
    int d;
    if (a[EW+MW-1:0] >= b[EW+MW-1:0]) begin big = a; sml = b; end
    else                              begin big = b; sml = a; end
    d  = int'(big[EW+MW-1:MW]) - int'(sml[EW+MW-1:MW]);
    ms = (sml[EW+MW-1:MW] == '0) ? '0 : {1'b0, 1'b1, sml[MW-1:0], {G{1'b0}}};
    s1_ms   <= (d >= WS) ? '0 : ms >> d;
    s1_mb   <= {1'b0, 1'b1, big[MW-1:0], {G{1'b0}}};
    s1_sign <= big[EW+MW];
    s1_sub  <= big[EW+MW] != sml[EW+MW];
    s1_zero <= big[EW+MW-1:MW] == '0;
    s1_exp  <= big[EW+MW-1:MW];
  end

  // stage 2: add or subtract the significands
  logic          s2_sign, s2_zero;
  logic [EW-1:0] s2_exp;
  logic [WS-1:0] s2_sum;

  always_ff @(posedge clk) begin
    s2_sum  <= s1_sub ? s1_mb - s1_ms : s1_mb + s1_ms;
    s2_sign <= s1_sign;
    s2_zero <= s1_zero;
    s2_exp  <= s1_exp;
  end

  // stage 3: normalise, check the exponent range, pack
  logic [EW+MW:0] r;

  always_ff @(posedge clk) begin
    logic [WS+MW-1:0] nrm;
    logic [WP-1:0]    p;
    int e;
    p = '0;
    for (int i = 0; i < WS; i++) if (s2_sum[i]) p = WP'(i);
    nrm = {s2_sum, {MW{1'b0}}} << (WS - 1 - int'(p));
    e = int'(s2_exp) + int'(p) - (MW + G);
    if (s2_zero || s2_sum == '0 || e <= 0) r <= '0;
    else if (e > EMAX) r <= {s2_sign, EW'(EMAX), {MW{1'b1}}};
    else               r <= {s2_sign, EW'(e), nrm[WS+MW-2 -: MW]};
  end

  shift_reg #(.W(1 + EW + MW), .DEPTH(LAT - 3)) u_dly (.clk(clk), .din(r), .dout(dout));
endmodule

// fp_mult: floating-point multiplier for the {sign, EW, MW} format.
//
// The two significands (hidden one restored) are multiplied in full, the
// product is normalised by at most one position, and the mantissa is
// truncated toward zero. A zero operand gives zero; exponent underflow
// flushes to zero and overflow saturates to the largest finite value (no
// subnormals, infinities or NaNs). The latency defaults to the document's
// estimate for an FP multiplier as a function of the mantissa width (6 for
// single precision). Two register stages do the work (1: significand
// product and exponent sum, 2: normalise and pack); a delay line makes up
// the rest of LAT, which must be at least 2. One product per clock.
module fp_mult #(
  parameter int unsigned EW  = 8,
  parameter int unsigned MW  = 23,
  parameter int unsigned LAT = tanor_pkg::fp_mult_lat(MW)
) (
  input  logic             clk,
  input  logic [EW+MW:0]   a,
  input  logic [EW+MW:0]   b,
  output logic [EW+MW:0]   dout
);
  localparam int BIAS = (1 << (EW - 1)) - 1;
  localparam int EMAX = (1 << EW) - 2;

  // stage 1: significand product, exponent sum, sign, zero flag
  logic [2*MW+1:0] s1_prod;
  logic            s1_sign, s1_zero;
  int              s1_exp;

  always_ff @(posedge clk) begin
    s1_prod <= {1'b1, a[MW-1:0]} * {1'b1, b[MW-1:0]};
    s1_exp  <= int'(a[EW+MW-1:MW]) + int'(b[EW+MW-1:MW]) - BIAS;
    s1_sign <= a[EW+MW] ^ b[EW+MW];
    s1_zero <= a[EW+MW-1:MW] == '0 || b[EW+MW-1:MW] == '0;
  end

  // stage 2: normalise by at most one place, check the range, pack
  logic [EW+MW:0] r;

  always_ff @(posedge clk) begin
    int e;
    logic [MW-1:0] m;
    e = s1_exp;
    if (s1_prod[2*MW+1]) begin
      m = s1_prod[2*MW -: MW];
      e = e + 1;
    end else begin
      m = s1_prod[2*MW-1 -: MW];
    end
    if (s1_zero || e <= 0) r <= '0;
    else if (e > EMAX)     r <= {s1_sign, EW'(EMAX), {MW{1'b1}}};
    else                   r <= {s1_sign, EW'(e), m};
  end

  shift_reg #(.W(1 + EW + MW), .DEPTH(LAT - 2)) u_dly (.clk(clk), .din(r), .dout(dout));
endmodule

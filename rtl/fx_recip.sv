// fx_recip: fixed-point reciprocal, dout = 1 / din.
//
// With din = X * 2^-FI the result in Q IO.FO is 2^(FI+FO) / X, truncated
// toward zero and saturated to the output range; a zero input saturates to
// the largest positive value. The latency defaults to the document's
// estimate min(36, 4 + FI + FO) for an FX divider. The quotient is found by
// pipelined restoring division: each register stage settles BPS quotient
// bits (one per stage whenever LAT covers the FI + FO + 1 quotient bits, as
// at the defaults: 31 stages of 34), and a short delay line makes up the
// rest of LAT, where the result is also saturated and given its sign. One
// division per clock. The document maps the reciprocal to a vendor divider
// core; the restoring method is this design's choice.
module fx_recip #(
  parameter int unsigned II  = 6,
  parameter int unsigned FI  = 15,
  parameter int unsigned IO  = 7,
  parameter int unsigned FO  = 15,
  parameter int unsigned LAT = ((4 + FI + FO) < 36) ? 4 + FI + FO : 36
) (
  input  logic                  clk,
  input  logic signed [II+FI:0] din,
  output logic signed [IO+FO:0] dout
);
  localparam int unsigned WI = 1 + II + FI;
  localparam int unsigned WN = FI + FO + 2;                  // numerator bits
  localparam int unsigned WD = (WN > WI) ? WN : WI;
  localparam int unsigned WO = 1 + IO + FO;
  localparam logic [WD-1:0] MAXO = WD'({(WO-1){1'b1}});

  localparam int unsigned QB  = FI + FO + 1;                // quotient bits
  localparam int unsigned BPS = (QB + LAT - 1) / LAT;        // bits per stage
  localparam int unsigned NS  = (QB + BPS - 1) / BPS;        // division stages
  localparam int unsigned WT  = WN + WD;

  typedef struct packed {
    logic [WT-1:0] rem;     // numerator minus the multiples taken so far
    logic [WD-1:0] dvs;     // |din|
    logic [QB-1:0] q;       // quotient bits found so far
    logic          neg;     // din was negative
  } st_t;

  // One stage of restoring division of 2^(FI+FO) by |din|. A zero divisor
  // sets every quotient bit, which saturates below like any overflow.
  function automatic st_t step(st_t x, int s);
    for (int b = 0; b < int'(BPS); b++) begin
      int i;
      i = int'(QB) - 1 - s * int'(BPS) - b;
      if (i >= 0 && x.rem >= (WT'(x.dvs) << i)) begin
        x.rem  = x.rem - (WT'(x.dvs) << i);
        x.q[i] = 1'b1;
      end
    end
    return x;
  endfunction

  logic [WD-1:0] mag, quo;
  logic signed [WO-1:0] r;
  st_t st0;

  assign mag = din[WI-1] ? WD'(-din) : WD'(din);
  assign st0 = '{rem: WT'(1) << (FI + FO), dvs: mag, q: '0, neg: din[WI-1]};

  for (genvar s = 0; s < NS; s++) begin : g_st
    st_t prev, cur;
    if (s == 0) begin : g_in
      assign prev = st0;
    end else begin : g_chain
      assign prev = g_st[s-1].cur;
    end
    always_ff @(posedge clk) cur <= step(prev, s);
  end

  always_comb begin
    quo = (QB > WD && (g_st[NS-1].cur.q >> WD) != '0) ? MAXO : WD'(g_st[NS-1].cur.q);
    if (quo > MAXO) quo = MAXO;
    r = g_st[NS-1].cur.neg ? -WO'(quo) : WO'(quo);
  end

  shift_reg #(.W(WO), .DEPTH(LAT - NS)) u_dly (.clk(clk), .din(r), .dout(dout));
endmodule

// fx_sqrt: fixed-point square root, dout = sqrt(din).
//
// With din = X * 2^-FI the root in Q IO.FO is floor(sqrt(X * 2^(2FO-FI))),
// found here by the bit-serial restoring method unrolled over all result
// bits (q holds the bits found so far; the trial subtrahend is
// (q + 2^i)^2 - q^2 = q*2^(i+1) + 2^(2i)). A negative input gives zero. The latency defaults to the document's
// estimate 3 + FO + (I-1)/2, where I = II + 1 counts the sign bit among the
// integer bits; with that reading the formula gives the 24 cycles the
// document's scheduling example shows for a Q12.15 -> Q6.15 root. The
// recurrence is pipelined: each register stage settles BPS result bits
// (one bit per stage whenever LAT >= number of root bits, as at the
// defaults: 21 stages), and a short delay line makes up the rest of LAT.
// One root per clock. Requires 2FO >= FI. The document maps the root to a
// vendor CORDIC core; the restoring method is this design's choice.
module fx_sqrt #(
  parameter int unsigned II  = 12,
  parameter int unsigned FI  = 15,
  parameter int unsigned IO  = 6,
  parameter int unsigned FO  = 15,
  parameter int unsigned LAT = 3 + FO + II / 2
) (
  input  logic                  clk,
  input  logic signed [II+FI:0] din,
  output logic signed [IO+FO:0] dout
);
  localparam int unsigned WR = II + FI + (2 * FO - FI);     // radicand bits
  localparam int unsigned WQ = (WR + 1) / 2;                // root bits
  localparam int unsigned WO = 1 + IO + FO;

  localparam int unsigned BPS = (WQ + LAT - 1) / LAT;        // bits per stage
  localparam int unsigned NS  = (WQ + BPS - 1) / BPS;        // recurrence stages

  typedef struct packed {
    logic [2*WQ-1:0] rem;   // radicand minus the square of the bits found
    logic [WQ-1:0]   q;     // root bits found so far
  } st_t;

  // One stage of the restoring recurrence: try bits WQ-1-s*BPS downwards and
  // keep each one when the trial subtrahend still fits under the remainder.
  function automatic st_t step(st_t x, int s);
    logic [2*WQ-1:0] trial;
    for (int b = 0; b < int'(BPS); b++) begin
      int i;
      i = int'(WQ) - 1 - s * int'(BPS) - b;
      if (i >= 0) begin
        trial = ((2 * WQ)'(x.q) << (i + 1)) | ((2 * WQ)'(1) << (2 * i));
        if (x.rem >= trial) begin
          x.rem  = x.rem - trial;
          x.q[i] = 1'b1;
        end
      end
    end
    return x;
  endfunction

  logic [WR-1:0] rad;
  logic [WQ-1:0] q;
  logic signed [WO-1:0] r;
  st_t st0;

  assign rad = din[II+FI] ? '0 : {din[II+FI-1:0], {(2 * FO - FI){1'b0}}};
  assign st0 = '{rem: (2 * WQ)'(rad), q: '0};

  for (genvar s = 0; s < NS; s++) begin : g_st
    st_t prev, cur;
    if (s == 0) begin : g_in
      assign prev = st0;
    end else begin : g_chain
      assign prev = g_st[s-1].cur;
    end
    always_ff @(posedge clk) cur <= step(prev, s);
  end
  assign q = g_st[NS-1].cur.q;

  if (WQ >= WO) begin : g_sat
    assign r = (q > WQ'({(WO-1){1'b1}})) ? {1'b0, {(WO-1){1'b1}}} : WO'(q);
  end else begin : g_ext
    assign r = WO'(q);
  end

  shift_reg #(.W(WO), .DEPTH(LAT - NS)) u_dly (.clk(clk), .din(r), .dout(dout));
endmodule

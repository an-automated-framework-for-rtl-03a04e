// fx_addsub: fixed-point adder/subtractor, dout = a + b or a - b.
//
// Operands in Q I1.F1 and Q I2.F2 are aligned to the larger fraction width
// (zeros appended below the shorter one's LSB, the binary-point rule of the
// document for +/-), added at full width, and rounded to Q IO.FO by
// fx_round. The result is registered; LAT = 1 is the document's latency for
// a fixed-point add, further cycles are added as a delay line. SUB selects
// subtraction at elaboration time.
module fx_addsub #(
  parameter int unsigned I1  = 6,
  parameter int unsigned F1  = 15,
  parameter int unsigned I2  = 6,
  parameter int unsigned F2  = 15,
  parameter int unsigned IO  = 7,
  parameter int unsigned FO  = 15,
  parameter bit          SUB = 1'b0,
  parameter int unsigned LAT = 1
) (
  input  logic                 clk,
  input  logic signed [I1+F1:0] a,
  input  logic signed [I2+F2:0] b,
  output logic signed [IO+FO:0] dout
);
  localparam int unsigned FA = (F1 > F2) ? F1 : F2;
  localparam int unsigned IA = ((I1 > I2) ? I1 : I2) + 1;
  localparam int unsigned WA = 1 + IA + FA;

  logic signed [WA-1:0] aa, bb, s;
  logic signed [IO+FO:0] r;

  assign aa = WA'(a) <<< (FA - F1);
  assign bb = WA'(b) <<< (FA - F2);
  assign s  = SUB ? aa - bb : aa + bb;

  fx_round #(.II(IA), .FI(FA), .IO(IO), .FO(FO)) u_rnd (.din(s), .dout(r));

  if (LAT == 0) begin : g_comb
    assign dout = r;
  end else begin : g_reg
    shift_reg #(.W(1 + IO + FO), .DEPTH(LAT)) u_dly (.clk(clk), .din(r), .dout(dout));
  end
endmodule

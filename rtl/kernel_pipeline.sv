// kernel_pipeline: fully pipelined fixed-point interaction kernel.
//
// This is the document's worked example of a generated kernel: a 2-D
// softened inverse-cube interaction between a target (t1, t2) and a source
// (s1, s2),
//   rd1 = t1 - s1          rd2 = t2 - s2
//   rd6 = rd1^2 + rd2^2 + e1
//   rd10 = (1 / sqrt(rd6)) * (1 / rd6)
//   op1 = rd1 * rd10       op2 = rd2 * rd10
// i.e. the two components of (t - s) / (|t - s|^2 + e1)^(3/2). The Q I.F
// format of every node and the completion time of every operation follow
// the document's bit-width analysis and ASAP schedule for this graph
// (FX-[64 15]): subtract done at T=1, squares at T=6, sums at T=7 and T=8,
// square root at T=32, reciprocals at T=42 and T=66, rd10 at T=71 and the
// outputs at T=76. The operands that arrive early are held in delay lines:
// 70 stages for rd1 and rd2, 7 for e1 and 24 for rd9, as in the document.
// Each operator has the latency the library table gives it; the delay-line
// lengths are derived from those latencies, so LATENCY is 76 by default.
//
// One interaction enters per clock. in_tag travels with in_valid through
// the same number of cycles and comes out with out_valid, so the caller can
// carry indices and flags alongside. Treating the sign bit as separate
// from the I integer bits is this design's reading of the Q notation.
module kernel_pipeline #(
  parameter int unsigned TAG_W = 8
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         in_valid,
  input  logic [TAG_W-1:0]             in_tag,
  input  logic signed [tanor_pkg::POS_W-1:0] t1,
  input  logic signed [tanor_pkg::POS_W-1:0] s1,
  input  logic signed [tanor_pkg::POS_W-1:0] t2,
  input  logic signed [tanor_pkg::POS_W-1:0] s2,
  input  logic signed [tanor_pkg::EPS_W-1:0] e1,
  output logic                         out_valid,
  output logic [TAG_W-1:0]             out_tag,
  output logic signed [tanor_pkg::OUT_W-1:0] op1,
  output logic signed [tanor_pkg::OUT_W-1:0] op2
);
  import tanor_pkg::*;

  // Node formats (integer bits; every node has 15 fraction bits).
  localparam int unsigned F    = 15;
  localparam int unsigned I_D  = 7;   // rd1, rd2
  localparam int unsigned I_SQ = 11;  // rd3, rd4
  localparam int unsigned I_R2 = 12;  // rd5, rd6
  localparam int unsigned I_RT = 6;   // rd7 = sqrt(rd6)
  localparam int unsigned I_IR = 7;   // rd8 = 1/rd7
  localparam int unsigned I_I2 = 13;  // rd9 = 1/rd6
  localparam int unsigned I_C  = 19;  // rd10 = rd8 * rd9

  // Operator latencies (Table 4 of the operator library).
  localparam int unsigned L_ADD  = 1;
  localparam int unsigned L_SQ   = fx_mult_lat(1 + I_D + F, 1 + I_D + F);
  localparam int unsigned L_SQRT = 3 + F + I_R2 / 2;
  localparam int unsigned L_RCP  = ((4 + F + F) < 36) ? 4 + F + F : 36;
  localparam int unsigned L_M10  = fx_mult_lat(1 + I_IR + F, 1 + I_I2 + F);
  localparam int unsigned L_OUT  = fx_mult_lat(1 + I_D + F, 1 + I_C + F);

  // ASAP completion times.
  localparam int unsigned T_RD1  = L_ADD;
  localparam int unsigned T_RD3  = T_RD1 + L_SQ;
  localparam int unsigned T_RD5  = T_RD3 + L_ADD;
  localparam int unsigned T_RD6  = T_RD5 + L_ADD;
  localparam int unsigned T_RD7  = T_RD6 + L_SQRT;
  localparam int unsigned T_RD9  = T_RD6 + L_RCP;
  localparam int unsigned T_RD8  = T_RD7 + L_RCP;
  localparam int unsigned T_RD10 = T_RD8 + L_M10;       // rd8 is the later input
  localparam int unsigned T_OP   = T_RD10 + L_OUT;
  localparam int unsigned LATENCY = T_OP;

  // Delay stages found by lifetime analysis.
  localparam int unsigned D_E1  = T_RD5;                // e1 waits for rd5
  localparam int unsigned D_RD9 = T_RD8 - T_RD9;        // rd9 waits for rd8
  localparam int unsigned D_RD1 = T_RD10 - T_RD1;       // rd1/rd2 wait for rd10

  logic signed [I_D+F:0]   rd1, rd2, rd1_d, rd2_d;
  logic signed [I_SQ+F:0]  rd3, rd4;
  logic signed [I_R2+F:0]  rd5, rd6;
  logic signed [EPS_W-1:0] e1_d;
  logic signed [I_RT+F:0]  rd7;
  logic signed [I_IR+F:0]  rd8;
  logic signed [I_I2+F:0]  rd9, rd9_d;
  logic signed [I_C+F:0]   rd10;

  fx_addsub #(.I1(POS_I), .F1(POS_F), .I2(POS_I), .F2(POS_F), .IO(I_D), .FO(F), .SUB(1'b1))
    u_rd1 (.clk, .a(t1), .b(s1), .dout(rd1));
  fx_addsub #(.I1(POS_I), .F1(POS_F), .I2(POS_I), .F2(POS_F), .IO(I_D), .FO(F), .SUB(1'b1))
    u_rd2 (.clk, .a(t2), .b(s2), .dout(rd2));
  fx_mult #(.I1(I_D), .F1(F), .I2(I_D), .F2(F), .IO(I_SQ), .FO(F))
    u_rd3 (.clk, .a(rd1), .b(rd1), .dout(rd3));
  fx_mult #(.I1(I_D), .F1(F), .I2(I_D), .F2(F), .IO(I_SQ), .FO(F))
    u_rd4 (.clk, .a(rd2), .b(rd2), .dout(rd4));
  fx_addsub #(.I1(I_SQ), .F1(F), .I2(I_SQ), .F2(F), .IO(I_R2), .FO(F))
    u_rd5 (.clk, .a(rd3), .b(rd4), .dout(rd5));
  shift_reg #(.W(EPS_W), .DEPTH(D_E1)) u_d_e1 (.clk, .din(e1), .dout(e1_d));
  fx_addsub #(.I1(I_R2), .F1(F), .I2(EPS_I), .F2(EPS_F), .IO(I_R2), .FO(F))
    u_rd6 (.clk, .a(rd5), .b(e1_d), .dout(rd6));
  fx_sqrt #(.II(I_R2), .FI(F), .IO(I_RT), .FO(F), .LAT(L_SQRT))
    u_rd7 (.clk, .din(rd6), .dout(rd7));
  fx_recip #(.II(I_R2), .FI(F), .IO(I_I2), .FO(F), .LAT(L_RCP))
    u_rd9 (.clk, .din(rd6), .dout(rd9));
  fx_recip #(.II(I_RT), .FI(F), .IO(I_IR), .FO(F), .LAT(L_RCP))
    u_rd8 (.clk, .din(rd7), .dout(rd8));
  shift_reg #(.W(1 + I_I2 + F), .DEPTH(D_RD9)) u_d_rd9 (.clk, .din(rd9), .dout(rd9_d));
  fx_mult #(.I1(I_IR), .F1(F), .I2(I_I2), .F2(F), .IO(I_C), .FO(F))
    u_rd10 (.clk, .a(rd8), .b(rd9_d), .dout(rd10));
  shift_reg #(.W(1 + I_D + F), .DEPTH(D_RD1)) u_d_rd1 (.clk, .din(rd1), .dout(rd1_d));
  shift_reg #(.W(1 + I_D + F), .DEPTH(D_RD1)) u_d_rd2 (.clk, .din(rd2), .dout(rd2_d));
  fx_mult #(.I1(I_D), .F1(F), .I2(I_C), .F2(F), .IO(OUT_I), .FO(OUT_F))
    u_op1 (.clk, .a(rd1_d), .b(rd10), .dout(op1));
  fx_mult #(.I1(I_D), .F1(F), .I2(I_C), .F2(F), .IO(OUT_I), .FO(OUT_F))
    u_op2 (.clk, .a(rd2_d), .b(rd10), .dout(op2));

  // Side band: valid and tag follow the data through LATENCY cycles.
  valid_line #(.DEPTH(LATENCY)) u_vld (.clk, .rst_n, .din(in_valid), .dout(out_valid));
  shift_reg #(.W(TAG_W), .DEPTH(LATENCY)) u_tag (.clk, .din(in_tag), .dout(out_tag));

  // The schedule must match the document's example.
  initial begin
    assert (LATENCY == 76) else $error("kernel latency %0d, expected 76", LATENCY);
    assert (D_RD1 == 70 && D_E1 == 7 && D_RD9 == 24)
      else $error("delay stages %0d/%0d/%0d, expected 70/7/24", D_RD1, D_E1, D_RD9);
  end
endmodule

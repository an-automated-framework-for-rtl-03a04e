// tb_fx_ops: self-checking test of the fixed-point operator library:
// fx_addsub (add with fraction alignment, subtract with truncation and
// saturation), fx_mult, fx_sqrt, fx_recip, fx_round and shift_reg.
//
// Random operands (plus zeros, extremes and negative values) are applied
// every clock. Each output is compared bit for bit with a reference written
// here in 64-bit integer arithmetic (floor on dropped bits, saturation to
// the output range), taken from the operands applied exactly the
// operator's latency earlier: 1 for add/subtract, 5 for the multiplier
// (3 + floor(23/18) + floor(23/18)), 24 for the square root, 34 for the
// reciprocal, 9 for the shift register, 0 for the rounding unit.
`timescale 1ns/1ps
module tb_fx_ops;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam int N = 600;
  // Operands
  logic signed [21:0] a22, b22;   // Q6.15
  logic signed [22:0] m1, m2;     // Q7.15
  logic signed [27:0] r28;        // Q12.15
  logic signed [14:0] b15;        // Q6.8
  logic signed [14:0] rin;        // Q10.4
  logic [15:0] sr_in;
  // Results
  logic signed [22:0] add_o;      // Q7.15
  logic signed [16:0] sub_o;      // Q4.12
  logic signed [26:0] mul_o;      // Q11.15
  logic signed [21:0] sqrt_o;     // Q6.15
  logic signed [28:0] rcp_o;      // Q13.15
  logic signed [11:0] rnd_o;      // Q3.8
  logic [15:0] sr_o;

  fx_addsub #(.I1(6), .F1(15), .I2(6), .F2(8), .IO(7), .FO(15)) u_add (.clk, .a(a22), .b(b15), .dout(add_o));
  fx_addsub #(.I1(6), .F1(15), .I2(6), .F2(15), .IO(4), .FO(12), .SUB(1'b1)) u_sub (.clk, .a(a22), .b(b22), .dout(sub_o));
  fx_mult   #(.I1(7), .F1(15), .I2(7), .F2(15), .IO(11), .FO(15)) u_mul (.clk, .a(m1), .b(m2), .dout(mul_o));
  fx_sqrt   #(.II(12), .FI(15), .IO(6), .FO(15)) u_sqrt (.clk, .din(r28), .dout(sqrt_o));
  fx_recip  #(.II(12), .FI(15), .IO(13), .FO(15)) u_rcp (.clk, .din(r28), .dout(rcp_o));
  fx_round  #(.II(10), .FI(4), .IO(3), .FO(8)) u_rnd (.din(rin), .dout(rnd_o));
  shift_reg #(.W(16), .DEPTH(9)) u_sr (.clk, .din(sr_in), .dout(sr_o));

  int checks = 0, failures = 0;
  longint ha[N], hb[N], hb15[N], hm1[N], hm2[N], hr[N], hs[N];

  function automatic longint sat(longint v, int i, int f);
    longint mx = (longint'(1) <<< (i + f)) - 1;
    if (v > mx) return mx;
    if (v < -mx - 1) return -mx - 1;
    return v;
  endfunction

  function automatic longint isqrt(longint n);
    longint r = 0;
    if (n <= 0) return 0;
    // Independent method: Newton iteration from above.
    r = n;
    begin
      longint y = (r + 1) / 2;
      while (y < r) begin r = y; y = (r + n / r) / 2; end
    end
    return r;
  endfunction

  task automatic cmp(string name, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 15) $display("%s: got %0d exp %0d", name, got, exp);
    end
  endtask

  function automatic longint rnd_s(int bits);
    longint v = longint'({$urandom, $urandom}) & ((longint'(1) <<< bits) - 1);
    return v - (longint'(1) <<< (bits - 1));
  endfunction

  initial begin
    for (int n = 0; n < N; n++) begin
      @(negedge clk);
      // check results of operands applied LAT cycles ago
      if (n >= 1) begin
        cmp("add", add_o, sat(ha[n-1] + (hb15[n-1] <<< 7), 7, 15));
        cmp("sub", sub_o, sat((ha[n-1] - hb[n-1]) >>> 3, 4, 12));
      end
      if (n >= 5)  cmp("mul", mul_o, sat((hm1[n-5] * hm2[n-5]) >>> 15, 11, 15));
      if (n >= 24) cmp("sqrt", sqrt_o, sat(hr[n-24] < 0 ? 0 : isqrt(hr[n-24] <<< 15), 6, 15));
      if (n >= 34) begin
        longint x, q;
        x = hr[n-34];
        if (x == 0) q = sat(longint'(1) <<< 60, 13, 15);
        else begin
          q = sat((longint'(1) <<< 30) / (x < 0 ? -x : x), 13, 15);
          if (x < 0) q = -q;
        end
        cmp("recip", rcp_o, q);
      end
      if (n >= 9) cmp("shift_reg", sr_o, hs[n-9]);
      // new operands
      a22 = 22'(rnd_s(22)); b22 = 22'(rnd_s(22)); b15 = 15'(rnd_s(15));
      m1 = 23'(rnd_s(n % 3 == 0 ? 23 : 18)); m2 = 23'(rnd_s(n % 2 == 0 ? 23 : 16));
      case (n % 5)
        0: r28 = 28'(rnd_s(28));
        1: r28 = 28'(rnd_s(12));
        2: r28 = 0;
        default: r28 = 28'($urandom_range(0, 32'h7ff_ffff));
      endcase
      if (n % 97 == 3) begin a22 = 22'sh1fffff; b22 = -22'sh200000; end
      rin = 15'(rnd_s(15));
      sr_in = 16'($urandom);
      ha[n] = a22; hb[n] = b22; hb15[n] = b15; hm1[n] = m1; hm2[n] = m2; hr[n] = r28; hs[n] = sr_in;
      #1 cmp("round", rnd_o, sat(longint'(rin) <<< 4, 3, 8));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

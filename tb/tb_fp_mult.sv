// tb_fp_mult: self-checking test of the single-precision floating-point multiplier.
//
// Random operands of both signs and widely spread exponents, plus exact
// cancellations, zeros and an overflow case, are fed one per clock. Each
// product is compared with the double-precision product of the same operands: the
// result must have the right sign and lie within 2 units in the last place
// (the multiplier truncates). Results must appear exactly 6 cycles after the
// operands, the document's latency for a 23-bit mantissa.
`timescale 1ns/1ps
module tb_fp_mult;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [31:0] a, b, y;
  fp_mult dut (.clk, .a, .b, .dout(y));

  int checks = 0, failures = 0;
  real exp_q[$];
  localparam int LAT = 6;

  function automatic logic [31:0] rnd_fp(int erange);
    logic [7:0] e = 8'(127 + $urandom_range(0, 2 * erange) - erange);
    return {1'($urandom_range(0, 1)), e, 23'($urandom)};
  endfunction

  function automatic real p2(int n);
    real r = 1.0;
    for (int i = 0; i < n; i++) r = r * 2.0;
    for (int i = 0; i > n; i--) r = r / 2.0;
    return r;
  endfunction

  // Value of a {1,8,23} word, exponent 0 read as zero.
  function automatic real fpval(logic [31:0] w);
    real m;
    if (w[30:23] == 0) return 0.0;
    m = (1.0 + real'(w[22:0]) / 8388608.0) * p2(int'(w[30:23]) - 127);
    return w[31] ? -m : m;
  endfunction

  task automatic check(real exact, logic [31:0] got);
    real g = fpval(got);
    real tol = (exact < 0 ? -exact : exact) * p2(-22);
    checks++;
    if ((g - exact) > tol || (exact - g) > tol) begin
      failures++;
      if (failures < 10) $display("mismatch: got %g exp %g", g, exact);
    end
  endtask

  initial begin
    logic [31:0] ops_a[$], ops_b[$];
    for (int i = 0; i < 300; i++) begin
      automatic logic [31:0] x = rnd_fp(20), z = rnd_fp(i % 2 ? 3 : 30);
      if (i % 25 == 0) z = {~x[31], x[30:0]};            // exact cancellation
      if (i % 40 == 1) z = 32'h0;                         // zero operand
      ops_a.push_back(x); ops_b.push_back(z);
    end
    ops_a.push_back(32'h7f00_0000); ops_b.push_back(32'h7f00_0000); // saturates
    for (int i = 0; i < ops_a.size() + LAT; i++) begin
      @(negedge clk);
      if (i >= LAT) begin
        if (i - LAT == ops_a.size() - 1) begin
          checks++;
          if (y != 32'h7f7f_ffff) begin failures++; $display("overflow not saturated: %h", y); end
        end else check(exp_q[i - LAT], y);
      end
      if (i < ops_a.size()) begin
        a = ops_a[i]; b = ops_b[i];
        exp_q.push_back(fpval(a) * fpval(b));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_fx2fp: self-checking test of the fixed-point to floating-point format
// converter, at its default Q25.15 -> single-precision setting.
//
// Random kernel outputs of every magnitude (from one LSB to full scale, both
// signs) and zero are converted one per clock. Each result is compared with
// the real value of the fixed-point input: the sign must match and the
// magnitude must lie within one unit in the last place below it (the
// converter truncates). Results must appear 2 cycles after the input.
`timescale 1ns/1ps
module tb_fx2fp;
  logic clk = 0;
  always #5 clk = ~clk;
  logic signed [40:0] x;
  logic [31:0] y;
  fx2fp dut (.clk, .din(x), .dout(y));

  int checks = 0, failures = 0;
  localparam int LAT = 2;

  function automatic real p2(int n);
    real r = 1.0;
    for (int i = 0; i < n; i++) r = r * 2.0;
    for (int i = 0; i > n; i--) r = r / 2.0;
    return r;
  endfunction

  function automatic real fpval(logic [31:0] w);
    real m;
    if (w[30:23] == 0) return 0.0;
    m = (1.0 + real'(w[22:0]) / 8388608.0) * p2(int'(w[30:23]) - 127);
    return w[31] ? -m : m;
  endfunction

  initial begin
    logic signed [40:0] ins[$];
    real exact[$];
    for (int i = 0; i < 300; i++) begin
      automatic int sh = $urandom_range(0, 40);
      automatic logic signed [40:0] v = 41'({$urandom, $urandom}) >>> sh;
      if (i % 50 == 0) v = 0;
      if (i % 50 == 1) v = 41'sd1;
      if (i % 50 == 2) v = -41'sd1;
      if (i % 50 == 3) v = {1'b1, 40'd0};        // most negative
      ins.push_back(v);
    end
    for (int i = 0; i < ins.size() + LAT; i++) begin
      @(negedge clk);
      if (i >= LAT) begin
        automatic real g = fpval(y), e = exact[i - LAT];
        automatic real mag = e < 0 ? -e : e, gm = g < 0 ? -g : g;
        checks++;
        if ((e < 0) != (g < 0) || gm > mag || gm < mag - mag * p2(-22)) begin
          failures++;
          if (failures < 10) $display("mismatch: in %0d got %g exp %g", ins[i - LAT], g, e);
        end
      end
      if (i < ins.size()) begin
        x = ins[i];
        exact.push_back(real'(x) / 32768.0);
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

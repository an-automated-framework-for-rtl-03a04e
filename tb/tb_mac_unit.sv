// tb_mac_unit: self-checking test of the floating-point MAC with local buffer.
//
// Several groups are accumulated back to back. In each group K targets
// (K at least the adder latency + 1) are interleaved: for every source j the
// kernel values of targets 0..K-1 arrive in order, each with the source's
// weight, first set for j = 0 and last for the final source. Random bubbles
// are inserted. Every sum is compared with the double-precision sum of the
// products, within a tolerance for truncation, and must come out in target
// order exactly 20 cycles after its last term. A one-source group checks
// that first and last together bypass the adder.
`timescale 1ns/1ps
module tb_mac_unit;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0, in_first = 0, in_last = 0, out_valid;
  logic signed [40:0] in_kernel = 0;
  logic [31:0] in_weight = 0, out_sum;

  mac_unit dut (.clk, .rst_n, .in_valid, .in_first, .in_last, .in_kernel, .in_weight,
                .out_valid, .out_sum);

  int checks = 0, failures = 0, cycle = 0, got = 0, expected_n = 0;
  real exp_q[$], tol_q[$];
  int  due_q[$];

  always @(posedge clk) cycle <= cycle + 1;

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

  task automatic run_group(int k_n, int s_n);
    real acc[], mag[];
    acc = new[k_n]; mag = new[k_n];
    foreach (acc[i]) begin acc[i] = 0.0; mag[i] = 0.0; end
    for (int j = 0; j < s_n; j++) begin
      logic [31:0] w = {1'b0, 8'(120 + $urandom_range(0, 10)), 23'($urandom)};
      for (int k = 0; k < k_n; k++) begin
        logic signed [40:0] kv = 41'(signed'({$urandom, $urandom})) >>> $urandom_range(8, 30);
        while ($urandom_range(0, 5) == 0) begin @(negedge clk); in_valid = 0; end
        @(negedge clk);
        in_valid = 1; in_first = (j == 0); in_last = (j == s_n - 1);
        in_kernel = kv; in_weight = w;
        acc[k] += real'(kv) / 32768.0 * fpval(w);
        mag[k] += (kv < 0 ? -real'(kv) : real'(kv)) / 32768.0 * fpval(w);
        if (j == s_n - 1) begin
          exp_q.push_back(acc[k]);
          tol_q.push_back(mag[k] * p2(-20) * real'(s_n + 2));
          due_q.push_back(cycle + 20);
          expected_n++;
        end
      end
    end
    @(negedge clk) in_valid = 0;
  endtask

  always @(posedge clk) if (out_valid) begin
    real e, t, g;
    int due;
    g = fpval(out_sum);
    if (exp_q.size() == 0) begin failures++; $display("unexpected output"); end
    else begin
      e = exp_q.pop_front(); t = tol_q.pop_front(); due = due_q.pop_front();
      checks += 2;
      if ((g - e) > t || (e - g) > t) begin
        failures++; if (failures < 10) $display("sum %0d: got %g exp %g", got, g, e);
      end
      if (cycle != due) begin
        failures++; if (failures < 10) $display("sum %0d at cycle %0d, due %0d", got, cycle, due);
      end
    end
    got++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_group(12, 5);
    run_group(16, 9);
    run_group(13, 1);
    run_group(20, 30);
    repeat (40) @(posedge clk);
    checks++;
    if (got != expected_n) begin failures++; $display("got %0d sums, expected %0d", got, expected_n); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

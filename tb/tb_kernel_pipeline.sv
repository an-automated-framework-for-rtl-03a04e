// tb_kernel_pipeline: self-checking test of the fixed-point interaction kernel.
//
// Streams random target/source pairs (with random bubbles) into the kernel
// and compares op1/op2 bit for bit with a reference written here in 64-bit
// integer arithmetic from the kernel's formulas and node formats. Each
// result must appear exactly 76 cycles after its operands (the scheduled
// latency). A watchdog ends the run if results stop arriving.
`timescale 1ns/1ps
module tb_kernel_pipeline;
  localparam int F = 15;
  localparam int N = 400;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid;
  logic [31:0] in_tag, out_tag;
  logic signed [21:0] t1, s1, t2, s2;
  logic signed [15:0] e1;
  logic out_valid;
  logic signed [40:0] op1, op2;

  kernel_pipeline #(.TAG_W(32)) dut (.clk, .rst_n, .in_valid, .in_tag, .t1, .s1, .t2, .s2, .e1,
                                     .out_valid, .out_tag, .op1, .op2);

  int checks = 0, failures = 0, cycle = 0, sent = 0, got = 0;
  longint exp1_q[$], exp2_q[$];
  int     issue_q[$];

  always @(posedge clk) cycle <= cycle + 1;

  function automatic longint sat(longint v, int i);
    longint mx = (longint'(1) <<< (i + F)) - 1;
    if (v > mx) return mx;
    if (v < -mx - 1) return -mx - 1;
    return v;
  endfunction

  function automatic longint isqrt(longint n);
    longint r;
    if (n <= 0) return 0;
    r = longint'($floor($sqrt(real'(n))));
    while (r * r > n) r--;
    while ((r + 1) * (r + 1) <= n) r++;
    return r;
  endfunction

  function automatic longint recip(longint x, int io);
    longint q;
    if (x == 0) return sat(longint'(1) <<< 62, io);
    q = (longint'(1) <<< 30) / (x < 0 ? -x : x);
    q = sat(q, io);
    return x < 0 ? -q : q;
  endfunction

  task automatic model(longint a1, longint b1, longint a2, longint b2, longint e,
                       output longint o1, output longint o2);
    longint rd1, rd2, rd3, rd4, rd5, rd6, rd7, rd8, rd9, rd10;
    rd1 = sat(a1 - b1, 7);
    rd2 = sat(a2 - b2, 7);
    rd3 = sat((rd1 * rd1) >>> F, 11);
    rd4 = sat((rd2 * rd2) >>> F, 11);
    rd5 = sat(rd3 + rd4, 12);
    rd6 = sat(rd5 + e, 12);
    rd7 = sat(isqrt(rd6 <<< F), 6);
    rd9 = recip(rd6, 13);
    rd8 = recip(rd7, 7);
    rd10 = sat((rd8 * rd9) >>> F, 19);
    o1 = sat((rd1 * rd10) >>> F, 25);
    o2 = sat((rd2 * rd10) >>> F, 25);
  endtask

  function automatic logic signed [21:0] rnd_pos(int range_bits);
    int v = int'($urandom_range(0, (1 << range_bits) - 1)) - (1 << (range_bits - 1));
    return 22'(v);
  endfunction

  initial begin
    longint o1, o2;
    in_valid = 0; in_tag = 0; t1 = 0; s1 = 0; t2 = 0; s2 = 0; e1 = 16'(328); // ~0.01
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (sent < N) begin
      @(negedge clk);
      if ($urandom_range(0, 9) < 8) begin
        // Coordinates within +-16 (Q6.15), some pairs very close together.
        t1 = rnd_pos(20); t2 = rnd_pos(20);
        if (sent % 7 == 0) begin s1 = t1 + 22'($urandom_range(0, 255)); s2 = t2; end
        else begin s1 = rnd_pos(20); s2 = rnd_pos(20); end
        if (sent % 50 == 0) begin s1 = t1; s2 = t2; end   // coincident: softening only
        e1 = (sent % 3 == 0) ? 16'(33) : 16'(3277);
        in_valid = 1; in_tag = 32'(cycle);
        model(longint'(t1), longint'(s1), longint'(t2), longint'(s2), longint'(e1), o1, o2);
        exp1_q.push_back(o1); exp2_q.push_back(o2);
        sent++;
      end else in_valid = 0;
    end
    @(negedge clk) in_valid = 0;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    longint x1, x2;
    x1 = exp1_q.pop_front(); x2 = exp2_q.pop_front();
    checks += 3;
    if (longint'(op1) != x1) begin failures++; if (failures < 10) $display("op1 mismatch #%0d: got %0d exp %0d", got, op1, x1); end
    if (longint'(op2) != x2) begin failures++; if (failures < 10) $display("op2 mismatch #%0d: got %0d exp %0d", got, op2, x2); end
    if (cycle - int'(out_tag) != 76) begin failures++; $display("latency %0d, expected 76", cycle - int'(out_tag)); end
    got++;
    if (got == N) begin
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog: %0d of %0d results", got, N);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_sync_fifo: self-checking test of the first-word-fall-through FIFO
// (8 entries) against a queue model.
//
// Random pushes and pops (never a push when full or a pop when empty, as
// the protocol requires), including simultaneous push and pop and runs
// that fill and empty it completely. Every cycle the head word, empty,
// full, count and free are compared with the model.
`timescale 1ns/1ps
module tb_sync_fifo;
  localparam int D = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic push = 0, pop = 0, empty, full;
  logic [15:0] din = 0, dout;
  logic [3:0] count, free;

  sync_fifo #(.W(16), .DEPTH(D)) dut (.*);

  int checks = 0, failures = 0, fills = 0, empties = 0;
  logic [15:0] q[$];

  task automatic cmp(string n, longint g, longint e);
    checks++;
    if (g != e) begin failures++; if (failures < 10) $display("%s: got %0d exp %0d", n, g, e); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      int bias;
      @(negedge clk);
      cmp("count", count, q.size());
      cmp("free", free, D - q.size());
      cmp("empty", empty, q.size() == 0);
      cmp("full", full, q.size() == D);
      if (q.size() > 0) cmp("head", dout, q[0]);
      if (q.size() == D) fills++;
      if (q.size() == 0) empties++;
      bias = (n / 200) % 2 ? 3 : 1;            // alternate filling and draining phases
      push = (q.size() < D) && ($urandom_range(0, 3) < bias + 1);
      pop  = (q.size() > 0) && ($urandom_range(0, 3) < 3 - bias + 1);
      din  = 16'($urandom);
      @(posedge clk);
      if (pop) void'(q.pop_front());
      if (push) q.push_back(din);
    end
    checks++;
    if (fills == 0 || empties == 0) begin failures++; $display("never full or never empty"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

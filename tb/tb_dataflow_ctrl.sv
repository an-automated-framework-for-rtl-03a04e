// tb_dataflow_ctrl: self-checking test of the data-flow control block with
// its kernel pipelines and MACs, at the default 3 pipelines x 16 targets.
//
// A random command stream of several tiles (1 to 40 sources each, random
// positions and masses, one change of e1) is offered on the input side
// with random gaps, and the output side is randomly blocked. Every result
// word is compared with a reference: the kernel outputs computed bit for
// bit in integer arithmetic, weighted by the mass and summed in double
// precision, within a tolerance for the single-precision truncation. The
// number of words, their target order and the tile_done pulses are checked,
// and the test counts how often each mechanism occurred: loading the next
// tile while one runs, the run waiting for sources, the input waiting for a
// free target RAM, and output back-pressure.
`timescale 1ns/1ps
module tb_dataflow_ctrl;
  import tb_ref_pkg::*;
  localparam int NP = 3, K = 16, NT = NP * K;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_pop, out_push, out_full, tile_done;
  logic [63:0] in_data, out_data;

  dataflow_ctrl dut (.clk, .rst_n, .in_valid, .in_data, .in_pop, .out_push, .out_data,
                     .out_full, .tile_done);

  int checks = 0, failures = 0;
  logic [63:0] stream[$];
  real exp_x[$], exp_y[$], tol_q[$];
  int tiles = 0, done_n = 0, words = 0;
  int ev_overlap = 0, ev_src_wait = 0, ev_bank_wait = 0, ev_backpressure = 0;

  function automatic logic [21:0] rpos();
    return 22'(int'($urandom_range(0, (1 << 20) - 1)) - (1 << 19));
  endfunction

  task automatic make_tile(int n_src, logic [15:0] e);
    logic [21:0] tx[NT], ty[NT];
    real sx[NT], sy[NT], mg[NT];
    for (int i = 0; i < NT; i++) begin
      tx[i] = rpos(); ty[i] = rpos();
      stream.push_back({4'h2, 16'h0, ty[i], tx[i]});
      sx[i] = 0; sy[i] = 0; mg[i] = 0;
    end
    for (int j = 0; j < n_src; j++) begin
      logic [21:0] x = rpos(), y = rpos();
      logic [15:0] m = 16'($urandom_range(1, 32767));
      stream.push_back({(j == n_src - 1) ? 4'h4 : 4'h3, m, y, x});
      for (int i = 0; i < NT; i++) begin
        longint o1, o2;
        real w = real'(m) / 32768.0, a, b;
        kernel_ref(longint'(signed'(tx[i])), longint'(signed'(x)),
                   longint'(signed'(ty[i])), longint'(signed'(y)), longint'(e), o1, o2);
        a = real'(o1) / 32768.0 * w; b = real'(o2) / 32768.0 * w;
        sx[i] += a; sy[i] += b;
        mg[i] += (a < 0 ? -a : a) + (b < 0 ? -b : b);
      end
    end
    for (int i = 0; i < NT; i++) begin
      exp_x.push_back(sx[i]); exp_y.push_back(sy[i]);
      tol_q.push_back(mg[i] * p2(-19) * real'(n_src + 4) + 1e-30);
    end
    tiles++;
  endtask

  // Input side: a first-word-fall-through source with random gaps.
  // Short random gaps, and now and then a long pause that starves the run.
  logic gap;
  int   pause = 0;
  always @(negedge clk) begin
    if (pause > 0) pause--;
    else if ($urandom_range(0, 300) == 0) pause = 400;
    gap = pause > 0 || ($urandom_range(0, 3) == 0);
  end
  assign in_valid = rst_n && stream.size() > 0 && !gap;
  assign in_data  = stream.size() > 0 ? stream[0] : 64'h0;
  always @(posedge clk) if (in_valid && in_pop) void'(stream.pop_front());

  always @(negedge clk) out_full = ($urandom_range(0, 4) == 0);

  always @(posedge clk) if (rst_n) begin
    if (out_push) begin
      automatic real gx = fpval(out_data[31:0]), gy = fpval(out_data[63:32]);
      automatic real ex = exp_x.pop_front(), ey = exp_y.pop_front(), t = tol_q.pop_front();
      checks += 2;
      if ((gx - ex) > t || (ex - gx) > t) begin
        failures++; if (failures < 10) $display("word %0d x: got %g exp %g", words, gx, ex);
      end
      if ((gy - ey) > t || (ey - gy) > t) begin
        failures++; if (failures < 10) $display("word %0d y: got %g exp %g", words, gy, ey);
      end
      words++;
    end
    if (tile_done) begin
      done_n++;
      checks++;
      if (words != done_n * NT) begin failures++; $display("tile_done after %0d words", words); end
    end
    if (dut.g_bank[0].wr_here || dut.g_bank[1].wr_here)
      if (dut.bank_full != 2'b00) ev_overlap++;
    if (dut.bank_full[dut.run_bank] && dut.src_empty && !dut.first_src) ev_src_wait++;
    if (in_valid && in_data[63:60] == 4'h2 && dut.bank_full[dut.ld_bank]) ev_bank_wait++;
    if (dut.out_state == dut.OUT_DRAIN && out_full) ev_backpressure++;
  end

  initial begin
    stream.push_back({4'h1, 44'h0, 16'd328});       // e1 ~ 0.01
    make_tile(1, 16'd328);
    make_tile(5, 16'd328);
    make_tile(40, 16'd328);
    make_tile(3, 16'd328);
    stream.push_back({4'h1, 44'h0, 16'd3277});      // e1 ~ 0.1
    make_tile(17, 16'd3277);
    make_tile(2, 16'd3277);
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done_n == tiles);
    repeat (20) @(posedge clk);
    checks += 5;
    if (words != tiles * NT) begin failures++; $display("%0d words, expected %0d", words, tiles * NT); end
    if (ev_overlap == 0)      begin failures++; $display("next tile never loaded during a run"); end
    if (ev_src_wait == 0)     begin failures++; $display("run never waited for a source"); end
    if (ev_bank_wait == 0)    begin failures++; $display("input never waited for a target RAM"); end
    if (ev_backpressure == 0) begin failures++; $display("no output back-pressure"); end
    $display("events: overlap=%0d src_wait=%0d bank_wait=%0d backpressure=%0d",
             ev_overlap, ev_src_wait, ev_bank_wait, ev_backpressure);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog: %0d of %0d tiles", done_n, tiles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

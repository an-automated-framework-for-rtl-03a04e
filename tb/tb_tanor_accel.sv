// tb_tanor_accel: end-to-end test of the accelerator at its default
// parameters (3 pipelines, 16 targets per pipeline, 16-word bursts,
// 512-word buffers, single precision).
//
// The testbench acts as the host program: it writes a command stream of
// 20 target tiles into host memory (1 to 1500 sources per tile, two changes
// of the softening constant e1), programs the controller's registers, and
// waits for one interrupt per tile. The endpoint model answers the DMA
// requests, withholds completions for a while in the longest tile so that
// the kernels run dry, for a stretch of the run it stops accepting writes so that the
// OUT buffer fills and the data-flow control is held back. Every result
// word in host memory is compared with a reference (integer kernel model,
// double-precision sums, truncation tolerance). The test also counts how
// often each mechanism occurred and fails if one never did: read and write
// bursts, interrupts, loading the next tile while one runs, the run waiting
// for sources, the read engine waiting for room in the IN buffer, the
// output held back by a full OUT buffer, and a new e1 arriving while a tile
// with the old one is still running.
`timescale 1ns/1ps
module tb_tanor_accel;
  import tb_ref_pkg::*;
  localparam int NT = 48;                    // 3 pipelines x 16 targets
  localparam longint RXA = 64'h0, TXA = 64'h40000;

  logic clk = 0, rst_n = 0;
  always #4 clk = ~clk;                      // 125 MHz

  logic reg_wr = 0; logic [1:0] reg_addr = 0; logic [63:0] reg_wdata = 0;
  logic rd_req_valid, rd_req_ready, cpl_valid, wr_valid, wr_ready_ep, wr_ready, wr_first, wr_last, irq;
  logic [63:0] rd_req_addr, cpl_data, wr_addr, wr_data;
  logic [15:0] rd_req_len;
  logic hold_writes = 0;

  tanor_accel dut (.clk, .rst_n, .reg_wr, .reg_addr, .reg_wdata,
                   .rd_req_valid, .rd_req_ready, .rd_req_addr, .rd_req_len, .cpl_valid, .cpl_data,
                   .wr_valid, .wr_ready, .wr_addr, .wr_data, .wr_first, .wr_last, .irq);
  pcie_ep_model #(.MEM_WORDS(65536)) ep (.clk, .rst_n, .rd_req_valid, .rd_req_ready, .rd_req_addr,
                   .rd_req_len, .cpl_valid, .cpl_data, .wr_valid(wr_valid && !hold_writes),
                   .wr_ready(wr_ready_ep), .wr_addr, .wr_data, .wr_first, .wr_last);
  assign wr_ready = wr_ready_ep && !hold_writes;

  int checks = 0, failures = 0, tiles = 0, irqs = 0;
  logic [63:0] stream[$];
  real exp_x[$], exp_y[$], tol_q[$];
  int ev_overlap = 0, ev_src_wait = 0, ev_rx_full = 0, ev_out_full = 0, ev_const_live = 0;

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
      logic [21:0] x, y;
      logic [15:0] m;
      x = rpos(); y = rpos(); m = 16'($urandom_range(1, 32767));
      stream.push_back({(j == n_src - 1) ? 4'h4 : 4'h3, m, y, x});
      for (int i = 0; i < NT; i++) begin
        longint o1, o2;
        real w, a, b;
        w = real'(m) / 32768.0;
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

  task automatic wreg(logic [1:0] a, logic [63:0] d);
    @(negedge clk); reg_wr = 1; reg_addr = a; reg_wdata = d;
    @(negedge clk); reg_wr = 0;
  endtask

  always @(posedge clk) if (rst_n) begin
    if (irq) irqs++;
    if (dut.u_df.g_bank[0].wr_here || dut.u_df.g_bank[1].wr_here)
      if (dut.u_df.bank_full != 2'b00) ev_overlap++;
    if (dut.u_df.bank_full[dut.u_df.run_bank] && dut.u_df.src_empty && !dut.u_df.first_src) ev_src_wait++;
    if (dut.u_pci.rd_state == dut.u_pci.RD_IDLE && dut.u_pci.rx_rem != 0 && dut.rxb_free < 16) ev_rx_full++;
    if (dut.u_df.out_state == dut.u_df.OUT_DRAIN && dut.txb_full) ev_out_full++;
    if (dut.rxb_pop && dut.rxb_dout[63:60] == 4'h1 && dut.u_df.bank_full != 2'b00) ev_const_live++;
  end

  initial begin
    stream.push_back({4'h1, 44'h0, 16'd328});            // e1 ~ 0.01
    make_tile(1, 16'd328);
    make_tile(1500, 16'd328);                             // longer than the IN buffer
    make_tile(60, 16'd328);
    make_tile(7, 16'd328);
    stream.push_back({4'h1, 44'h0, 16'd3277});           // e1 ~ 0.1
    make_tile(25, 16'd3277);
    for (int t = 0; t < 13; t++) make_tile(2, 16'd3277); // many short tiles: fill the OUT buffer
    stream.push_back({4'h1, 44'h0, 16'd33});             // e1 ~ 0.001
    make_tile(40, 16'd33);
    make_tile(3, 16'd33);
    foreach (stream[i]) ep.mem[RXA / 8 + i] = stream[i];
    repeat (3) @(posedge clk);
    rst_n = 1;
    wreg(0, RXA); wreg(1, 64'(stream.size())); wreg(2, TXA); wreg(3, 1);
    // starve the accelerator of input in the middle of the long tile
    wait (irqs >= 1);
    repeat (3000) @(posedge clk);
    @(negedge clk) ep.hold_reads = 1;
    repeat (10000) @(posedge clk);
    @(negedge clk) ep.hold_reads = 0;
    // hold the host side of the writes for a while once the short tiles run
    wait (irqs >= 4);
    @(negedge clk) hold_writes = 1;
    repeat (3000) @(posedge clk);
    @(negedge clk) hold_writes = 0;
    wait (irqs == tiles);
    repeat (20) @(posedge clk);
    for (int i = 0; i < tiles * NT; i++) begin
      real gx, gy;
      gx = fpval(ep.mem[TXA / 8 + i][31:0]);
      gy = fpval(ep.mem[TXA / 8 + i][63:32]);
      checks += 2;
      if ((gx - exp_x[i]) > tol_q[i] || (exp_x[i] - gx) > tol_q[i]) begin
        failures++; if (failures < 10) $display("target %0d x: got %g exp %g", i, gx, exp_x[i]);
      end
      if ((gy - exp_y[i]) > tol_q[i] || (exp_y[i] - gy) > tol_q[i]) begin
        failures++; if (failures < 10) $display("target %0d y: got %g exp %g", i, gy, exp_y[i]);
      end
    end
    checks += 8;
    if (irqs != tiles)          begin failures++; $display("%0d interrupts for %0d tiles", irqs, tiles); end
    if (ep.rd_bursts == 0 || ep.max_rd_len != 16) begin failures++; $display("no full read burst"); end
    if (ep.wr_bursts == 0 || ep.max_wr_len != 16) begin failures++; $display("no full write burst"); end
    if (ev_overlap == 0)        begin failures++; $display("next tile never loaded during a run"); end
    if (ev_src_wait == 0)       begin failures++; $display("run never waited for a source"); end
    if (ev_rx_full == 0)        begin failures++; $display("IN buffer never full"); end
    if (ev_out_full == 0)       begin failures++; $display("OUT buffer never full"); end
    if (ev_const_live == 0)     begin failures++; $display("e1 never changed during a run"); end
    $display("events: rd_bursts=%0d wr_bursts=%0d irqs=%0d overlap=%0d src_wait=%0d rx_full=%0d out_full=%0d const_live=%0d",
             ep.rd_bursts, ep.wr_bursts, irqs, ev_overlap, ev_src_wait, ev_rx_full, ev_out_full, ev_const_live);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog: %0d of %0d interrupts", irqs, tiles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

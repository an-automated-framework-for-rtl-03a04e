// tb_workload_5k: the accelerator on a complete N-body step of the size
// used for the performance figures: 5000 target particles against 5000
// source particles, all parameters at their defaults.
//
// The testbench plays the host program. It generates one random particle
// set, writes the command stream into host memory (one e1 constant, then
// for each of the ceil(5000 / 48) = 105 target tiles its 48 targets, the
// last tile padded with copies of target 0, followed by all 5000 sources),
// starts the controller and waits for one interrupt per tile. Every result
// word is compared with a reference (integer kernel model, double-precision
// sums, tolerance for the single-precision truncating accumulation), and
// the run time in clock cycles is compared with the ideal of one source
// per K = 16 cycles per tile. The endpoint model answers with random delays
// and back-pressure. N_TGT and N_SRC are localparams so that smaller runs
// of the same test are a one-line change.
`timescale 1ns/1ps
module tb_workload_5k;
  import tb_ref_pkg::*;
  localparam int NT     = 48;                         // 3 pipelines x 16 targets
  localparam int K      = 16;
  localparam int N_TGT  = 5000;
  localparam int N_SRC  = 5000;
  localparam int TILES  = (N_TGT + NT - 1) / NT;
  localparam int WORDS  = 1 + TILES * (NT + N_SRC);
  localparam longint RXA = 64'h0;
  localparam longint TXA = 64'((WORDS + 1024) * 8);
  localparam int MEMW   = WORDS + 1024 + TILES * NT + 64;
  localparam logic [15:0] E1 = 16'd328;               // e1 ~ 0.01

  logic clk = 0, rst_n = 0;
  always #4 clk = ~clk;                               // 125 MHz

  logic reg_wr = 0; logic [1:0] reg_addr = 0; logic [63:0] reg_wdata = 0;
  logic rd_req_valid, rd_req_ready, cpl_valid, wr_valid, wr_ready, wr_first, wr_last, irq;
  logic [63:0] rd_req_addr, cpl_data, wr_addr, wr_data;
  logic [15:0] rd_req_len;

  tanor_accel dut (.clk, .rst_n, .reg_wr, .reg_addr, .reg_wdata,
                   .rd_req_valid, .rd_req_ready, .rd_req_addr, .rd_req_len, .cpl_valid, .cpl_data,
                   .wr_valid, .wr_ready, .wr_addr, .wr_data, .wr_first, .wr_last, .irq);
  pcie_ep_model #(.MEM_WORDS(MEMW)) ep (.clk, .rst_n, .rd_req_valid, .rd_req_ready, .rd_req_addr,
                   .rd_req_len, .cpl_valid, .cpl_data, .wr_valid, .wr_ready, .wr_addr, .wr_data,
                   .wr_first, .wr_last);

  int checks = 0, failures = 0, irqs = 0;
  longint cycles = 0, t_start = 0, t_end = 0;
  logic [21:0] tx[N_TGT], ty[N_TGT], sx[N_SRC], sy[N_SRC];
  logic [15:0] sm[N_SRC];
  real exp_x[TILES*NT], exp_y[TILES*NT], tol[TILES*NT];

  function automatic logic [21:0] rpos();
    return 22'(int'($urandom_range(0, (1 << 20) - 1)) - (1 << 19));
  endfunction

  task automatic wreg(logic [1:0] a, logic [63:0] d);
    @(negedge clk); reg_wr = 1; reg_addr = a; reg_wdata = d;
    @(negedge clk); reg_wr = 0;
  endtask

  always @(posedge clk) begin
    cycles++;
    if (rst_n && irq) begin
      irqs++;
      t_end = cycles;
    end
  end

  initial begin
    int w;
    for (int i = 0; i < N_TGT; i++) begin tx[i] = rpos(); ty[i] = rpos(); end
    for (int j = 0; j < N_SRC; j++) begin
      sx[j] = rpos(); sy[j] = rpos(); sm[j] = 16'($urandom_range(1, 32767));
    end
    // command stream
    w = RXA / 8;
    ep.mem[w++] = {4'h1, 44'h0, E1};
    for (int t = 0; t < TILES; t++) begin
      for (int k = 0; k < NT; k++) begin
        int i;
        i = t * NT + k;
        if (i >= N_TGT) i = 0;                         // padding
        ep.mem[w++] = {4'h2, 16'h0, ty[i], tx[i]};
      end
      for (int j = 0; j < N_SRC; j++)
        ep.mem[w++] = {(j == N_SRC - 1) ? 4'h4 : 4'h3, sm[j], sy[j], sx[j]};
    end
    // reference
    for (int n = 0; n < TILES * NT; n++) begin
      int i;
      real ax, ay, mg;
      i = (n < N_TGT) ? n : 0;
      ax = 0; ay = 0; mg = 0;
      for (int j = 0; j < N_SRC; j++) begin
        longint o1, o2;
        real wt, a, b;
        wt = real'(sm[j]) / 32768.0;
        kernel_ref(longint'(signed'(tx[i])), longint'(signed'(sx[j])),
                   longint'(signed'(ty[i])), longint'(signed'(sy[j])), longint'(E1), o1, o2);
        a = real'(o1) / 32768.0 * wt; b = real'(o2) / 32768.0 * wt;
        ax += a; ay += b;
        mg += (a < 0 ? -a : a) + (b < 0 ? -b : b);
      end
      exp_x[n] = ax; exp_y[n] = ay;
      tol[n] = mg * p2(-19) * real'(N_SRC + 4) + 1e-30;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    wreg(0, RXA); wreg(1, 64'(WORDS)); wreg(2, TXA);
    t_start = cycles;
    wreg(3, 1);
    wait (irqs == TILES);
    repeat (20) @(posedge clk);
    for (int n = 0; n < TILES * NT; n++) begin
      real gx, gy;
      gx = fpval(ep.mem[TXA / 8 + n][31:0]);
      gy = fpval(ep.mem[TXA / 8 + n][63:32]);
      checks += 2;
      if ((gx - exp_x[n]) > tol[n] || (exp_x[n] - gx) > tol[n]) begin
        failures++; if (failures < 10) $display("target %0d x: got %g exp %g", n, gx, exp_x[n]);
      end
      if ((gy - exp_y[n]) > tol[n] || (exp_y[n] - gy) > tol[n]) begin
        failures++; if (failures < 10) $display("target %0d y: got %g exp %g", n, gy, exp_y[n]);
      end
    end
    // throughput: the run may exceed the ideal TILES * N_SRC * K cycles only
    // by the pipeline fill and drain and the per-tile loading overhead
    checks++;
    if (t_end - t_start > longint'(TILES) * N_SRC * K + longint'(TILES) * 200 + 2000) begin
      failures++;
      $display("run took %0d cycles, ideal %0d", t_end - t_start, longint'(TILES) * N_SRC * K);
    end
    $display("%0d targets x %0d sources: %0d tiles, %0d stream words, %0d cycles (ideal %0d)",
             N_TGT, N_SRC, TILES, WORDS, t_end - t_start, longint'(TILES) * N_SRC * K);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (longint'(TILES) * N_SRC * K * 2 + 100000) @(posedge clk);
    failures++;
    $display("watchdog: %0d of %0d interrupts", irqs, TILES);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

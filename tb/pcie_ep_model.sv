// pcie_ep_model: behavioural model of the PCI Express endpoint core and of
// host memory, for simulation only.
//
// It serves the accelerator's simplified transaction interface: read
// requests are accepted after random waits and answered, in order, with
// the requested words of host memory after a random delay and with random
// gaps; write beats are accepted with random back-pressure and stored into
// host memory from the burst's start address on. Host memory is the array
// mem (64-bit words, byte address / 8), which the testbench fills and
// inspects directly; hold_reads lets it withhold completions for a while
// to starve the accelerator. Counters report bursts and the longest burst seen.
`timescale 1ns/1ps
module pcie_ep_model #(
  parameter int unsigned MEM_WORDS = 8192
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        rd_req_valid,
  output logic        rd_req_ready,
  input  logic [63:0] rd_req_addr,
  input  logic [15:0] rd_req_len,
  output logic        cpl_valid,
  output logic [63:0] cpl_data,
  input  logic        wr_valid,
  output logic        wr_ready,
  input  logic [63:0] wr_addr,
  input  logic [63:0] wr_data,
  input  logic        wr_first,
  input  logic        wr_last
);
  logic [63:0] mem [MEM_WORDS];
  int rd_bursts = 0, wr_bursts = 0, max_rd_len = 0, max_wr_len = 0, wr_beats = 0;
  int pending[$];           // word indices still to be returned
  int delay = 0, cur = 0, cur_len = 0;
  bit hold_reads = 0;       // set by a testbench to withhold completions

  always @(negedge clk) begin
    rd_req_ready = ($urandom_range(0, 2) != 0);
    wr_ready     = ($urandom_range(0, 3) != 0);
  end

  always @(posedge clk) begin
    if (!rst_n) begin
      cpl_valid <= 1'b0;
    end else begin
      if (rd_req_valid && rd_req_ready) begin
        for (int i = 0; i < int'(rd_req_len); i++) pending.push_back(int'(rd_req_addr / 8) + i);
        rd_bursts++;
        if (int'(rd_req_len) > max_rd_len) max_rd_len = int'(rd_req_len);
        delay = $urandom_range(3, 20);
      end
      cpl_valid <= 1'b0;
      if (delay > 0) delay--;
      else if (!hold_reads && pending.size() > 0 && $urandom_range(0, 4) != 0) begin
        automatic int idx = pending.pop_front();
        cpl_valid <= 1'b1;
        cpl_data  <= mem[idx];
      end
      if (wr_valid && wr_ready) begin
        if (wr_first) begin
          cur = int'(wr_addr / 8);
          cur_len = 0;
          wr_bursts++;
        end
        mem[cur] = wr_data;
        cur++;
        cur_len++;
        wr_beats++;
        if (wr_last && cur_len > max_wr_len) max_wr_len = cur_len;
      end
    end
  end
endmodule

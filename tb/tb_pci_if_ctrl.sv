// tb_pci_if_ctrl: self-checking test of the PCI interface controller with
// the endpoint/host-memory model, at BURST = 8, TILE_WORDS = 20 and 32-word
// buffers so that short bursts, tile-bounded bursts and a full RX buffer
// all occur.
//
// The host fills its memory with a 203-word input stream and programs the
// registers. The testbench plays both buffers: it drains the RX side slowly
// (so the read engine must wait for room) and feeds the TX side with 5
// tiles of result words. Checked: every input word arrives once and in
// order, no read burst is requested without room for it, every result word
// lands at its host address, no write burst is longer than BURST or
// crosses a tile, and exactly one interrupt follows each tile, after its
// last word.
`timescale 1ns/1ps
module tb_pci_if_ctrl;
  localparam int BURST = 8, TW = 20, DEPTH = 32, NIN = 203, NTILE = 5;
  localparam longint RXA = 64'h100, TXA = 64'h8000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic reg_wr = 0; logic [1:0] reg_addr = 0; logic [63:0] reg_wdata = 0;
  logic rd_req_valid, rd_req_ready, cpl_valid, wr_valid, wr_ready, wr_first, wr_last, irq;
  logic [63:0] rd_req_addr, cpl_data, wr_addr, wr_data, rxb_data, txb_data;
  logic [15:0] rd_req_len;
  logic rxb_push, txb_pop;
  logic [5:0] rxb_free, txb_count;

  pci_if_ctrl #(.BURST(BURST), .TILE_WORDS(TW), .BUF_DEPTH(DEPTH)) dut (.*);
  pcie_ep_model ep (.*);

  int checks = 0, failures = 0, rx_got = 0, tx_sent = 0, irqs = 0;
  logic [63:0] rxq[$], txq[$];
  int tx_total = 0;

  task automatic fail(string msg);
    failures++;
    if (failures < 10) $display("%s", msg);
  endtask

  // RX buffer model, drained slowly
  assign rxb_free = 6'(DEPTH - rxq.size());
  always @(posedge clk) if (rst_n) begin
    if (rxb_push) begin
      checks++;
      if (rxq.size() >= DEPTH) fail("RX buffer overflow");
      if (rxb_data != {32'hA5A5_0000, 32'(rx_got)}) fail($sformatf("RX word %0d wrong: %h", rx_got, rxb_data));
      rxq.push_back(rxb_data);
      rx_got++;
    end
    if (rxq.size() > 0 && $urandom_range(0, 2) == 0) void'(rxq.pop_front());
  end

  // TX buffer model, filled with tile results over time
  assign txb_count = 6'(txq.size());
  assign txb_data  = txq.size() > 0 ? txq[0] : 64'h0;
  always @(posedge clk) if (rst_n) begin
    if (txb_pop) begin void'(txq.pop_front()); tx_sent++; end
    if (tx_total < NTILE * TW && txq.size() < DEPTH && $urandom_range(0, 1) == 0) begin
      txq.push_back({32'h5A5A_0000, 32'(tx_total)});
      tx_total++;
    end
  end

  // Bursts and interrupts
  int beat_in_burst = 0;
  always @(posedge clk) if (rst_n) begin
    if (rd_req_valid && rd_req_ready) begin
      checks++;
      if (int'(rd_req_len) > BURST || rxb_free < 6'(BURST)) fail("read burst without room");
    end
    if (wr_valid && wr_ready) begin
      beat_in_burst = wr_first ? 1 : beat_in_burst + 1;
      checks++;
      if (beat_in_burst > BURST) fail("write burst longer than BURST");
      if ((int'((wr_addr - TXA) / 8) % TW) + beat_in_burst > TW) fail("write burst crosses a tile");
    end
    if (irq) begin
      irqs++;
      checks++;
      if (tx_sent != irqs * TW) fail($sformatf("irq %0d after %0d words", irqs, tx_sent));
    end
  end

  task automatic wreg(logic [1:0] a, logic [63:0] d);
    @(negedge clk); reg_wr = 1; reg_addr = a; reg_wdata = d;
    @(negedge clk); reg_wr = 0;
  endtask

  initial begin
    for (int i = 0; i < NIN; i++) ep.mem[RXA / 8 + i] = {32'hA5A5_0000, 32'(i)};
    repeat (3) @(posedge clk);
    rst_n = 1;
    wreg(0, RXA); wreg(1, NIN); wreg(2, TXA); wreg(3, 1);
    wait (rx_got == NIN && irqs == NTILE);
    repeat (50) @(posedge clk);
    checks += 4;
    if (rx_got != NIN) fail("RX word count");
    if (tx_sent != NTILE * TW) fail("TX word count");
    for (int i = 0; i < NTILE * TW; i++) begin
      checks++;
      if (ep.mem[TXA / 8 + i] != {32'h5A5A_0000, 32'(i)}) fail($sformatf("host word %0d: %h", i, ep.mem[TXA / 8 + i]));
    end
    if (ep.max_rd_len != BURST) fail("no full read burst");
    if (irqs != NTILE) fail("interrupt count");
    $display("read bursts %0d, write bursts %0d", ep.rd_bursts, ep.wr_bursts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog: rx %0d, irqs %0d", rx_got, irqs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

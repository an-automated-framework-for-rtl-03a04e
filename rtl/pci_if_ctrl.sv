// pci_if_ctrl: PCI interface controller with DMA engines.
//
// The host cannot start burst transfers itself, so it only writes the
// transfer information into four registers of this controller; the
// controller then moves the data with burst transactions of its own through
// the PCI Express endpoint core:
//   reg 0  RX_ADDR  host byte address of the input stream
//   reg 1  RX_LEN   length of the input stream in 64-bit words
//   reg 2  TX_ADDR  host byte address where results are written
//   reg 3  CTRL     writing bit 0 starts a job (loads the counters)
// The read engine requests bursts of up to BURST words (one request in
// flight) whenever the input (RX) buffer has room for a whole burst, and
// pushes the completion data into that buffer in order. The write engine
// sends the output (TX) buffer to host memory in bursts of up to BURST
// words that never cross a tile boundary, and raises irq for one cycle
// after the last word of each tile of TILE_WORDS results has been sent.
//
// The endpoint side is a simplified transaction interface, not the core's
// own: a read request (addr, len) with valid/ready, completion words with
// a valid strobe (the endpoint must accept as many as were requested), and
// write beats with valid/ready, the burst's start address and first/last
// markers. The document gives the controller's purpose (DMA with burst
// transactions started by the accelerator, an interrupt per target tile);
// the register map, the interface and BURST are this design's choices.
module pci_if_ctrl #(
  parameter int unsigned BURST      = 16,
  parameter int unsigned TILE_WORDS = 48,
  parameter int unsigned BUF_DEPTH  = 512
) (
  input  logic        clk,
  input  logic        rst_n,
  // register writes from the host
  input  logic        reg_wr,
  input  logic [1:0]  reg_addr,
  input  logic [63:0] reg_wdata,
  // DMA read: request and completion data
  output logic        rd_req_valid,
  input  logic        rd_req_ready,
  output logic [63:0] rd_req_addr,
  output logic [15:0] rd_req_len,
  input  logic        cpl_valid,
  input  logic [63:0] cpl_data,
  // DMA write beats
  output logic        wr_valid,
  input  logic        wr_ready,
  output logic [63:0] wr_addr,
  output logic [63:0] wr_data,
  output logic        wr_first,
  output logic        wr_last,
  output logic        irq,
  // input (RX) buffer
  output logic        rxb_push,
  output logic [63:0] rxb_data,
  input  logic [$clog2(BUF_DEPTH+1)-1:0] rxb_free,
  // output (TX) buffer
  output logic        txb_pop,
  input  logic [63:0] txb_data,
  input  logic [$clog2(BUF_DEPTH+1)-1:0] txb_count
);
  localparam int unsigned CW = $clog2(BUF_DEPTH + 1);
  localparam int unsigned BW = $clog2(BURST + 1);
  localparam int unsigned TW = $clog2(TILE_WORDS + 1);

  initial assert (BURST <= BUF_DEPTH && BURST < 65536);

  logic [63:0] reg_rx_addr, reg_rx_len, reg_tx_addr;

  // ------------------------------------------------------------ read engine
  typedef enum logic [1:0] {RD_IDLE, RD_REQ, RD_DATA} rd_state_e;
  rd_state_e   rd_state;
  logic [63:0] rx_ptr, rx_rem;
  logic [BW-1:0] cpl_rem, rd_len;

  assign rd_len       = (rx_rem < 64'(BURST)) ? BW'(rx_rem) : BW'(BURST);
  assign rd_req_valid = (rd_state == RD_REQ);
  assign rd_req_addr  = rx_ptr;
  assign rd_req_len   = 16'(rd_len);
  assign rxb_push     = cpl_valid;
  assign rxb_data     = cpl_data;

  // ----------------------------------------------------------- write engine
  typedef enum logic [1:0] {WR_IDLE, WR_BURST} wr_state_e;
  wr_state_e   wr_state;
  logic [63:0] tx_ptr;
  logic [TW-1:0] tile_rem;
  logic [BW-1:0] beats, wr_len;

  assign wr_len   = (tile_rem < TW'(BURST)) ? BW'(tile_rem) : BW'(BURST);
  assign wr_valid = (wr_state == WR_BURST);
  assign wr_addr  = tx_ptr;
  assign wr_data  = txb_data;
  assign wr_last  = (beats == BW'(1));
  assign txb_pop  = wr_valid && wr_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reg_rx_addr <= '0;
      reg_rx_len  <= '0;
      reg_tx_addr <= '0;
      rd_state    <= RD_IDLE;
      rx_ptr      <= '0;
      rx_rem      <= '0;
      cpl_rem     <= '0;
      wr_state    <= WR_IDLE;
      tx_ptr      <= '0;
      tile_rem    <= TW'(TILE_WORDS);
      beats       <= '0;
      wr_first    <= 1'b0;
      irq         <= 1'b0;
    end else begin
      irq <= 1'b0;
      if (reg_wr) begin
        unique case (reg_addr)
          2'd0: reg_rx_addr <= reg_wdata;
          2'd1: reg_rx_len  <= reg_wdata;
          2'd2: reg_tx_addr <= reg_wdata;
          2'd3: if (reg_wdata[0]) begin
            rx_ptr   <= reg_rx_addr;
            rx_rem   <= reg_rx_len;
            tx_ptr   <= reg_tx_addr;
            tile_rem <= TW'(TILE_WORDS);
          end
          default: ;
        endcase
      end

      unique case (rd_state)
        RD_IDLE: if (rx_rem != '0 && rxb_free >= CW'(BURST)) rd_state <= RD_REQ;
        RD_REQ: if (rd_req_ready) begin
          rx_ptr   <= rx_ptr + 64'(rd_len) * 64'd8;
          rx_rem   <= rx_rem - 64'(rd_len);
          cpl_rem  <= rd_len;
          rd_state <= RD_DATA;
        end
        RD_DATA: if (cpl_valid) begin
          cpl_rem <= cpl_rem - BW'(1);
          if (cpl_rem == BW'(1)) rd_state <= RD_IDLE;
        end
        default: rd_state <= RD_IDLE;
      endcase

      unique case (wr_state)
        WR_IDLE: if (txb_count >= CW'(wr_len)) begin
          beats    <= wr_len;
          wr_first <= 1'b1;
          wr_state <= WR_BURST;
        end
        WR_BURST: if (wr_ready) begin
          wr_first <= 1'b0;
          beats    <= beats - BW'(1);
          if (beats == BW'(1)) begin
            wr_state <= WR_IDLE;
            tx_ptr   <= tx_ptr + 64'(wr_len) * 64'd8;
            if (tile_rem == TW'(wr_len)) begin
              tile_rem <= TW'(TILE_WORDS);
              irq      <= 1'b1;
            end else tile_rem <= tile_rem - TW'(wr_len);
          end
        end
        default: wr_state <= WR_IDLE;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) cpl_valid |-> rd_state == RD_DATA)
    else $error("pci_if_ctrl: completion data without an outstanding request");
  assert property (@(posedge clk) disable iff (!rst_n) txb_pop |-> txb_count != '0)
    else $error("pci_if_ctrl: TX buffer underrun");
  assert property (@(posedge clk) disable iff (!rst_n) wr_valid && !wr_ready |=> wr_valid && $stable(wr_data))
    else $error("pci_if_ctrl: write beat withdrawn");
endmodule

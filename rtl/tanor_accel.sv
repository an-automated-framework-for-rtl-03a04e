// tanor_accel: N-body interaction accelerator, top level.
//
// The accelerator computes, for every target particle t_i, the sum over
// source particles s_j of m_j * (t_i - s_j) / (|t_i - s_j|^2 + e1)^(3/2)
// (two components, a softened 2-D gravitational interaction), with a fully
// pipelined fixed-point kernel and single-precision accumulation. Its four
// parts are connected as in the architecture's block diagram:
//
//   PCI Express endpoint <-> pci_if_ctrl <-> IN buffer  -> dataflow_ctrl
//                                        <-  OUT buffer <- (kernels, MACs)
//
// The host writes a structured command stream (see tanor_pkg) into its own
// memory and programs the controller's registers; the controller fetches
// the stream in bursts into the IN (RX) buffer, the data-flow control runs
// it through N_PIPE kernel pipelines, and the results, one 64-bit word of
// two floats per target, flow through the OUT (TX) buffer back to host
// memory, with an interrupt after each target tile. The PCI Express
// endpoint core itself is not part of this design: its side of
// pci_if_ctrl is brought out as ports.
//
// Defaults: N_PIPE = 3 pipelines (the document's pipelines per device for
// its gravitational kernel), K = 16 targets per pipeline and tile, bursts of
// 16 words, 512-word buffers, single-precision accumulation. K, BURST and
// the buffer depth are this design's choices.
module tanor_accel #(
  parameter int unsigned N_PIPE    = 3,
  parameter int unsigned K         = 16,
  parameter int unsigned BURST     = 16,
  parameter int unsigned BUF_DEPTH = 512,
  parameter int unsigned SRC_DEPTH = 16,
  parameter int unsigned EW        = 8,
  parameter int unsigned MW        = 23
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        reg_wr,
  input  logic [1:0]  reg_addr,
  input  logic [63:0] reg_wdata,
  output logic        rd_req_valid,
  input  logic        rd_req_ready,
  output logic [63:0] rd_req_addr,
  output logic [15:0] rd_req_len,
  input  logic        cpl_valid,
  input  logic [63:0] cpl_data,
  output logic        wr_valid,
  input  logic        wr_ready,
  output logic [63:0] wr_addr,
  output logic [63:0] wr_data,
  output logic        wr_first,
  output logic        wr_last,
  output logic        irq
);
  localparam int unsigned CW = $clog2(BUF_DEPTH + 1);

  logic        rxb_push, rxb_pop, rxb_empty, rxb_full;
  logic [63:0] rxb_din, rxb_dout;
  logic [CW-1:0] rxb_count, rxb_free;
  logic        txb_push, txb_pop, txb_empty, txb_full;
  logic [63:0] txb_din, txb_dout;
  logic [CW-1:0] txb_count, txb_free;

  pci_if_ctrl #(.BURST(BURST), .TILE_WORDS(N_PIPE * K), .BUF_DEPTH(BUF_DEPTH)) u_pci (
    .clk, .rst_n, .reg_wr, .reg_addr, .reg_wdata,
    .rd_req_valid, .rd_req_ready, .rd_req_addr, .rd_req_len, .cpl_valid, .cpl_data,
    .wr_valid, .wr_ready, .wr_addr, .wr_data, .wr_first, .wr_last, .irq,
    .rxb_push, .rxb_data(rxb_din), .rxb_free,
    .txb_pop, .txb_data(txb_dout), .txb_count);

  sync_fifo #(.W(64), .DEPTH(BUF_DEPTH)) u_in_buf (
    .clk, .rst_n, .push(rxb_push), .din(rxb_din), .pop(rxb_pop), .dout(rxb_dout),
    .empty(rxb_empty), .full(rxb_full), .count(rxb_count), .free(rxb_free));

  dataflow_ctrl #(.N_PIPE(N_PIPE), .K(K), .SRC_DEPTH(SRC_DEPTH), .EW(EW), .MW(MW)) u_df (
    .clk, .rst_n, .in_valid(!rxb_empty), .in_data(rxb_dout), .in_pop(rxb_pop),
    // tile_done is left open: the interrupt is raised by the write engine
    // once a tile's results have reached host memory, which is later.
    .out_push(txb_push), .out_data(txb_din), .out_full(txb_full), .tile_done());

  sync_fifo #(.W(64), .DEPTH(BUF_DEPTH)) u_out_buf (
    .clk, .rst_n, .push(txb_push), .din(txb_din), .pop(txb_pop), .dout(txb_dout),
    .empty(txb_empty), .full(txb_full), .count(txb_count), .free(txb_free));
endmodule

// dataflow_ctrl: data-flow control block of the N-body accelerator.
//
// It turns the host's command stream into interactions for N_PIPE kernel
// pipelines and turns their accumulated results back into a stream. Inside:
//
//  * a constant register (the softening constant e1), copied into a
//    register per target RAM when a tile is loaded, so that a new constant
//    in the stream never changes a tile that is still running;
//  * two single-port target RAMs (spram), each holding one target tile of
//    N_PIPE * K targets, one being filled while the other is read;
//  * a source FIFO that receives the source stream;
//  * N_PIPE kernel pipelines, each followed by two MAC units (one per
//    kernel output) and an accumulator (ACC) FIFO;
//  * three state machines: the input state machine stores incoming data
//    (constants into the register, targets into the free target RAM,
//    sources into the source FIFO), the run state machine drives the
//    pipelines, and the output state machine reads the ACC FIFOs in a fixed
//    order so that their results never collide on the output.
//
// Processing order: for a tile, every source is held for K cycles while
// each pipeline steps through its K targets, so the pipelines share the
// source and each MAC sees its K targets interleaved (which covers the
// adder latency). Execution starts as soon as a tile's targets and its
// first source are present; once the tile's last source has been read
// from the stream, the targets of the next tile are loaded into the other
// RAM while the current one still runs. Target i of a tile goes to
// pipeline i / K, step i mod K. The tile's results leave in target order,
// one 64-bit word per target: {op2 sum, op1 sum} in floating point.
// tile_done pulses when the last word of a tile has been written out.
//
// Stream protocol (tanor_pkg::cmd_e): CMD_CONST sets e1; a tile is exactly
// N_PIPE*K CMD_TGT words followed by one or more CMD_SRC words, the last
// one sent as CMD_SRC_LAST. The host pads short tiles. The document names
// the blocks and state machines and the order of events; the stream
// encoding, the fixed tile size, the ping-pong use of the two RAMs and the
// two-tile limit on results in flight are this design's choices.
module dataflow_ctrl #(
  parameter int unsigned N_PIPE    = 3,
  parameter int unsigned K         = 16,
  parameter int unsigned SRC_DEPTH = 16,
  parameter int unsigned EW        = 8,
  parameter int unsigned MW        = 23
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // from the input buffer (first-word-fall-through)
  input  logic                        in_valid,
  input  logic [tanor_pkg::WORD_W-1:0] in_data,
  output logic                        in_pop,
  // to the output buffer
  output logic                        out_push,
  output logic [tanor_pkg::WORD_W-1:0] out_data,
  input  logic                        out_full,
  output logic                        tile_done
);
  import tanor_pkg::*;

  localparam int unsigned NT    = N_PIPE * K;
  localparam int unsigned KW    = (K > 1) ? $clog2(K) : 1;
  localparam int unsigned TW    = $clog2(NT + 1);
  localparam int unsigned PW    = (N_PIPE > 1) ? $clog2(N_PIPE) : 1;
  localparam int unsigned FPW   = 1 + EW + MW;
  localparam int unsigned SRCW  = 1 + FPW + 2 * POS_W;    // last, mass, y, x
  localparam int unsigned ACC_DEPTH = 2 * K;
  localparam int unsigned ACW   = $clog2(ACC_DEPTH + 1);

  initial assert (2 * FPW <= WORD_W) else $error("two results must fit in one word");

  cmd_e cmd;
  assign cmd = cmd_e'(in_data[63:60]);

  // ---------------------------------------------------------------- state
  logic signed [EPS_W-1:0] e1;
  logic signed [EPS_W-1:0] bank_e1 [2];     // e1 in force when the tile was loaded
  logic [1:0]    bank_full;
  logic          ld_bank, run_bank;
  logic [TW-1:0] tgt_cnt;

  // --------------------------------------------------------- source FIFO
  logic            src_push, src_pop, src_empty, src_full;
  logic [SRCW-1:0] src_din, src_head;
  logic [$clog2(SRC_DEPTH+1)-1:0] src_count, src_free;
  logic [FPW-1:0]  mass_fp;

  fx2fp #(.IW(MASS_I), .FW(MASS_F), .EW(EW), .MW(MW), .LAT(0)) u_mass (
    .clk, .din(in_data[59:44]), .dout(mass_fp));

  assign src_din = {cmd == CMD_SRC_LAST, mass_fp, in_data[2*POS_W-1:0]};

  sync_fifo #(.W(SRCW), .DEPTH(SRC_DEPTH)) u_src (
    .clk, .rst_n, .push(src_push), .din(src_din), .pop(src_pop), .dout(src_head),
    .empty(src_empty), .full(src_full), .count(src_count), .free(src_free));

  // ------------------------------------------------ input state machine
  typedef enum logic [1:0] {IN_TGT, IN_SRC} in_state_e;
  in_state_e in_state;
  logic tgt_wr;

  always_comb begin
    in_pop   = 1'b0;
    tgt_wr   = 1'b0;
    src_push = 1'b0;
    if (in_valid) begin
      unique case (cmd)
        CMD_CONST: in_pop = 1'b1;
        CMD_TGT: if (in_state == IN_TGT && !bank_full[ld_bank]) begin
          in_pop = 1'b1;
          tgt_wr = 1'b1;
        end
        CMD_SRC, CMD_SRC_LAST: if (in_state == IN_SRC && !src_full) begin
          in_pop   = 1'b1;
          src_push = 1'b1;
        end
        default: in_pop = 1'b1;           // NOP and unknown words are dropped
      endcase
    end
  end

  // ---------------------------------------------------- target RAMs
  logic [KW-1:0] run_k;
  logic          issue;
  logic [N_PIPE-1:0][POS_W*2-1:0] tgt_dout [2];

  for (genvar b = 0; b < 2; b++) begin : g_bank
    logic              wr_here;
    logic [N_PIPE-1:0] lane_we;
    assign wr_here = tgt_wr && (ld_bank == 1'(b));
    always_comb begin
      lane_we = '0;
      if (wr_here) lane_we[PW'(tgt_cnt / TW'(K))] = 1'b1;
    end
    spram #(.W(2 * POS_W), .LANES(N_PIPE), .DEPTH(K)) u_ram (
      .clk,
      .en(wr_here || (issue && run_bank == 1'(b))),
      .lane_we,
      .addr(wr_here ? KW'(tgt_cnt % TW'(K)) : run_k),
      .din(in_data[2*POS_W-1:0]),
      .dout(tgt_dout[b]));
  end

  // -------------------------------------------------- run state machine
  logic       first_src;            // next source is the first of a tile
  logic [1:0] tiles_out;            // tiles started and not yet drained
  logic       tile_start, src_last;

  assign src_last   = src_head[SRCW-1];
  assign tile_start = first_src && (run_k == '0);
  assign issue      = bank_full[run_bank] && !src_empty && (!tile_start || tiles_out < 2);
  assign src_pop    = issue && (run_k == KW'(K - 1));

  // Stage 1 registers: what the kernels see with the RAM output.
  logic            s1_valid, s1_bank, s1_first;
  logic [SRCW-1:0] s1_src;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_state  <= IN_TGT;
      ld_bank   <= 1'b0;
      run_bank  <= 1'b0;
      bank_full <= '0;
      tgt_cnt   <= '0;
      e1        <= '0;
      bank_e1   <= '{default: '0};
      run_k     <= '0;
      first_src <= 1'b1;
      s1_valid  <= 1'b0;
      s1_bank   <= 1'b0;
      s1_first  <= 1'b0;
      s1_src    <= '0;
    end else begin
      // input state machine
      if (in_valid && cmd == CMD_CONST) e1 <= in_data[EPS_W-1:0];
      if (tgt_wr) begin
        if (tgt_cnt == '0) bank_e1[ld_bank] <= e1;
        if (tgt_cnt == TW'(NT - 1)) begin
          tgt_cnt <= '0;
          in_state <= IN_SRC;
        end else tgt_cnt <= tgt_cnt + TW'(1);
      end
      if (src_push && cmd == CMD_SRC_LAST) begin
        in_state <= IN_TGT;
        ld_bank  <= ~ld_bank;
      end
      // run state machine
      s1_valid <= issue;
      if (issue) begin
        s1_bank  <= run_bank;
        s1_first <= first_src;
        s1_src   <= src_head;
        run_k    <= (run_k == KW'(K - 1)) ? '0 : run_k + KW'(1);
      end
      if (src_pop) first_src <= src_last;
      // bank ownership: set by the input side, released by the run side
      for (int b = 0; b < 2; b++) begin
        if (tgt_wr && ld_bank == 1'(b) && tgt_cnt == TW'(NT - 1)) bank_full[b] <= 1'b1;
        if (src_pop && src_last && run_bank == 1'(b)) bank_full[b] <= 1'b0;
      end
      if (src_pop && src_last) run_bank <= ~run_bank;
    end
  end

  // ---------------------------------------- kernels, MACs and ACC FIFOs
  localparam int unsigned TAGW = 2 + FPW;           // first, last, mass
  logic [N_PIPE-1:0]           acc_empty, acc_pop;
  logic [N_PIPE-1:0][2*FPW-1:0] acc_head;
  logic [N_PIPE-1:0][ACW-1:0]  acc_count;

  for (genvar p = 0; p < N_PIPE; p++) begin : g_pipe
    pos_t tgt, src;
    logic              k_valid;
    logic [TAGW-1:0]   k_tag;
    logic signed [OUT_W-1:0] op1, op2;
    logic              m1_valid, m2_valid, acc_full;
    logic [FPW-1:0]    sum1, sum2;
    logic [ACW-1:0]    acc_free;

    assign tgt = pos_t'(tgt_dout[s1_bank][p]);
    assign src = pos_t'(s1_src[2*POS_W-1:0]);

    kernel_pipeline #(.TAG_W(TAGW)) u_kernel (
      .clk, .rst_n, .in_valid(s1_valid),
      .in_tag({s1_first, s1_src[SRCW-1], s1_src[2*POS_W +: FPW]}),
      .t1(tgt.x), .s1(src.x), .t2(tgt.y), .s2(src.y), .e1(bank_e1[s1_bank]),
      .out_valid(k_valid), .out_tag(k_tag), .op1, .op2);

    mac_unit #(.IW(OUT_I), .FW(OUT_F), .EW(EW), .MW(MW), .DEPTH(K)) u_mac1 (
      .clk, .rst_n, .in_valid(k_valid), .in_first(k_tag[TAGW-1]), .in_last(k_tag[TAGW-2]),
      .in_kernel(op1), .in_weight(k_tag[FPW-1:0]), .out_valid(m1_valid), .out_sum(sum1));
    mac_unit #(.IW(OUT_I), .FW(OUT_F), .EW(EW), .MW(MW), .DEPTH(K)) u_mac2 (
      .clk, .rst_n, .in_valid(k_valid), .in_first(k_tag[TAGW-1]), .in_last(k_tag[TAGW-2]),
      .in_kernel(op2), .in_weight(k_tag[FPW-1:0]), .out_valid(m2_valid), .out_sum(sum2));

    sync_fifo #(.W(2 * FPW), .DEPTH(ACC_DEPTH)) u_acc (
      .clk, .rst_n, .push(m1_valid), .din({sum2, sum1}), .pop(acc_pop[p]),
      .dout(acc_head[p]), .empty(acc_empty[p]), .full(acc_full),
      .count(acc_count[p]), .free(acc_free));

    assert property (@(posedge clk) disable iff (!rst_n) m1_valid == m2_valid);
  end

  // ----------------------------------------------- output state machine
  typedef enum logic {OUT_WAIT, OUT_DRAIN} out_state_e;
  out_state_e    out_state;
  logic [PW-1:0] out_p;
  logic [KW-1:0] out_k;
  logic          tile_ready, out_go, out_end;

  always_comb begin
    tile_ready = 1'b1;
    for (int p = 0; p < int'(N_PIPE); p++)
      if (acc_count[p] < ACW'(K)) tile_ready = 1'b0;
  end

  assign out_go  = (out_state == OUT_DRAIN) && !out_full;
  assign out_end = out_go && out_p == PW'(N_PIPE - 1) && out_k == KW'(K - 1);
  always_comb begin
    acc_pop = '0;
    if (out_go) acc_pop[out_p] = 1'b1;
  end
  assign out_push = out_go;
  assign out_data = WORD_W'(acc_head[out_p]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_state <= OUT_WAIT;
      out_p     <= '0;
      out_k     <= '0;
      tile_done <= 1'b0;
      tiles_out <= '0;
    end else begin
      tile_done <= out_end;
      tiles_out <= tiles_out + 2'(issue && tile_start) - 2'(out_end);
      unique case (out_state)
        OUT_WAIT: if (tile_ready) out_state <= OUT_DRAIN;
        OUT_DRAIN: if (out_go) begin
          if (out_k == KW'(K - 1)) begin
            out_k <= '0;
            if (out_p == PW'(N_PIPE - 1)) begin
              out_p     <= '0;
              out_state <= OUT_WAIT;
            end else out_p <= out_p + PW'(1);
          end else out_k <= out_k + KW'(1);
        end
        default: out_state <= OUT_WAIT;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   in_valid && cmd == CMD_TGT && in_state == IN_SRC |-> 1'b0)
    else $error("dataflow_ctrl: target word inside the source part of a tile");
endmodule

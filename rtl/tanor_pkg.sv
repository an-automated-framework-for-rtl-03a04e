// tanor_pkg: types and constants shared by the N-body accelerator.
//
// Fixed-point convention: a signal written Q I.F is a two's-complement value
// of 1 + I + F bits (one sign bit, I integer bits, F fraction bits). The
// sign bit is this design's reading of the Q notation; the I and F numbers
// of the example kernel are the document's.
//
// Floating point: {sign, exponent (EW bits, bias 2^(EW-1)-1), mantissa (MW
// bits, hidden one)}. A zero exponent means zero (no subnormals), results
// are truncated toward zero and saturate at the largest finite value. The
// default EW=8, MW=23 is IEEE-754 single precision, the default precision of
// the accumulator.
//
// Input stream word (64 bits, one PCI Express 4-lane beat): bits [63:60]
// hold a command, the rest a payload whose layout depends on the command.
// The host inserts these commands so that the hardware can find the tile
// boundaries; the encoding itself is this design's own.
package tanor_pkg;

  localparam int unsigned WORD_W = 64;   // PCIe x4 endpoint data width
  localparam int unsigned POS_I  = 6;    // target/source coordinate Q6.15
  localparam int unsigned POS_F  = 15;
  localparam int unsigned POS_W  = 1 + POS_I + POS_F;  // 22
  localparam int unsigned EPS_I  = 0;    // softening constant e1, Q0.15
  localparam int unsigned EPS_F  = 15;
  localparam int unsigned EPS_W  = 1 + EPS_I + EPS_F;  // 16
  localparam int unsigned MASS_I = 0;    // source mass, Q0.15 (assumed)
  localparam int unsigned MASS_F = 15;
  localparam int unsigned MASS_W = 1 + MASS_I + MASS_F; // 16
  localparam int unsigned OUT_I  = 25;   // kernel outputs op1/op2, Q25.15
  localparam int unsigned OUT_F  = 15;
  localparam int unsigned OUT_W  = 1 + OUT_I + OUT_F;  // 41

  typedef enum logic [3:0] {
    CMD_NOP      = 4'h0,
    CMD_CONST    = 4'h1,  // payload [EPS_W-1:0] = e1
    CMD_TGT      = 4'h2,  // payload: x [21:0], y [43:22]
    CMD_SRC      = 4'h3,  // payload: x [21:0], y [43:22], mass [59:44]
    CMD_SRC_LAST = 4'h4   // as CMD_SRC, last source of the current tile
  } cmd_e;

  typedef struct packed {
    logic signed [POS_W-1:0] y;
    logic signed [POS_W-1:0] x;
  } pos_t;

  typedef struct packed {
    logic [MASS_W-1:0] mass;
    pos_t              pos;
  } src_t;

  // Pack/unpack helpers for the stream payload.
  function automatic logic [WORD_W-1:0] mk_word(cmd_e cmd, logic [59:0] payload);
    return {cmd, payload};
  endfunction

  // Latency of an FX multiplier (Table 4): 3 + floor(W1/18) + floor(W2/18).
  function automatic int unsigned fx_mult_lat(int unsigned w1, int unsigned w2);
    return 3 + w1 / 18 + w2 / 18;
  endfunction

  // Latency of an FP adder as a function of the mantissa width (Table 4).
  function automatic int unsigned fp_add_lat(int unsigned m);
    if (m <= 4)       return 9;
    else if (m <= 13) return 10;
    else if (m <= 28) return 11;
    else if (m <= 61) return 12;
    else              return 13;
  endfunction

  // Latency of an FP multiplier as a function of the mantissa width (Table 4).
  function automatic int unsigned fp_mult_lat(int unsigned m);
    if (m <= 16)      return 4;
    else if (m <= 33) return 6;
    else if (m <= 50) return 7;
    else              return 8;
  endfunction

endpackage

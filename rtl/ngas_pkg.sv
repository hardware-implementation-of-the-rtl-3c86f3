// Shared types and constants of the Neural Gas vector-quantisation board.
//
// The board trains (or applies) a codebook of up to 256 prototype vectors of
// 64 components against up to 1024 image blocks of 64 pixels. Patterns are
// 8-bit gray levels, codevectors 16-bit values, and the distance used is the
// Manhattan (L1) distance, which needs 22 bits and is handed to the DSP as
// its 16 most significant bits. These sizes are those of the original board.
// The bit layout of the 8-bit state and control registers, the PC port map
// and the DSP port numbers below are this design's own choice: the original
// only says that both registers are 8 bits of control signals.
package ngas_pkg;

  // Vector and memory geometry
  localparam int unsigned VEC_LEN   = 64;    // pixels per image subblock
  localparam int unsigned MAX_CV    = 256;   // codevectors at most
  localparam int unsigned MAX_PAT   = 1024;  // samples at most
  localparam int unsigned PIX_W     = 8;     // pattern pixel precision
  localparam int unsigned CV_W      = 16;    // codevector precision
  localparam int unsigned ACC_W     = 22;    // full Manhattan distance width
  localparam int unsigned DIST_W    = 16;    // distance as seen by the DSP

  localparam int unsigned VEC_AW    = $clog2(VEC_LEN);
  localparam int unsigned CV_IDX_W  = $clog2(MAX_CV);
  localparam int unsigned PAT_IDX_W = $clog2(MAX_PAT);
  localparam int unsigned PAT_AW    = PAT_IDX_W + VEC_AW;  // 16
  localparam int unsigned CB_AW     = CV_IDX_W + VEC_AW;   // 14

  // Clocks for one distance: 1 set-up + VEC_LEN memory reads + 3 drain
  localparam int unsigned CYCLES_PER_DIST = VEC_LEN + 4;   // 68

  // Board functioning modes (state register bits 1:0)
  typedef enum logic [1:0] {
    MODE_IDLE  = 2'd0,
    MODE_TRAIN = 2'd1,   // training: random sample, DSP adapts codebook
    MODE_RUN   = 2'd2,   // feed-forward: samples in order, winner to PC
    MODE_TEST  = 2'd3    // board testing: PC reads back everything
  } mode_e;

  // Memory bank reached by PC data transfers (state register bits 3:2)
  typedef enum logic [1:0] {
    BANK_PATTERN  = 2'd0,
    BANK_CODEBOOK = 2'd1,
    BANK_DISTANCE = 2'd2,
    BANK_NONE     = 2'd3
  } bank_e;

  // State register: written by the PC, read by the DSP
  typedef struct packed {
    logic [2:0] sw_flags;   // free for the software on PC and DSP
    logic       host_bus;   // 1: buffers join memory buses to the PC side
    bank_e      bank;
    mode_e      mode;
  } state_reg_t;

  // Control register: written by the DSP
  typedef struct packed {
    logic [4:0] spare;
    logic       winner_valid;  // winner index register holds a new result
    logic       pc_irq;        // interrupt request to the PC
    logic       alu_start;     // start the ALU on a new sample (one-shot)
  } ctrl_reg_t;

  // PC (ISA) port offsets
  typedef enum logic [3:0] {
    PORT_DATA     = 4'd0,
    PORT_ADDR_LO  = 4'd1,
    PORT_ADDR_HI  = 4'd2,
    PORT_STATE    = 4'd3,
    PORT_WIN_LO   = 4'd4,
    PORT_WIN_HI   = 4'd5,
    PORT_CTRL     = 4'd6,
    PORT_STATUS   = 4'd7,
    PORT_NCV      = 4'd8,
    PORT_NPAT_LO  = 4'd9,
    PORT_NPAT_HI  = 4'd10,
    PORT_ITER_LO  = 4'd11,
    PORT_ITER_HI  = 4'd12
  } pc_port_e;

  // DSP I/O port numbers
  typedef enum logic [2:0] {
    DSP_IN_STATE   = 3'd0,
    DSP_IN_RANDOM  = 3'd1,
    DSP_IN_DIST    = 3'd2,
    DSP_IN_PATTERN = 3'd3,
    DSP_IN_STATUS  = 3'd4,
    DSP_IN_ITER    = 3'd5
  } dsp_in_e;

  typedef enum logic [2:0] {
    DSP_OUT_CTRL   = 3'd0,
    DSP_OUT_WINNER = 3'd1
  } dsp_out_e;

  // 8-bit pixel widened to codevector precision: the byte is repeated in
  // the low half, so 0x00 -> 0x0000 and 0xFF -> 0xFFFF.
  function automatic logic [CV_W-1:0] expand_pixel(input logic [PIX_W-1:0] p);
    return {p, p};
  endfunction

endpackage

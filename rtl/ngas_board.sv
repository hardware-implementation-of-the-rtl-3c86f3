// Neural Gas vector-quantisation board: logic of the PC plug-in card.
//
// The board trains a codebook with the Neural Gas algorithm, or uses a
// trained one to code image blocks, together with a DSP. For every sample
// the ALU computes the Manhattan distance from the sample to all codevectors
// (68 clocks each); the DSP sorts the distances as they arrive, and in
// training computes and applies the adaptation of every codevector, or at
// run time reports the winning codevector to the PC. This module holds all
// of the board except the DSP and its program EPROM, whose buses are brought
// out as the dsp_* ports, and the PC, reached through the ISA ports.
//
//   isa_bus_interface       PC I/O cycles -> strobes
//   io_control_unit         PC <-> memories, state register, sizes
//   data_bus_buffers        pattern and prototype bus segments: PC or ALU
//   pattern_memory          1024 x 64 pixels, 8 bits
//   codebook_memory         256 x 64 components, 16 bits (second port: DSP)
//   alu_control_unit        sample selection, addresses, 68-clock sequence
//   manhattan_alu           |x - w| and accumulation, 22 -> 16 bits
//   distance_result_memory  256 distances for the DSP
//   dsp_port_interface      DSP input/output port registers
//   random_number_register  random sample selection in training
//
// The block split, sizes, pipeline and register widths follow the original
// board; the PC port map, DSP port numbers, register bit layouts, the DSP
// read port on the pattern memory and the arbitration are this design's
// choices (see each module). One clock: the ISA bus clock (8 MHz on the
// original board). rst_n is a synchronous active-low reset.
module ngas_board
  import ngas_pkg::*;
#(
  parameter logic [9:0] ISA_BASE = 10'h300
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // ISA bus
  input  logic [9:0]           isa_sa,
  input  logic [7:0]           isa_sd_in,
  output logic [7:0]           isa_sd_out,
  output logic                 isa_sd_oe,
  input  logic                 isa_iow_n,
  input  logic                 isa_ior_n,
  input  logic                 isa_aen,
  output logic                 isa_irq,
  // DSP I/O ports
  input  logic [2:0]           dsp_io_addr,
  input  logic                 dsp_io_rd,
  input  logic                 dsp_io_wr,
  input  logic [15:0]          dsp_io_wdata,
  output logic [15:0]          dsp_io_rdata,
  // DSP memory buses
  input  logic                 dsp_cb_en,
  input  logic                 dsp_cb_we,
  input  logic [CB_AW-1:0]     dsp_cb_addr,
  input  logic [CV_W-1:0]      dsp_cb_wdata,
  output logic [CV_W-1:0]      dsp_cb_rdata,
  input  logic [CV_IDX_W-1:0]  dsp_dist_addr,
  output logic [DIST_W-1:0]    dsp_dist_rdata,
  input  logic [PAT_AW-1:0]    dsp_pat_addr,
  output logic [PIX_W-1:0]     dsp_pat_rdata
);

  // ---------------------------------------------------------------- PC side
  logic       wr_stb, rd_stb;
  logic [3:0] port, rd_port;
  logic [7:0] wdata, rdata;

  isa_bus_interface #(.BASE(ISA_BASE), .NPORTS_LOG2(4)) u_isa (
    .clk, .rst_n,
    .sa(isa_sa), .sd_in(isa_sd_in), .sd_out(isa_sd_out), .sd_oe(isa_sd_oe),
    .iow_n(isa_iow_n), .ior_n(isa_ior_n), .aen(isa_aen),
    .wr_stb, .rd_stb, .port, .wdata, .rd_port, .rdata
  );

  state_reg_t            state;
  logic [CV_IDX_W-1:0]   num_cv_m1;
  logic [PAT_IDX_W:0]    num_pat;
  logic [15:0]           num_iter, iter_left;
  logic                  train_done;
  ctrl_reg_t             ctrl;
  logic [15:0]           winner;
  logic [7:0]            status;

  logic                  h_pat_en, h_pat_we, h_cb_en, h_cb_we;
  logic [PAT_AW-1:0]     h_pat_addr;
  logic [PIX_W-1:0]      h_pat_wdata, h_pat_rdata;
  logic [CB_AW-1:0]      h_cb_addr;
  logic [CV_W-1:0]       h_cb_wdata, h_cb_rdata;
  logic [CV_IDX_W-1:0]   h_dist_addr;
  logic [DIST_W-1:0]     h_dist_rdata;

  io_control_unit u_ioc (
    .clk, .rst_n,
    .wr_stb, .rd_stb, .port, .wdata, .rd_port, .rdata,
    .state_q(state), .num_cv_m1, .num_pat, .num_iter,
    .winner, .ctrl(ctrl), .status,
    .pat_en(h_pat_en), .pat_we(h_pat_we), .pat_addr(h_pat_addr),
    .pat_wdata(h_pat_wdata), .pat_rdata(h_pat_rdata),
    .cb_en(h_cb_en), .cb_we(h_cb_we), .cb_addr(h_cb_addr),
    .cb_wdata(h_cb_wdata), .cb_rdata(h_cb_rdata),
    .dist_addr(h_dist_addr), .dist_rdata(h_dist_rdata)
  );

  // ------------------------------------------------------ bus segments
  logic                  alu_grant, alu_rd, alu_hold, host_owns;
  logic [PAT_AW-1:0]     alu_pat_addr;
  logic [CB_AW-1:0]      alu_cb_addr;
  logic [PIX_W-1:0]      alu_x;
  logic [CV_W-1:0]       alu_w;

  logic                  pat_en, pat_we, cb_en, cb_we;
  logic [PAT_AW-1:0]     pat_addr;
  logic [PIX_W-1:0]      pat_wdata, pat_rdata;
  logic [CB_AW-1:0]      cb_addr;
  logic [CV_W-1:0]       cb_wdata, cb_rdata;

  data_bus_buffers u_buf (
    .host_sel(state.host_bus), .alu_hold, .alu_grant, .host_owns,
    .host_pat_en(h_pat_en), .host_pat_we(h_pat_we), .host_pat_addr(h_pat_addr),
    .host_pat_wdata(h_pat_wdata), .host_pat_rdata(h_pat_rdata),
    .host_cb_en(h_cb_en), .host_cb_we(h_cb_we), .host_cb_addr(h_cb_addr),
    .host_cb_wdata(h_cb_wdata), .host_cb_rdata(h_cb_rdata),
    .alu_rd, .alu_pat_addr, .alu_cb_addr, .alu_x, .alu_w,
    .pat_en, .pat_we, .pat_addr, .pat_wdata, .pat_rdata,
    .cb_en, .cb_we, .cb_addr, .cb_wdata, .cb_rdata
  );

  pattern_memory #(.DEPTH(MAX_PAT * VEC_LEN), .WIDTH(PIX_W)) u_pat (
    .clk,
    .a_en(pat_en), .a_we(pat_we), .a_addr(pat_addr), .a_wdata(pat_wdata),
    .a_rdata(pat_rdata),
    .b_addr(dsp_pat_addr), .b_rdata(dsp_pat_rdata)
  );

  codebook_memory #(.DEPTH(MAX_CV * VEC_LEN), .WIDTH(CV_W)) u_cb (
    .clk,
    .a_en(cb_en), .a_we(cb_we), .a_addr(cb_addr), .a_wdata(cb_wdata),
    .a_rdata(cb_rdata),
    .b_en(dsp_cb_en), .b_we(dsp_cb_we), .b_addr(dsp_cb_addr),
    .b_wdata(dsp_cb_wdata), .b_rdata(dsp_cb_rdata)
  );

  // ------------------------------------------------------- distance engine
  logic                  alu_start, rnd_advance;
  logic [15:0]           rnd;
  logic                  a_valid, a_first, a_last, a_dvalid;
  logic [ACC_W-1:0]      a_dist_full;
  logic [DIST_W-1:0]     a_dist;
  logic                  dist_we, busy, sample_done, stalled;
  logic [CV_IDX_W-1:0]   dist_idx;
  logic [DIST_W-1:0]     dist_data;
  logic [PAT_IDX_W-1:0]  cur_pattern;
  logic [CV_IDX_W:0]     dist_count;

  random_number_register #(.WIDTH(16)) u_rnd (
    .clk, .rst_n, .advance(rnd_advance), .rnd
  );

  alu_control_unit u_aluc (
    .clk, .rst_n,
    .start(alu_start), .mode(state.mode), .grant(alu_grant),
    .num_cv_m1, .num_pat, .num_iter, .rnd, .rnd_advance,
    .mem_rd(alu_rd), .pat_addr(alu_pat_addr), .cb_addr(alu_cb_addr),
    .alu_valid(a_valid), .alu_first(a_first), .alu_last(a_last),
    .alu_dist_valid(a_dvalid), .alu_dist(a_dist),
    .dist_we, .dist_idx, .dist_data, .busy, .sample_done,
    .cur_pattern, .dist_count, .holding(alu_hold), .iter_left, .train_done,
    .stalled
  );

  manhattan_alu u_alu (
    .clk, .rst_n,
    .in_valid(a_valid), .in_first(a_first), .in_last(a_last),
    .x(alu_x), .w(alu_w),
    .dist_valid(a_dvalid), .dist_full(a_dist_full), .dist_msb(a_dist)
  );

  distance_result_memory #(.DEPTH(MAX_CV), .WIDTH(DIST_W)) u_dist (
    .clk,
    .we(dist_we), .waddr(dist_idx), .wdata(dist_data),
    .dsp_addr(dsp_dist_addr), .dsp_rdata(dsp_dist_rdata),
    .host_addr(h_dist_addr), .host_rdata(h_dist_rdata)
  );

  // --------------------------------------------------------------- DSP side
  dsp_port_interface u_dspif (
    .clk, .rst_n,
    .io_addr(dsp_io_addr), .io_rd(dsp_io_rd), .io_wr(dsp_io_wr),
    .io_wdata(dsp_io_wdata), .io_rdata(dsp_io_rdata),
    .state, .rnd, .dist_load(dist_we), .dist_in(dist_data),
    .cur_pattern, .busy, .dist_count, .iter_left, .train_done,
    .ctrl_q(ctrl), .winner_q(winner), .alu_start
  );

  // status byte for the PC: ALU busy, ALU waiting for the buses, PC owns
  // the buses, winner valid, interrupt, training done, mode
  assign status  = {busy, stalled, host_owns, ctrl.winner_valid, ctrl.pc_irq, train_done, state.mode};
  assign isa_irq = ctrl.pc_irq;

  // only the 16 MSBs of the 22-bit sum go on (as a_dist)
  logic unused_ok;
  assign unused_ok = ^{a_dist_full, sample_done};

endmodule

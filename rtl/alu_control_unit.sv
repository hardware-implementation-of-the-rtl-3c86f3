// ALU-control unit: runs one sample against the whole codebook.
//
// On a start command (from the DSP control register) in training or
// run-time mode the unit picks a sample: in training the random-number
// register chooses it, index = (rnd * num_pat) >> 16, and the register is
// stepped; at run time the samples are taken in order, wrapping at num_pat.
// A training run ends after num_iter samples: further starts are refused
// and train_done rises until the mode changes (the count restarts whenever
// the board leaves training mode). It then computes the Manhattan distance to codevectors 0 .. num_cv_m1 in
// turn. For each one it spends one set-up clock, 64 clocks reading pixel j
// of the sample and component j of the codevector in the same clock (the
// parallel memory access through the isolated bus segments), and three
// clocks while the last pixel passes the memory, |x-w| and accumulation
// phases: 68 clocks per distance, the figure of the original board. Each
// distance is written to the distance-result memory and the DSP distance
// register (dist_we), so the DSP can sort while the next one is computed.
//
// The original board gives the three-phase pipeline, the parallel access and
// the 68 clocks; the index formula, the in-order run-time sequence, the
// pending start (a start during a sample is remembered and served next) and
// waiting at a codevector boundary while the PC holds the memory buses are
// this design's choices; `holding` keeps the buses for the ALU from the
// first read to the result of a distance. Board-testing and idle modes never start the ALU.
// Memory reads are synchronous: data for the address given in clock t is
// in phase 1 at t+1, where alu_valid/first/last mark it.
module alu_control_unit
  import ngas_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  mode_e                mode,
  input  logic                 grant,
  input  logic [CV_IDX_W-1:0]  num_cv_m1,
  input  logic [PAT_IDX_W:0]   num_pat,
  input  logic [15:0]          num_iter,
  input  logic [15:0]          rnd,
  output logic                 rnd_advance,
  // parallel memory read
  output logic                 mem_rd,
  output logic [PAT_AW-1:0]    pat_addr,
  output logic [CB_AW-1:0]     cb_addr,
  // ALU pipeline control (aligned with memory read data)
  output logic                 alu_valid,
  output logic                 alu_first,
  output logic                 alu_last,
  input  logic                 alu_dist_valid,
  input  logic [DIST_W-1:0]    alu_dist,
  // results
  output logic                 dist_we,
  output logic [CV_IDX_W-1:0]  dist_idx,
  output logic [DIST_W-1:0]    dist_data,
  output logic                 busy,
  output logic                 sample_done,
  output logic [PAT_IDX_W-1:0] cur_pattern,
  output logic [CV_IDX_W:0]    dist_count,
  output logic                 holding,
  output logic [15:0]          iter_left,
  output logic                 train_done,
  output logic                 stalled
);

  typedef enum logic [1:0] {S_IDLE, S_SETUP, S_READ, S_DRAIN} state_e;

  state_e               state_q;
  logic [VEC_AW-1:0]    j_q;
  logic [CV_IDX_W-1:0]  k_q;
  logic [PAT_IDX_W-1:0] pat_q, seq_q;
  logic [CV_IDX_W:0]    count_q;
  logic                 pending_q;
  logic                 rd_q, first_q, last_q;
  logic [15:0]          iter_q;        // training samples started

  // training sample index: scale the random number to [0, num_pat)
  logic [16+PAT_IDX_W:0]  scaled;
  logic [PAT_IDX_W-1:0]   rnd_pat;
  assign scaled  = rnd * num_pat;
  assign rnd_pat = scaled[16 +: PAT_IDX_W];

  logic active_mode, go, iter_ok;
  assign active_mode = (mode == MODE_TRAIN) || (mode == MODE_RUN);
  assign iter_ok     = (mode != MODE_TRAIN) || (iter_q < num_iter);
  assign go          = (state_q == S_IDLE) && active_mode && iter_ok && (start || pending_q);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q   <= S_IDLE;
      j_q       <= '0;
      k_q       <= '0;
      pat_q     <= '0;
      seq_q     <= '0;
      count_q   <= '0;
      pending_q <= 1'b0;
      iter_q    <= '0;
    end else begin
      if (mode != MODE_TRAIN) iter_q <= '0;
      else if (go)            iter_q <= iter_q + 1'b1;
      if (!active_mode) begin
        seq_q     <= '0;
        pending_q <= 1'b0;
      end else if (start && state_q != S_IDLE) begin
        pending_q <= 1'b1;
      end
      case (state_q)
        S_IDLE: if (go) begin
          pending_q <= 1'b0;
          k_q       <= '0;
          count_q   <= '0;
          state_q   <= S_SETUP;
          if (mode == MODE_TRAIN) begin
            pat_q <= rnd_pat;
          end else begin
            pat_q <= seq_q;
            seq_q <= ((PAT_IDX_W+1)'(seq_q) + 1'b1 >= num_pat) ? '0 : seq_q + 1'b1;
          end
        end
        S_SETUP: if (grant) begin
          j_q     <= '0;
          state_q <= S_READ;
        end
        S_READ: begin
          j_q <= j_q + 1'b1;
          if (j_q == VEC_AW'(VEC_LEN - 1)) state_q <= S_DRAIN;
        end
        S_DRAIN: if (alu_dist_valid) begin
          count_q <= count_q + 1'b1;
          if (k_q == num_cv_m1) begin
            state_q <= S_IDLE;
          end else begin
            k_q     <= k_q + 1'b1;
            state_q <= S_SETUP;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // phase-1 alignment: memory data appear one clock after the address
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_q    <= 1'b0;
      first_q <= 1'b0;
      last_q  <= 1'b0;
    end else begin
      rd_q    <= mem_rd;
      first_q <= mem_rd && (j_q == '0);
      last_q  <= mem_rd && (j_q == VEC_AW'(VEC_LEN - 1));
    end
  end

  assign mem_rd      = (state_q == S_READ);
  assign pat_addr    = {pat_q, j_q};
  assign cb_addr     = {k_q, j_q};
  assign alu_valid   = rd_q;
  assign alu_first   = first_q;
  assign alu_last    = last_q;
  assign rnd_advance = go && (mode == MODE_TRAIN);

  assign dist_we     = (state_q == S_DRAIN) && alu_dist_valid;
  assign dist_idx    = k_q;
  assign dist_data   = alu_dist;
  assign busy        = (state_q != S_IDLE);
  assign sample_done = dist_we && (k_q == num_cv_m1);
  assign cur_pattern = pat_q;
  assign dist_count  = count_q;
  assign holding     = (state_q == S_READ) || (state_q == S_DRAIN);
  assign iter_left   = (mode == MODE_TRAIN && iter_q < num_iter) ? num_iter - iter_q :
                       (mode == MODE_TRAIN) ? 16'd0 : num_iter;
  assign train_done  = (mode == MODE_TRAIN) && (state_q == S_IDLE) && !iter_ok;
  assign stalled     = (state_q == S_SETUP) && !grant;

  // a result may only arrive while the unit waits for it
  a_result_in_drain: assert property (@(posedge clk) disable iff (!rst_n)
    alu_dist_valid |-> state_q == S_DRAIN);

endmodule

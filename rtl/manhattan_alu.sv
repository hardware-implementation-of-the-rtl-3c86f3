// Manhattan-distance ALU: phases 2 and 3 of the three-phase distance pipeline.
//
// Phase 1 is the parallel read of the pattern and prototype memories (their
// registered outputs feed this block). Phase 2 widens the 8-bit pixel to 16
// bits by repeating it ({x, x}) and registers |x_j - w_j|. Phase 3 adds that
// to the running sum S, restarting it on the first pixel of a vector. After
// the last pixel the 22-bit sum is presented for one clock with dist_valid,
// together with its 16 most significant bits (dist_msb = sum[21:6]), which is
// what the 16-bit DSP receives. The widening rule, the 22-bit width and the
// 16-MSB cut follow the original board; truncation without rounding is this
// design's choice.
//
// Timing: a pixel pair entering with in_valid at clock t is in the phase-2
// register at t+1 and in the sum at t+2; for a vector whose last pixel enters
// at t, dist_valid is high during clock t+2. One pixel per clock.
module manhattan_alu
  import ngas_pkg::*;
#(
  parameter int unsigned P_PIX_W  = PIX_W,
  parameter int unsigned P_CV_W   = CV_W,
  parameter int unsigned P_ACC_W  = ACC_W,
  parameter int unsigned P_DIST_W = DIST_W
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic                  in_first,
  input  logic                  in_last,
  input  logic [P_PIX_W-1:0]    x,
  input  logic [P_CV_W-1:0]     w,
  output logic                  dist_valid,
  output logic [P_ACC_W-1:0]    dist_full,
  output logic [P_DIST_W-1:0]   dist_msb
);

  // Phase 2: absolute difference
  logic [P_CV_W-1:0] x_wide;
  logic [P_CV_W-1:0] absdiff_d, absdiff_q;
  logic              v2_q, first2_q, last2_q;

  always_comb begin
    x_wide    = P_CV_W'({x, x});
    absdiff_d = (x_wide >= w) ? (x_wide - w) : (w - x_wide);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v2_q      <= 1'b0;
      first2_q  <= 1'b0;
      last2_q   <= 1'b0;
      absdiff_q <= '0;
    end else begin
      v2_q      <= in_valid;
      first2_q  <= in_valid & in_first;
      last2_q   <= in_valid & in_last;
      if (in_valid) absdiff_q <= absdiff_d;
    end
  end

  // Phase 3: accumulation S + |x_j - w_j|
  logic [P_ACC_W-1:0] sum_q;
  logic               done_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sum_q  <= '0;
      done_q <= 1'b0;
    end else begin
      done_q <= v2_q & last2_q;
      if (v2_q) sum_q <= (first2_q ? '0 : sum_q) + P_ACC_W'(absdiff_q);
    end
  end

  assign dist_valid = done_q;
  assign dist_full  = sum_q;
  assign dist_msb   = sum_q[P_ACC_W-1 -: P_DIST_W];

endmodule

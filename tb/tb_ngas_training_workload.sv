// Training workload on ngas_board, after the experiment that compares the
// Manhattan and Euclidean distances: a codebook is trained on image blocks
// and the quantisation error is measured before and after.
//
// The image is synthetic: 256 blocks of 8x8 pixels (the smallest sample set
// of the original board), made of five textures (flat levels with different
// gradients) plus noise. The codebook has 16 codevectors initialised at
// random. The testbench plays the PC (loading over ISA, reading winners)
// and the DSP, whose Neural Gas step here is the textbook one:
//   dw_k = eps(t) * exp(-rank_k / lambda(t)) * (x - w_k),
// with eps going from 0.5 to 0.02 and lambda from 8 to 0.5 over the run.
// The board computes all distances and picks the sample; as on the original
// board, the next sample's distances are computed while the DSP adapts. Each feed-forward
// pass codes all 256 blocks at run time and reads each winner over ISA.
// Checks: every winner is a nearest codevector under the board's 16-bit
// distances; the ALU is busy during every adaptation but the last; the
// error falls to less than half; the error of Manhattan
// coding stays within 25% of Euclidean coding of the same codebook; and
// each block costs 16 x 68 clocks of ALU time plus a small DSP overhead.
module tb_ngas_training_workload;
  import ngas_pkg::*;

  localparam int K = 16;
  localparam int N = 256;
  localparam int ITER = 300;

  logic clk = 0, rst_n = 0;
  always #62.5 clk = ~clk;   // 8 MHz

  logic [9:0]  isa_sa;
  logic [7:0]  isa_sd_in, isa_sd_out;
  logic        isa_sd_oe, isa_iow_n, isa_ior_n, isa_aen, isa_irq;
  logic [2:0]  dsp_io_addr;
  logic        dsp_io_rd, dsp_io_wr;
  logic [15:0] dsp_io_wdata, dsp_io_rdata;
  logic        dsp_cb_en, dsp_cb_we;
  logic [CB_AW-1:0] dsp_cb_addr;
  logic [CV_W-1:0]  dsp_cb_wdata, dsp_cb_rdata;
  logic [CV_IDX_W-1:0] dsp_dist_addr;
  logic [DIST_W-1:0]   dsp_dist_rdata;
  logic [PAT_AW-1:0]   dsp_pat_addr;
  logic [PIX_W-1:0]    dsp_pat_rdata;

  ngas_board dut (.*);

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s @%0d", what, cyc);
    end
  endtask

  initial begin
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0]  rpat [N * VEC_LEN];
  logic [15:0] rcb  [K * VEC_LEN];
  int          winners [N];

  // ------------------------------------------------------------- PC side
  task automatic io_wr(input logic [3:0] p, input logic [7:0] d);
    @(negedge clk); isa_sa = 10'h300 + 10'(p); isa_sd_in = d; isa_aen = 0;
    @(negedge clk); isa_iow_n = 0;
    repeat (3) @(negedge clk);
    isa_iow_n = 1;
    repeat (3) @(negedge clk);
  endtask

  task automatic io_rd(input logic [3:0] p, output logic [7:0] d);
    @(negedge clk); isa_sa = 10'h300 + 10'(p); isa_aen = 0;
    @(negedge clk); isa_ior_n = 0;
    repeat (3) @(negedge clk);
    d = isa_sd_out;
    isa_ior_n = 1;
    repeat (3) @(negedge clk);
  endtask

  logic ack_flag = 1'b0;
  task automatic set_state(input mode_e m, input bank_e b, input logic host);
    state_reg_t s;
    s.mode = m; s.bank = b; s.host_bus = host; s.sw_flags = {2'b00, ack_flag};
    io_wr(4'(PORT_STATE), s);
  endtask

  // ------------------------------------------------------------ DSP side
  task automatic dsp_in(input logic [2:0] a, output logic [15:0] d);
    @(negedge clk); dsp_io_addr = a; dsp_io_rd = 1; #1 d = dsp_io_rdata;
    @(negedge clk); dsp_io_rd = 0;
  endtask

  task automatic dsp_out(input logic [2:0] a, input logic [15:0] d);
    @(negedge clk); dsp_io_addr = a; dsp_io_wr = 1; dsp_io_wdata = d;
    @(negedge clk); dsp_io_wr = 0;
  endtask

  task automatic dsp_dist_read(input int k, output logic [15:0] d);
    @(negedge clk); dsp_dist_addr = 8'(k);
    @(negedge clk); d = dsp_dist_rdata;
  endtask

  // start one sample and collect its K distances
  logic [15:0] dists [K];
  task automatic dsp_start();
    dsp_out(3'(DSP_OUT_CTRL), 16'h0001);
  endtask

  task automatic dsp_sample(output int p);
    dsp_start();
    dsp_collect(p);
  endtask

  task automatic dsp_collect(output int p);
    logic [15:0] st, d;
    do dsp_in(3'(DSP_IN_STATUS), st); while (int'(st[8:0]) != K || st[15]);
    dsp_in(3'(DSP_IN_PATTERN), d);
    p = int'(d);
    for (int k = 0; k < K; k++) begin dsp_dist_read(k, d); dists[k] = d; end
  endtask

  // ------------------------------------------------------------ reference
  function automatic int l1(input int p, input int k);
    int s = 0;
    for (int j = 0; j < VEC_LEN; j++) begin
      int a, b;
      a = int'({rpat[p * VEC_LEN + j], rpat[p * VEC_LEN + j]});
      b = int'(rcb[k * VEC_LEN + j]);
      s += (a > b) ? a - b : b - a;
    end
    return s;
  endfunction

  function automatic real sqerr(input int p, input int k);
    real s = 0.0;
    for (int j = 0; j < VEC_LEN; j++) begin
      real e;
      e = (real'(rpat[p * VEC_LEN + j]) / 255.0) - (real'(rcb[k * VEC_LEN + j]) / 65535.0);
      s += e * e;
    end
    return s / VEC_LEN;
  endfunction

  // feed-forward pass over all blocks; returns the MSE of the board's
  // coding, and of Euclidean coding of the same codebook
  task automatic feed_forward(output real mse_l1, output real mse_l2, output longint cycles);
    longint t0;
    logic [15:0] d;
    logic [7:0] lo, hi;
    mse_l1 = 0.0; mse_l2 = 0.0;
    set_state(MODE_RUN, BANK_NONE, 1'b0);
    t0 = cyc;
    for (int s = 0; s < N; s++) begin
      int p, win, best2;
      dsp_sample(p);
      chk(p == s, "run-time samples in order");
      win = 0;
      for (int k = 1; k < K; k++) if (dists[k] < dists[win]) win = k;
      dsp_out(3'(DSP_OUT_WINNER), 16'(win));
      dsp_out(3'(DSP_OUT_CTRL), 16'h0006);
      // PC reads the code of this block, then acknowledges
      while (!isa_irq) @(negedge clk);
      io_rd(4'(PORT_WIN_LO), lo); io_rd(4'(PORT_WIN_HI), hi);
      winners[s] = int'({hi, lo});
      chk(winners[s] == win, "PC reads the winner");
      ack_flag = ~ack_flag;
      set_state(MODE_RUN, BANK_NONE, 1'b0);
      do dsp_in(3'(DSP_IN_STATE), d); while (d[5] != ack_flag);
      dsp_out(3'(DSP_OUT_CTRL), 16'h0000);
      // the winner is nearest under the 16-bit distance
      begin
        int mn;
        mn = l1(p, 0) >> 6;
        for (int k = 1; k < K; k++) if ((l1(p, k) >> 6) < mn) mn = l1(p, k) >> 6;
        chk((l1(p, win) >> 6) == mn, "winner is a nearest codevector");
      end
      best2 = 0;
      for (int k = 1; k < K; k++) if (sqerr(p, k) < sqerr(p, best2)) best2 = k;
      mse_l1 += sqerr(p, win);
      mse_l2 += sqerr(p, best2);
    end
    cycles = cyc - t0;
    mse_l1 /= N; mse_l2 /= N;
  endtask

  initial begin
    real mse0, mse0e, mse1, mse1e;
    longint ff_cycles, t_train;
    int overlapped = 0;
    isa_sa = 0; isa_sd_in = 0; isa_iow_n = 1; isa_ior_n = 1; isa_aen = 0;
    dsp_io_addr = 0; dsp_io_rd = 0; dsp_io_wr = 0; dsp_io_wdata = 0;
    dsp_cb_en = 0; dsp_cb_we = 0; dsp_cb_addr = 0; dsp_cb_wdata = 0;
    dsp_dist_addr = 0; dsp_pat_addr = 0;

    // synthetic 128x128 image as 256 blocks: five textures plus noise
    for (int b = 0; b < N; b++) begin
      int t;
      t = (b * 7 + b / 16) % 5;
      for (int j = 0; j < VEC_LEN; j++) begin
        int v;
        v = 30 + 45 * t + ((t % 2) ? (j % 8) * 3 : (j / 8) * 2) + $urandom_range(12) - 6;
        rpat[b * VEC_LEN + j] = 8'(v < 0 ? 0 : (v > 255 ? 255 : v));
      end
    end
    for (int i = 0; i < K * VEC_LEN; i++) rcb[i] = 16'($urandom);
    repeat (4) @(negedge clk); rst_n = 1;

    io_wr(4'(PORT_NCV), 8'(K - 1));
    io_wr(4'(PORT_NPAT_LO), 8'(N));
    io_wr(4'(PORT_NPAT_HI), 8'(N >> 8));
    io_wr(4'(PORT_ITER_LO), 8'(ITER));
    io_wr(4'(PORT_ITER_HI), 8'(ITER >> 8));
    set_state(MODE_IDLE, BANK_PATTERN, 1'b1);
    io_wr(4'(PORT_ADDR_LO), 8'h00); io_wr(4'(PORT_ADDR_HI), 8'h00);
    for (int i = 0; i < N * VEC_LEN; i++) io_wr(4'(PORT_DATA), rpat[i]);
    set_state(MODE_IDLE, BANK_CODEBOOK, 1'b1);
    io_wr(4'(PORT_ADDR_LO), 8'h00); io_wr(4'(PORT_ADDR_HI), 8'h00);
    for (int i = 0; i < K * VEC_LEN; i++) begin
      io_wr(4'(PORT_DATA), rcb[i][7:0]); io_wr(4'(PORT_DATA), rcb[i][15:8]);
    end

    feed_forward(mse0, mse0e, ff_cycles);
    $display("before training: MSE %f (Manhattan coding), %f (Euclidean coding)", mse0, mse0e);

    // ---- training run
    // The next sample is started as soon as the distances are read, so the
    // ALU computes its distances while the DSP adapts the codebook.
    set_state(MODE_TRAIN, BANK_NONE, 1'b0);
    t_train = cyc;
    dsp_start();
    for (int t = 0; t < ITER; t++) begin
      int p;
      int rank [K];
      real frac, eps, lam;
      dsp_collect(p);
      chk(p < N, "training sample in range");
      if (t < ITER - 1) begin
        logic [15:0] st;
        dsp_start();
        dsp_in(3'(DSP_IN_STATUS), st);
        if (st[15]) overlapped++;
      end
      for (int k = 0; k < K; k++) begin
        rank[k] = 0;
        for (int m = 0; m < K; m++)
          if (dists[m] < dists[k] || (dists[m] == dists[k] && m < k)) rank[k]++;
      end
      frac = real'(t) / real'(ITER);
      eps  = 0.5 * $pow(0.02 / 0.5, frac);
      lam  = 8.0 * $pow(0.5 / 8.0, frac);
      for (int k = 0; k < K; k++) begin
        real h;
        h = eps * $exp(-real'(rank[k]) / lam);
        if (h > 0.001) begin
          for (int j = 0; j < VEC_LEN; j++) begin
            int a, w, nw;
            a  = int'({rpat[p * VEC_LEN + j], rpat[p * VEC_LEN + j]});
            w  = int'(rcb[k * VEC_LEN + j]);
            nw = w + int'(h * real'(a - w));
            nw = nw < 0 ? 0 : (nw > 65535 ? 65535 : nw);
            rcb[k * VEC_LEN + j] = 16'(nw);
            @(negedge clk); dsp_cb_en = 1; dsp_cb_we = 1;
            dsp_cb_addr = CB_AW'(k * VEC_LEN + j); dsp_cb_wdata = 16'(nw);
          end
          @(negedge clk); dsp_cb_en = 0; dsp_cb_we = 0;
        end
      end
    end
    t_train = cyc - t_train;
    begin
      logic [15:0] st;
      dsp_in(3'(DSP_IN_STATUS), st);
      chk(st[13], "training run ends after the set iterations");
    end
    $display("training: %0d iterations in %0d clocks; ALU busy during adaptation in %0d of them",
             ITER, t_train, overlapped);
    chk(overlapped == ITER - 1, "ALU computes the next sample while the DSP adapts");

    // ---- codebook read back by the PC must equal the DSP's copy
    set_state(MODE_TEST, BANK_CODEBOOK, 1'b1);
    io_wr(4'(PORT_ADDR_LO), 8'h00); io_wr(4'(PORT_ADDR_HI), 8'h00);
    for (int i = 0; i < K * VEC_LEN; i++) begin
      logic [7:0] lo, hi;
      io_rd(4'(PORT_DATA), lo); io_rd(4'(PORT_DATA), hi);
      chk({hi, lo} == rcb[i], "trained codebook read-back");
    end

    feed_forward(mse1, mse1e, ff_cycles);
    $display("after %0d iterations: MSE %f (Manhattan coding), %f (Euclidean coding)", ITER, mse1, mse1e);
    chk(mse1 < 0.5 * mse0, "training lowers the quantisation error");
    chk(mse1 <= 1.25 * mse1e, "Manhattan coding close to Euclidean coding");
    $display("feed-forward: %0d clocks for %0d blocks, %0d per block (ALU %0d); %0.1f blocks/s at 8 MHz",
             ff_cycles, N, ff_cycles / N, K * CYCLES_PER_DIST, 8.0e6 * N / real'(ff_cycles));
    chk(ff_cycles >= longint'(N) * K * CYCLES_PER_DIST, "at least 68 clocks per distance");
    chk(ff_cycles <= longint'(N) * (K * CYCLES_PER_DIST + 400), "DSP and PC overhead per block bounded");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

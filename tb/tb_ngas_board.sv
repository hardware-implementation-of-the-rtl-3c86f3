// End-to-end testbench for ngas_board. It plays both the PC, through ISA
// I/O cycles, and the DSP, through its port bus and memory ports, and keeps
// its own copy of patterns and codebook as the reference.
//
//  1. The PC sets the sizes (K codevectors, N samples), loads the patterns
//     and the codebook, and reads part of both back in board-testing mode.
//  2. Training: the PC sets T iterations; for T samples the DSP reads the random number, starts the
//     ALU, collects and checks every distance while the ALU goes on, sorts
//     them and adapts the closest codevectors through its codebook port
//     (dw = (x - w) / 2^(rank+1) for the first ranks: a stand-in for the
//     DSP's exponential rule). During one sample the PC takes the memory
//     buses, which stalls the ALU at a codevector boundary. A start after
//     the T-th sample is refused and both sides see training done.
//  3. Run time: for R samples in order the DSP starts the next sample
//     before the last distance of the current one is in (a pending start),
//     picks the winner and posts it with an interrupt; the PC reads it over
//     ISA and acknowledges through a state-register flag.
//  4. Board testing: the PC reads back the distance memory and adapted
//     codevectors.
// Every mechanism is counted, and one that never happened is a failure.
// K, N, T and R are parameters of this testbench only; the board itself is
// always built at its full size.
module tb_ngas_board #(
  parameter int K = 12,
  parameter int N = 40,
  parameter int T = 4,
  parameter int R = 6,
  parameter int ADAPT_RANKS = 3
);
  import ngas_pkg::*;

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

  // ------------------------------------------------------------ bookkeeping
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

  // mechanism counters
  int n_pat_bytes = 0, n_cb_words = 0, n_readback = 0, n_train = 0, n_random = 0;
  int n_adapt = 0, n_stall = 0, n_overlap = 0, n_pending = 0, n_winner = 0;
  int n_irq = 0, n_ack = 0, n_dist_checked = 0, n_host_wait = 0, n_train_done = 0;

  initial begin
    repeat (60_000_000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ----------------------------------------------------------- reference
  logic [7:0]  rpat [];
  logic [15:0] rcb  [];

  function automatic logic [15:0] ref_dist(input int p, input int k);
    int unsigned s = 0;
    for (int j = 0; j < VEC_LEN; j++) begin
      int unsigned a, b;
      a = {rpat[p * VEC_LEN + j], rpat[p * VEC_LEN + j]};
      b = rcb[k * VEC_LEN + j];
      s += (a > b) ? a - b : b - a;
    end
    return 16'(s >> 6);
  endfunction

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
    chk(isa_sd_oe, "board drives ISA data on read");
    d = isa_sd_out;
    isa_ior_n = 1;
    repeat (3) @(negedge clk);
  endtask

  logic [2:0] sw_flags = 3'b000;
  task automatic set_state(input mode_e m, input bank_e b, input logic host);
    state_reg_t s;
    s.mode = m; s.bank = b; s.host_bus = host; s.sw_flags = sw_flags;
    io_wr(4'(PORT_STATE), s);
  endtask

  task automatic set_addr(input logic [15:0] a);
    io_wr(4'(PORT_ADDR_LO), a[7:0]);
    io_wr(4'(PORT_ADDR_HI), a[15:8]);
  endtask

  // wait until the PC really owns the buses (status bit 5)
  task automatic wait_host_owns();
    logic [7:0] st;
    do begin
      io_rd(4'(PORT_STATUS), st);
      if (!st[5]) n_host_wait++;
    end while (!st[5]);
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

  task automatic dsp_cb_read(input int a, output logic [15:0] d);
    @(negedge clk); dsp_cb_en = 1; dsp_cb_we = 0; dsp_cb_addr = CB_AW'(a);
    @(negedge clk); dsp_cb_en = 0; d = dsp_cb_rdata;
  endtask

  task automatic dsp_cb_write(input int a, input logic [15:0] d);
    @(negedge clk); dsp_cb_en = 1; dsp_cb_we = 1; dsp_cb_addr = CB_AW'(a); dsp_cb_wdata = d;
    @(negedge clk); dsp_cb_en = 0; dsp_cb_we = 0;
  endtask

  task automatic dsp_pat_read(input int a, output logic [7:0] d);
    @(negedge clk); dsp_pat_addr = PAT_AW'(a);
    @(negedge clk); d = dsp_pat_rdata;
  endtask

  // collect the distances of one sample as they arrive; the check of
  // distance k needs the sample index, read from IN 3
  logic [15:0] dists [];
  task automatic dsp_collect(input int p, input int upto);
    logic [15:0] st, d;
    int got = 0;
    while (got < upto) begin
      dsp_in(3'(DSP_IN_STATUS), st);
      while (got < int'(st[8:0]) && got < upto) begin
        dsp_dist_read(got, d);
        dists[got] = d;
        if (st[15]) n_overlap++;
        chk(d == ref_dist(p, got), $sformatf("distance p=%0d k=%0d", p, got));
        n_dist_checked++;
        got++;
      end
    end
  endtask

  // sort indices by distance (stable: ties keep the lower index first)
  function automatic void rank_order(ref int order []);
    order = new[K];
    for (int i = 0; i < K; i++) order[i] = i;
    for (int i = 1; i < K; i++)
      for (int j = i; j > 0 && dists[order[j]] < dists[order[j - 1]]; j--) begin
        int t = order[j]; order[j] = order[j - 1]; order[j - 1] = t;
      end
  endfunction

  // ---------------------------------------------------------------- test
  logic pc_grab = 0, pc_grab_done = 0;

  initial begin
    logic [7:0] b, lo, hi;
    logic [15:0] d, rnd;
    int order [];
    int last_winner;

    isa_sa = 0; isa_sd_in = 0; isa_iow_n = 1; isa_ior_n = 1; isa_aen = 0;
    dsp_io_addr = 0; dsp_io_rd = 0; dsp_io_wr = 0; dsp_io_wdata = 0;
    dsp_cb_en = 0; dsp_cb_we = 0; dsp_cb_addr = 0; dsp_cb_wdata = 0;
    dsp_dist_addr = 0; dsp_pat_addr = 0;
    rpat = new[N * VEC_LEN];
    rcb  = new[K * VEC_LEN];
    dists = new[K];
    for (int i = 0; i < N * VEC_LEN; i++) rpat[i] = 8'($urandom);
    for (int i = 0; i < K * VEC_LEN; i++) rcb[i] = 16'($urandom);
    repeat (4) @(negedge clk); rst_n = 1;

    // ---- 1. loading by the PC
    io_wr(4'(PORT_NCV), 8'(K - 1));
    io_wr(4'(PORT_NPAT_LO), 8'(N));
    io_wr(4'(PORT_NPAT_HI), 8'(N >> 8));
    io_wr(4'(PORT_ITER_LO), 8'(T));
    io_wr(4'(PORT_ITER_HI), 8'(T >> 8));
    set_state(MODE_IDLE, BANK_PATTERN, 1'b1);
    set_addr(16'h0000);
    for (int i = 0; i < N * VEC_LEN; i++) begin io_wr(4'(PORT_DATA), rpat[i]); n_pat_bytes++; end
    set_state(MODE_IDLE, BANK_CODEBOOK, 1'b1);
    set_addr(16'h0000);
    for (int i = 0; i < K * VEC_LEN; i++) begin
      io_wr(4'(PORT_DATA), rcb[i][7:0]);
      io_wr(4'(PORT_DATA), rcb[i][15:8]);
      n_cb_words++;
    end
    set_state(MODE_TEST, BANK_PATTERN, 1'b1);
    set_addr(16'(VEC_LEN * (N - 1)));
    for (int j = 0; j < VEC_LEN; j++) begin
      io_rd(4'(PORT_DATA), b);
      chk(b == rpat[VEC_LEN * (N - 1) + j], "pattern read-back"); n_readback++;
    end
    set_state(MODE_TEST, BANK_CODEBOOK, 1'b1);
    set_addr(16'(VEC_LEN * (K - 1)));
    for (int j = 0; j < VEC_LEN; j++) begin
      io_rd(4'(PORT_DATA), lo); io_rd(4'(PORT_DATA), hi);
      chk({hi, lo} == rcb[VEC_LEN * (K - 1) + j], "codebook read-back"); n_readback++;
    end

    // ---- 2. training
    set_state(MODE_TRAIN, BANK_NONE, 1'b0);
    for (int s = 0; s < T; s++) begin
      int p;
      dsp_in(3'(DSP_IN_STATE), d);
      chk(d[1:0] == 2'(MODE_TRAIN), "DSP sees training mode");
      dsp_in(3'(DSP_IN_RANDOM), rnd);
      p = (int'(rnd) * N) >>> 16;
      dsp_out(3'(DSP_OUT_CTRL), 16'h0001);
      n_random++;
      if (s == 1) pc_grab = 1;   // the PC takes the buses during this sample
      repeat (3) @(negedge clk);
      dsp_in(3'(DSP_IN_PATTERN), d);
      chk(int'(d) == p, "training sample chosen by the random number");
      dsp_collect(p, K);
      rank_order(order);
      // adaptation of the closest codevectors through the DSP port
      for (int r = 0; r < ADAPT_RANKS && r < K; r++) begin
        int k;
        k = order[r];
        for (int j = 0; j < VEC_LEN; j++) begin
          logic [7:0] x;
          logic [15:0] w;
          int xw, nw;
          dsp_pat_read(p * VEC_LEN + j, x);
          chk(x == rpat[p * VEC_LEN + j], "DSP pattern port");
          dsp_cb_read(k * VEC_LEN + j, w);
          chk(w == rcb[k * VEC_LEN + j], "DSP codebook port read");
          xw = int'({x, x});
          nw = int'(w) + ((xw - int'(w)) >>> (r + 1));
          dsp_cb_write(k * VEC_LEN + j, 16'(nw));
          rcb[k * VEC_LEN + j] = 16'(nw);
        end
        n_adapt++;
      end
      n_train++;
    end

    // the training run is over: a further start is refused
    dsp_in(3'(DSP_IN_ITER), d);
    chk(d == 0, "no training iterations left");
    dsp_out(3'(DSP_OUT_CTRL), 16'h0001);
    repeat (5) @(negedge clk);
    dsp_in(3'(DSP_IN_STATUS), d);
    chk(!d[15] && d[13], "DSP sees training done, ALU idle");
    io_rd(4'(PORT_STATUS), b);
    chk(b[2] && !b[7], "PC sees training done");
    if (b[2]) n_train_done++;

    // ---- 3. run time
    set_state(MODE_RUN, BANK_NONE, 1'b0);
    dsp_out(3'(DSP_OUT_CTRL), 16'h0001);
    for (int s = 0; s < R; s++) begin
      int p;
      logic [15:0] st;
      logic [2:0] flags0;
      p = s % N;
      dsp_collect(p, K - 1);
      // start the next sample before the last distance is in
      dsp_in(3'(DSP_IN_STATUS), st);
      if (s < R - 1) begin
        dsp_out(3'(DSP_OUT_CTRL), 16'h0001);
        if (st[15]) n_pending++;
      end
      // the last distance: wait for the sample to finish
      do dsp_in(3'(DSP_IN_STATUS), st);
      while (!(int'(st[8:0]) == K || (s < R - 1 && int'(st[8:0]) < K - 1)));
      dsp_dist_read(K - 1, d);
      dists[K - 1] = d;
      chk(d == ref_dist(p, K - 1), "last distance");
      rank_order(order);
      last_winner = order[0];
      dsp_in(3'(DSP_IN_STATE), d);
      flags0 = d[7:5];
      dsp_out(3'(DSP_OUT_WINNER), 16'(last_winner));
      dsp_out(3'(DSP_OUT_CTRL), 16'h0006);
      // PC: wait for the interrupt, read the winner, acknowledge
      while (!isa_irq) @(negedge clk);
      n_irq++;
      begin
        int best;
        best = 0;
        for (int k = 1; k < K; k++) if (ref_dist(p, k) < ref_dist(p, best)) best = k;
        io_rd(4'(PORT_STATUS), b);
        chk(b[4] && b[3], "status shows winner valid and interrupt");
        io_rd(4'(PORT_WIN_LO), lo); io_rd(4'(PORT_WIN_HI), hi);
        chk(int'({hi, lo}) == best, $sformatf("winner of sample %0d", p));
        n_winner++;
      end
      sw_flags[0] = ~sw_flags[0];
      set_state(MODE_RUN, BANK_NONE, 1'b0);
      // DSP: wait for the acknowledge flag, then clear the interrupt
      do dsp_in(3'(DSP_IN_STATE), d); while (d[5] == flags0[0]);
      n_ack++;
      dsp_out(3'(DSP_OUT_CTRL), 16'h0000);
    end

    // ---- 4. board testing: read back distances and adapted codevectors
    set_state(MODE_TEST, BANK_DISTANCE, 1'b1);
    set_addr(16'h0000);
    for (int k = 0; k < K; k++) begin
      io_rd(4'(PORT_DATA), lo); io_rd(4'(PORT_DATA), hi);
      chk({hi, lo} == ref_dist((R - 1) % N, k), "distance read-back"); n_readback++;
    end
    set_state(MODE_TEST, BANK_CODEBOOK, 1'b1);
    set_addr(16'h0000);
    for (int i = 0; i < 2 * VEC_LEN; i++) begin
      io_rd(4'(PORT_DATA), lo); io_rd(4'(PORT_DATA), hi);
      chk({hi, lo} == rcb[i], "adapted codebook read-back"); n_readback++;
    end

    // ---- every mechanism must have happened
    chk(n_pat_bytes == N * VEC_LEN, "pattern load");
    chk(n_cb_words == K * VEC_LEN, "codebook load");
    chk(n_train == T && n_random == T, "training samples");
    chk(n_adapt > 0, "adaptation");
    chk(n_train_done > 0, "end of the training run");
    chk(n_stall > 0, "ALU stalled while the PC held the buses");
    chk(n_host_wait > 0, "PC waited for the ALU to finish a distance");
    chk(n_overlap > 0, "DSP read distances while the ALU was busy");
    chk(n_pending > 0, "start while busy (pending start)");
    chk(n_winner == R && n_irq == R && n_ack == R, "winners to the PC");
    chk(n_readback > 0, "board-testing read-back");
    $display("mechanisms: pat_bytes=%0d cb_words=%0d train=%0d train_done=%0d adapt=%0d stall_reads=%0d host_wait=%0d overlap=%0d pending=%0d winners=%0d irq=%0d readback=%0d distances=%0d",
             n_pat_bytes, n_cb_words, n_train, n_train_done, n_adapt, n_stall, n_host_wait, n_overlap, n_pending,
             n_winner, n_irq, n_readback, n_dist_checked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // PC grabbing the memory buses in the middle of a training sample: it
  // asks for them, waits until it owns them, reads a pixel, sees the ALU
  // stalled in the status byte, and gives the buses back.
  initial begin
    logic [7:0] st, b;
    wait (pc_grab);
    repeat (200) @(negedge clk);
    sw_flags = sw_flags;
    set_state(MODE_TRAIN, BANK_PATTERN, 1'b1);
    wait_host_owns();
    set_addr(16'd5);
    io_rd(4'(PORT_DATA), b);
    chk(b == rpat[5], "PC read while ALU paused");
    for (int i = 0; i < 20; i++) begin
      io_rd(4'(PORT_STATUS), st);
      if (st[6]) n_stall++;
    end
    set_state(MODE_TRAIN, BANK_NONE, 1'b0);
    pc_grab_done = 1;
  end
endmodule

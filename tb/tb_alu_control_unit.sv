// Testbench for alu_control_unit, run together with manhattan_alu over
// memory models kept here (random patterns and codevectors, one-clock
// reads). For run-time and training samples it checks every distance
// against an L1 sum computed here, the codevector index of each write, the
// sample index (in order at run time, (rnd * num_pat) >> 16 in training),
// the 68 clocks per distance, a start arriving while busy (served next),
// a wait while the buses are withheld, the end of a training run after
// num_iter samples, and that board-testing mode ignores starts.
module tb_alu_control_unit;
  import ngas_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, grant, rnd_advance, mem_rd;
  mode_e mode;
  logic [CV_IDX_W-1:0] num_cv_m1;
  logic [PAT_IDX_W:0] num_pat;
  logic [15:0] num_iter, iter_left;
  logic train_done;
  logic [15:0] rnd;
  logic [PAT_AW-1:0] pat_addr;
  logic [CB_AW-1:0] cb_addr;
  logic alu_valid, alu_first, alu_last, alu_dist_valid;
  logic [DIST_W-1:0] alu_dist, dist_data;
  logic [ACC_W-1:0] dist_full;
  logic dist_we, busy, sample_done, stalled, holding;
  logic [CV_IDX_W-1:0] dist_idx;
  logic [PAT_IDX_W-1:0] cur_pattern;
  logic [CV_IDX_W:0] dist_count;
  logic [7:0] x;
  logic [15:0] w;

  alu_control_unit dut (.*);
  manhattan_alu u_alu (.clk, .rst_n, .in_valid(alu_valid), .in_first(alu_first),
    .in_last(alu_last), .x, .w, .dist_valid(alu_dist_valid), .dist_full, .dist_msb(alu_dist));

  logic [7:0]  pmem [1 << PAT_AW];
  logic [15:0] cmem [1 << CB_AW];
  always_ff @(posedge clk) if (mem_rd) begin x <= pmem[pat_addr]; w <= cmem[cb_addr]; end

  int checks = 0, failures = 0, cyc = 0, stall_cycles = 0, adv_count = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (stalled) stall_cycles++;
    if (rnd_advance) adv_count++;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0d", what, cyc); end
  endtask

  function automatic logic [15:0] ref_dist(input int p, input int k);
    int unsigned s = 0;
    for (int j = 0; j < VEC_LEN; j++) begin
      int unsigned a, b;
      a = {pmem[p * VEC_LEN + j], pmem[p * VEC_LEN + j]};
      b = cmem[k * VEC_LEN + j];
      s += (a > b) ? a - b : b - a;
    end
    return 16'(s >> 6);
  endfunction

  // one sample: start, then watch every distance write
  task automatic run_sample(input int exp_pat, input int withhold_at);
    int t0, k;
    @(negedge clk); start = 1; t0 = cyc;
    @(negedge clk); start = 0;
    k = 0;
    while (k <= int'(num_cv_m1)) begin
      @(posedge clk); #1;
      if (k == withhold_at && dut.state_q == dut.S_SETUP && grant) begin
        @(negedge clk); grant = 0; repeat (10) @(negedge clk); grant = 1; t0 += 10;
      end
      if (dist_we) begin
        chk(int'(cur_pattern) == exp_pat, "sample index");
        chk(int'(dist_idx) == k, "codevector index");
        chk(dist_data == ref_dist(exp_pat, k), "distance value");
        chk(cyc - t0 == CYCLES_PER_DIST * (k + 1), $sformatf("68 clocks per distance (%0d for %0d)", cyc - t0, k + 1));
        chk(sample_done == (k == int'(num_cv_m1)), "sample_done");
        k++;
      end
    end
    @(posedge clk); #1 chk(!busy, "idle after sample");
  endtask

  initial begin
    int seq_exp;
    start = 0; grant = 1; mode = MODE_IDLE; num_cv_m1 = 8'd5; num_pat = 11'd300; rnd = 16'h1234; num_iter = 16'd3;
    for (int i = 0; i < (1 << PAT_AW); i++) pmem[i] = 8'($urandom);
    for (int i = 0; i < (1 << CB_AW); i++)  cmem[i] = 16'($urandom);
    repeat (2) @(negedge clk); rst_n = 1;

    // run time: samples in order
    mode = MODE_RUN;
    for (int s = 0; s < 3; s++) run_sample(s, (s == 1) ? 2 : -1);
    chk(stall_cycles == 10, "stall while buses withheld");

    // wrap-around of the run-time sequence
    num_pat = 11'd4;
    run_sample(3, -1);
    run_sample(0, -1);

    // training: index from the random number, one rnd_advance per sample
    mode = MODE_TRAIN; num_pat = 11'd1000;
    for (int s = 0; s < 3; s++) begin
      int e;
      rnd = 16'($urandom);
      e = (int'(rnd) * 1000) >>> 16;
      fork
        run_sample(e, -1);
        begin
          int a0;
          a0 = adv_count;
          repeat (CYCLES_PER_DIST * 6) @(posedge clk);
          chk(adv_count == a0 + 1, "one random step per sample");
        end
      join
    end

    // the training run is over after num_iter samples
    chk(iter_left == 0, "no iterations left");
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    repeat (5) @(negedge clk);
    chk(!busy && train_done, "start refused after the last iteration");
    mode = MODE_RUN; @(negedge clk); mode = MODE_TRAIN; @(negedge clk);
    chk(iter_left == 3 && !train_done, "iteration count restarts with the mode");

    // start while busy is remembered
    begin
      int writes = 0;
      num_cv_m1 = 8'd1; mode = MODE_RUN;
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      repeat (20) @(negedge clk);
      start = 1; @(negedge clk); start = 0;
      repeat (CYCLES_PER_DIST * 5) begin @(posedge clk); #1 if (dist_we) writes++; end
      chk(writes == 4, "pending start served");
    end

    // board testing ignores start
    mode = MODE_TEST;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    repeat (5) @(negedge clk);
    chk(!busy, "test mode ignores start");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Testbench for dsp_port_interface: reads every DSP input port and checks
// it against the board-side values driven here, checks the distance
// register and its "new" flag, the one-shot start from control bit 0, the
// stored control bits and the winner register.
module tb_dsp_port_interface;
  import ngas_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [2:0] io_addr;
  logic io_rd, io_wr, dist_load, busy, alu_start;
  logic [15:0] io_wdata, io_rdata, rnd, winner_q;
  state_reg_t state;
  logic [DIST_W-1:0] dist_in;
  logic [PAT_IDX_W-1:0] cur_pattern;
  logic [CV_IDX_W:0] dist_count;
  logic [15:0] iter_left;
  logic train_done;
  ctrl_reg_t ctrl_q;

  dsp_port_interface dut (.*);

  int checks = 0, failures = 0, starts = 0;
  always @(posedge clk) if (alu_start) starts++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic dsp_in(input logic [2:0] a, output logic [15:0] d);
    @(negedge clk); io_addr = a; io_rd = 1; #1 d = io_rdata;
    @(negedge clk); io_rd = 0;
  endtask

  task automatic dsp_out(input logic [2:0] a, input logic [15:0] d);
    @(negedge clk); io_addr = a; io_wr = 1; io_wdata = d;
    @(negedge clk); io_wr = 0;
  endtask

  initial begin
    logic [15:0] d;
    io_addr = 0; io_rd = 0; io_wr = 0; io_wdata = 0; dist_load = 0; dist_in = 0;
    busy = 0; rnd = 0; state = '0; cur_pattern = 0; dist_count = 0; iter_left = 0; train_done = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 50; i++) begin
      logic [15:0] dv;
      state = state_reg_t'($urandom); rnd = 16'($urandom); cur_pattern = 10'($urandom);
      busy = 1'($urandom); dist_count = 9'($urandom_range(256));
      iter_left = 16'($urandom); train_done = 1'($urandom);
      dv = 16'($urandom);
      @(negedge clk); dist_load = 1; dist_in = dv;
      @(negedge clk); dist_load = 0; dist_in = ~dv;
      dsp_in(3'(DSP_IN_STATUS), d);  chk(d[14] == 1'b1, "new distance flag set");
      chk(d[15] == busy && d[13] == train_done && d[8:0] == dist_count, "status busy/done/count");
      dsp_in(3'(DSP_IN_ITER), d);    chk(d == iter_left, "iterations left");
      dsp_in(3'(DSP_IN_STATE), d);   chk(d == {8'h00, state}, "state port");
      dsp_in(3'(DSP_IN_RANDOM), d);  chk(d == rnd, "random port");
      dsp_in(3'(DSP_IN_PATTERN), d); chk(d == 16'(cur_pattern), "pattern port");
      dsp_in(3'(DSP_IN_DIST), d);    chk(d == dv, "distance register");
      dsp_in(3'(DSP_IN_STATUS), d);  chk(d[14] == 1'b0, "new distance flag cleared");
    end
    dsp_out(3'(DSP_OUT_CTRL), 16'h0007);
    chk(starts == 1, "start pulse");
    chk(ctrl_q.alu_start == 0 && ctrl_q.pc_irq && ctrl_q.winner_valid, "control bits");
    dsp_out(3'(DSP_OUT_CTRL), 16'h0002);
    chk(starts == 1 && ctrl_q.pc_irq && !ctrl_q.winner_valid, "no start on bit0=0");
    dsp_out(3'(DSP_OUT_WINNER), 16'h00A5);
    chk(winner_q == 16'h00A5, "winner register");
    chk(ctrl_q.pc_irq, "control kept by winner write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

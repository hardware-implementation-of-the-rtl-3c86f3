// Testbench for io_control_unit: plays the PC through decoded strobes with
// gaps like those of ISA cycles, and models the three memories here as
// arrays with one-clock reads. It streams pixels and 16-bit codebook words
// in and out with the auto-incrementing address, reads back distances, the
// size and iteration registers, the state register and the read-only registers, and
// checks the memory contents and every byte returned against its own copy.
module tb_io_control_unit;
  import ngas_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic wr_stb, rd_stb;
  logic [3:0] port, rd_port;
  logic [7:0] wdata, rdata, ctrl, status;
  state_reg_t state_q;
  logic [CV_IDX_W-1:0] num_cv_m1;
  logic [PAT_IDX_W:0] num_pat;
  logic [15:0] num_iter;
  logic [15:0] winner;
  logic pat_en, pat_we, cb_en, cb_we;
  logic [PAT_AW-1:0] pat_addr;
  logic [PIX_W-1:0] pat_wdata, pat_rdata;
  logic [CB_AW-1:0] cb_addr;
  logic [CV_W-1:0] cb_wdata, cb_rdata;
  logic [CV_IDX_W-1:0] dist_addr;
  logic [DIST_W-1:0] dist_rdata;

  io_control_unit dut (.*);

  // memory models
  logic [7:0]  pmem [1 << PAT_AW];
  logic [15:0] cmem [1 << CB_AW];
  logic [15:0] dmem [256];
  always_ff @(posedge clk) begin
    if (pat_en) begin if (pat_we) pmem[pat_addr] <= pat_wdata; pat_rdata <= pmem[pat_addr]; end
    if (cb_en)  begin if (cb_we)  cmem[cb_addr]  <= cb_wdata;  cb_rdata  <= cmem[cb_addr];  end
    dist_rdata <= dmem[dist_addr];
  end

  int checks = 0, failures = 0;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic pc_wr(input logic [3:0] p, input logic [7:0] d);
    @(negedge clk); port = p; wdata = d; wr_stb = 1;
    @(negedge clk); wr_stb = 0;
    repeat (4) @(negedge clk);
  endtask

  task automatic pc_rd(input logic [3:0] p, output logic [7:0] d);
    @(negedge clk); rd_port = p; #1 d = rdata;
    port = p; rd_stb = 1;
    @(negedge clk); rd_stb = 0;
    repeat (4) @(negedge clk);
  endtask

  task automatic set_addr(input logic [15:0] a);
    pc_wr(4'(PORT_ADDR_LO), a[7:0]);
    pc_wr(4'(PORT_ADDR_HI), a[15:8]);
  endtask

  function automatic logic [7:0] st(input bank_e b, input mode_e m);
    state_reg_t s;
    s = '0; s.bank = b; s.mode = m; s.host_bus = 1'b1; s.sw_flags = 3'b101;
    return s;
  endfunction

  initial begin
    logic [7:0] d, lo, hi;
    logic [7:0]  pbytes [200];
    logic [15:0] cwords [100];
    wr_stb = 0; rd_stb = 0; port = 0; rd_port = 0; wdata = 0;
    winner = 16'hBEEF; ctrl = 8'h06; status = 8'h81;
    for (int i = 0; i < 256; i++) dmem[i] = 16'($urandom);
    repeat (2) @(negedge clk); rst_n = 1;

    // pattern bank: 200 pixels from address 0x1234
    pc_wr(4'(PORT_STATE), st(BANK_PATTERN, MODE_IDLE));
    chk(state_q == st(BANK_PATTERN, MODE_IDLE), "state register");
    set_addr(16'h1234);
    for (int i = 0; i < 200; i++) begin
      pbytes[i] = 8'($urandom);
      pc_wr(4'(PORT_DATA), pbytes[i]);
    end
    for (int i = 0; i < 200; i++) chk(pmem[16'h1234 + i] == pbytes[i], "pattern memory content");
    pc_rd(4'(PORT_ADDR_LO), lo); pc_rd(4'(PORT_ADDR_HI), hi);
    chk({hi, lo} == 16'h1234 + 200, "address after writes");
    set_addr(16'h1234);
    for (int i = 0; i < 200; i++) begin
      pc_rd(4'(PORT_DATA), d);
      chk(d == pbytes[i], "pattern read-back");
    end

    // codebook bank: 100 words, low byte first
    pc_wr(4'(PORT_STATE), st(BANK_CODEBOOK, MODE_TEST));
    set_addr(16'h0100);
    for (int i = 0; i < 100; i++) begin
      cwords[i] = 16'($urandom);
      pc_wr(4'(PORT_DATA), cwords[i][7:0]);
      pc_wr(4'(PORT_DATA), cwords[i][15:8]);
    end
    for (int i = 0; i < 100; i++) chk(cmem[14'h0100 + i] == cwords[i], "codebook memory content");
    set_addr(16'h0100);
    for (int i = 0; i < 100; i++) begin
      pc_rd(4'(PORT_DATA), lo); pc_rd(4'(PORT_DATA), hi);
      chk({hi, lo} == cwords[i], "codebook read-back");
    end

    // distance bank: read-only
    pc_wr(4'(PORT_STATE), st(BANK_DISTANCE, MODE_TEST));
    set_addr(16'd10);
    for (int i = 10; i < 60; i++) begin
      pc_rd(4'(PORT_DATA), lo); pc_rd(4'(PORT_DATA), hi);
      chk({hi, lo} == dmem[i], "distance read-back");
    end

    // size and read-only registers
    pc_wr(4'(PORT_NCV), 8'd99);
    pc_wr(4'(PORT_NPAT_LO), 8'h00);
    pc_wr(4'(PORT_NPAT_HI), 8'h03);
    chk(num_iter == 16'hFFFF, "iteration count reset value");
    pc_wr(4'(PORT_ITER_LO), 8'h34);
    pc_wr(4'(PORT_ITER_HI), 8'h12);
    chk(num_cv_m1 == 8'd99 && num_pat == 11'd768, "size registers");
    chk(num_iter == 16'h1234, "iteration count");
    pc_rd(4'(PORT_ITER_HI), d); chk(d == 8'h12, "read iteration count");
    pc_rd(4'(PORT_NCV), d);     chk(d == 8'd99, "read NCV");
    pc_rd(4'(PORT_NPAT_HI), d); chk(d == 8'h03, "read NPAT hi");
    pc_rd(4'(PORT_WIN_LO), d);  chk(d == 8'hEF, "winner low");
    pc_rd(4'(PORT_WIN_HI), d);  chk(d == 8'hBE, "winner high");
    pc_rd(4'(PORT_CTRL), d);    chk(d == 8'h06, "control register");
    pc_rd(4'(PORT_STATUS), d);  chk(d == 8'h81, "status");
    pc_rd(4'(PORT_STATE), d);   chk(d == st(BANK_DISTANCE, MODE_TEST), "state read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

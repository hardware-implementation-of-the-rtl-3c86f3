// Testbench for data_bus_buffers: random requests from both sides with the
// buffers in either position and the ALU holding the buses or not. The expected memory-port signals and the read
// data each side sees are worked out here: the owning side's request passes (the PC
// owns the buses only when it asks and the ALU does not hold them),
// the other side is cut off and reads zero, and alu_grant follows host_sel.
module tb_data_bus_buffers;
  import ngas_pkg::*;
  logic host_sel, alu_hold, alu_grant, host_owns;
  logic host_pat_en, host_pat_we, host_cb_en, host_cb_we, alu_rd;
  logic [PAT_AW-1:0] host_pat_addr, alu_pat_addr, pat_addr;
  logic [PIX_W-1:0]  host_pat_wdata, host_pat_rdata, alu_x, pat_wdata, pat_rdata;
  logic [CB_AW-1:0]  host_cb_addr, alu_cb_addr, cb_addr;
  logic [CV_W-1:0]   host_cb_wdata, host_cb_rdata, alu_w, cb_wdata, cb_rdata;
  logic pat_en, pat_we, cb_en, cb_we;

  data_bus_buffers dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s host_sel=%b", what, host_sel); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      host_sel = 1'($urandom); alu_hold = 1'($urandom); host_pat_en = 1'($urandom); host_pat_we = 1'($urandom);
      host_cb_en = 1'($urandom); host_cb_we = 1'($urandom); alu_rd = 1'($urandom);
      host_pat_addr = PAT_AW'($urandom); alu_pat_addr = PAT_AW'($urandom);
      host_cb_addr = CB_AW'($urandom); alu_cb_addr = CB_AW'($urandom);
      host_pat_wdata = 8'($urandom); host_cb_wdata = 16'($urandom);
      pat_rdata = 8'($urandom); cb_rdata = 16'($urandom);
      #1;
      chk(alu_grant == !host_sel, "grant");
      chk(host_owns == (host_sel && !alu_hold), "hand-over waits for the ALU");
      if (host_sel && !alu_hold) begin
        chk(pat_en == host_pat_en && pat_we == host_pat_we && pat_addr == host_pat_addr
            && pat_wdata == host_pat_wdata, "pattern port from PC");
        chk(cb_en == host_cb_en && cb_we == host_cb_we && cb_addr == host_cb_addr
            && cb_wdata == host_cb_wdata, "codebook port from PC");
        chk(host_pat_rdata == pat_rdata && host_cb_rdata == cb_rdata, "PC read data");
        chk(alu_x == 0 && alu_w == 0, "ALU cut off");
      end else begin
        chk(pat_en == alu_rd && !pat_we && pat_addr == alu_pat_addr, "pattern port from ALU");
        chk(cb_en == alu_rd && !cb_we && cb_addr == alu_cb_addr, "codebook port from ALU");
        chk(alu_x == pat_rdata && alu_w == cb_rdata, "ALU read data");
        chk(host_pat_rdata == 0 && host_cb_rdata == 0, "PC cut off");
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Testbench for isa_bus_interface: generates ISA I/O write and read cycles
// (strobe low for four clocks) inside and outside the board's window and
// with AEN high. Writes inside the window must give exactly one wr_stb with
// the cycle's offset and data; reads must drive sd_out with the byte chosen
// for rd_port while IOR# is low and give one rd_stb; all other cycles must
// give no strobe and leave the bus undriven.
module tb_isa_bus_interface;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [9:0] sa;
  logic [7:0] sd_in, sd_out, wdata, rdata;
  logic sd_oe, iow_n, ior_n, aen, wr_stb, rd_stb;
  logic [3:0] port, rd_port;

  isa_bus_interface #(.BASE(10'h300)) dut (.*);

  assign rdata = {4'hA, rd_port};

  int checks = 0, failures = 0;
  int n_wr = 0, n_rd = 0;
  logic [3:0] last_port;
  logic [7:0] last_data;
  always @(posedge clk) begin
    if (wr_stb) begin n_wr++; last_port = port; last_data = wdata; end
    if (rd_stb) begin n_rd++; last_port = port; end
  end

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

  task automatic io_write(input logic [9:0] a, input logic [7:0] d, input logic dma);
    @(negedge clk); sa = a; sd_in = d; aen = dma;
    @(negedge clk); iow_n = 0;
    repeat (4) @(negedge clk);
    iow_n = 1;
    repeat (5) @(negedge clk);
    sa = 10'h000; sd_in = 8'h5A; aen = 0;
  endtask

  task automatic io_read(input logic [9:0] a, input logic dma, output logic [7:0] d, output logic oe);
    @(negedge clk); sa = a; aen = dma;
    @(negedge clk); ior_n = 0;
    repeat (3) @(negedge clk);
    d = sd_out; oe = sd_oe;
    @(negedge clk); ior_n = 1;
    #1 chk(!sd_oe, "bus released after read");
    repeat (5) @(negedge clk);
    sa = 10'h000; aen = 0;
  endtask

  initial begin
    logic [7:0] d;
    logic oe;
    sa = 0; sd_in = 0; iow_n = 1; ior_n = 1; aen = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 40; i++) begin
      int w0;
      logic [3:0] off;
      logic [7:0] dat;
      off = 4'($urandom); dat = 8'($urandom);
      w0 = n_wr;
      io_write(10'h300 + 10'(off), dat, 1'b0);
      chk(n_wr == w0 + 1, "one write strobe");
      chk(last_port == off && last_data == dat, "write offset/data");
      w0 = n_wr;
      io_write(10'h310 + 10'(off), dat, 1'b0);
      chk(n_wr == w0, "no strobe outside window");
      io_write(10'h300 + 10'(off), dat, 1'b1);
      chk(n_wr == w0, "no strobe with AEN");
      w0 = n_rd;
      io_read(10'h300 + 10'(off), 1'b0, d, oe);
      chk(oe && d == {4'hA, off}, "read data");
      chk(n_rd == w0 + 1 && last_port == off, "one read strobe");
      w0 = n_rd;
      io_read(10'h2F0 + 10'(off), 1'b0, d, oe);
      chk(!oe && n_rd == w0, "read outside window ignored");
      io_read(10'h300 + 10'(off), 1'b1, d, oe);
      chk(!oe && n_rd == w0, "read with AEN ignored");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

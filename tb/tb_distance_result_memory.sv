// Testbench for distance_result_memory: writes all 256 entries, reads them
// back on both read ports at different addresses in the same clock, and
// overwrites entries while reading others. Expected data come from a
// reference array; reads return one clock after the address.
module tb_distance_result_memory;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we;
  logic [7:0] waddr, dsp_addr, host_addr;
  logic [15:0] wdata, dsp_rdata, host_rdata;
  logic [15:0] ref_mem [256];

  distance_result_memory dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; wdata = 0; dsp_addr = 0; host_addr = 0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); we = 1; waddr = 8'(i); wdata = 16'($urandom); ref_mem[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 500; i++) begin
      int da, ha;
      logic [15:0] ed, eh;
      da = $urandom_range(255); ha = $urandom_range(255);
      @(negedge clk);
      dsp_addr = 8'(da); host_addr = 8'(ha);
      ed = ref_mem[da]; eh = ref_mem[ha];
      we = (i % 3 == 0); waddr = 8'($urandom); wdata = 16'($urandom);
      if (we) ref_mem[waddr] = wdata;
      @(negedge clk);
      we = 0;
      checks += 2;
      if (dsp_rdata !== ed) begin failures++; $display("dsp %0d %h exp %h", da, dsp_rdata, ed); end
      if (host_rdata !== eh) begin failures++; $display("host %0d %h exp %h", ha, host_rdata, eh); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

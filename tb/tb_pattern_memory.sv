// Testbench for pattern_memory (reduced depth): writes random bytes through
// port A, reads them back through port A and the DSP port B, and checks
// that port A does nothing while a_en is low. A reference array kept here
// gives the expected data; reads return one clock after the address.
module tb_pattern_memory;
  localparam int DEPTH = 1024;
  logic clk = 0;
  always #5 clk = ~clk;
  logic a_en, a_we;
  logic [9:0] a_addr, b_addr;
  logic [7:0] a_wdata, a_rdata, b_rdata;
  logic [7:0] ref_mem [DEPTH];

  pattern_memory #(.DEPTH(DEPTH), .WIDTH(8)) dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a_en = 0; a_we = 0; a_addr = 0; b_addr = 0; a_wdata = 0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      a_en = 1; a_we = 1; a_addr = 10'(i); a_wdata = 8'($urandom); ref_mem[i] = a_wdata;
    end
    // disabled port A must not write
    @(negedge clk); a_en = 0; a_we = 1; a_addr = 10'd5; a_wdata = ~ref_mem[5];
    @(negedge clk); a_we = 0;
    for (int i = 0; i < 400; i++) begin
      int ra, rb;
      ra = $urandom_range(DEPTH - 1); rb = (i == 0) ? 5 : $urandom_range(DEPTH - 1);
      @(negedge clk); a_en = 1; a_addr = 10'(ra); b_addr = 10'(rb);
      @(negedge clk); a_en = 0;
      checks += 2;
      if (a_rdata !== ref_mem[ra]) begin failures++; $display("A %0d %h exp %h", ra, a_rdata, ref_mem[ra]); end
      if (b_rdata !== ref_mem[rb]) begin failures++; $display("B %0d %h exp %h", rb, b_rdata, ref_mem[rb]); end
    end
    // held output while a_en is low
    @(negedge clk); a_en = 1; a_addr = 10'd7;
    @(negedge clk); a_en = 0; a_addr = 10'd8;
    @(negedge clk);
    checks++; if (a_rdata !== ref_mem[7]) begin failures++; $display("A not held"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Testbench for codebook_memory (reduced depth): fills it through port A,
// lets port B (the DSP) rewrite random words while port A reads, checks a
// same-address write from both ports (port B wins) and compares every read
// with a reference array. Reads return one clock after the address and give
// the old word when the same clock writes it.
module tb_codebook_memory;
  localparam int DEPTH = 512;
  logic clk = 0;
  always #5 clk = ~clk;
  logic a_en, a_we, b_en, b_we;
  logic [8:0] a_addr, b_addr;
  logic [15:0] a_wdata, a_rdata, b_wdata, b_rdata;
  logic [15:0] ref_mem [DEPTH];

  codebook_memory #(.DEPTH(DEPTH), .WIDTH(16)) dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a_en = 0; a_we = 0; b_en = 0; b_we = 0; a_addr = 0; b_addr = 0; a_wdata = 0; b_wdata = 0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      a_en = 1; a_we = 1; a_addr = 9'(i); a_wdata = 16'($urandom); ref_mem[i] = a_wdata;
    end
    @(negedge clk); a_we = 0; a_en = 0;
    for (int i = 0; i < 600; i++) begin
      int ra, rb;
      logic [15:0] ea, eb;
      ra = $urandom_range(DEPTH - 1);
      rb = (i % 4 == 0) ? ra : $urandom_range(DEPTH - 1);
      @(negedge clk);
      a_en = 1; a_addr = 9'(ra); a_we = (i % 7 == 0); a_wdata = 16'($urandom);
      b_en = 1; b_addr = 9'(rb); b_we = (i % 2 == 0); b_wdata = 16'($urandom);
      ea = ref_mem[ra]; eb = ref_mem[rb];
      if (a_we) ref_mem[ra] = a_wdata;
      if (b_we) ref_mem[rb] = b_wdata;      // port B last: it wins
      @(negedge clk);
      a_en = 0; b_en = 0; a_we = 0; b_we = 0;
      checks += 2;
      if (a_rdata !== ea) begin failures++; $display("A %0d %h exp %h", ra, a_rdata, ea); end
      if (b_rdata !== eb) begin failures++; $display("B %0d %h exp %h", rb, b_rdata, eb); end
    end
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); a_en = 1; a_addr = 9'(i);
      @(negedge clk); a_en = 0;
      checks++;
      if (a_rdata !== ref_mem[i]) begin failures++; $display("final %0d %h exp %h", i, a_rdata, ref_mem[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Testbench for random_number_register: checks the reset seed, that the
// value holds without `advance`, each step against a bit-serial Fibonacci
// form of the same polynomial computed here, and the full 65535 period.
module tb_random_number_register;
  logic clk = 0, rst_n = 0, advance = 0;
  logic [15:0] rnd;
  always #5 clk = ~clk;

  random_number_register dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference: Galois step written out bit by bit
  function automatic logic [15:0] ref_step(input logic [15:0] s);
    logic [15:0] n;
    logic fb;
    fb = s[0];
    n  = {1'b0, s[15:1]};
    if (fb) begin n[15] ^= 1; n[13] ^= 1; n[12] ^= 1; n[10] ^= 1; end
    return n;
  endfunction

  initial begin
    logic [15:0] model, first;
    int period;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    checks++; if (rnd !== 16'hACE1) begin failures++; $display("seed %h", rnd); end
    repeat (5) @(posedge clk);
    checks++; if (rnd !== 16'hACE1) begin failures++; $display("moved without advance"); end
    model = rnd;
    for (int i = 0; i < 200; i++) begin
      advance <= 1; @(posedge clk); advance <= 0; @(posedge clk);
      model = ref_step(model);
      checks++; if (rnd !== model) begin failures++; $display("step %0d %h exp %h", i, rnd, model); end
    end
    first  = rnd;
    period = 0;
    advance <= 1;
    do begin
      @(posedge clk); #1 period++;
    end while (rnd != first && period < 70000);
    advance <= 0;
    checks++; if (period != 65535) begin failures++; $display("period %0d", period); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

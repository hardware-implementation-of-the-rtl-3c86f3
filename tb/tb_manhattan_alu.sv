// Testbench for manhattan_alu: random 64-pixel vectors, including all-black
// against all-0xFFFF extremes, streamed back to back. The expected 22-bit sum
// and its 16 MSBs are computed here from the pixel values; the result must
// appear exactly two clocks after the last pixel enters. Inputs change on
// the falling clock edge.
module tb_manhattan_alu;
  import ngas_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_first, in_last, dist_valid;
  logic [7:0]  x;
  logic [15:0] w;
  logic [21:0] dist_full;
  logic [15:0] dist_msb;

  manhattan_alu dut (.*);

  int checks = 0, failures = 0;
  int unsigned exp_q[$];
  int cyc = 0, last_cyc[$];
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // checker
  always @(posedge clk) if (rst_n && dist_valid) begin
    int unsigned e;
    int lc;
    e  = exp_q.pop_front();
    lc = last_cyc.pop_front();
    checks += 3;
    if (dist_full != 22'(e)) begin failures++; $display("full %0d exp %0d", dist_full, e); end
    if (dist_msb != 16'(e >> 6)) begin failures++; $display("msb %h exp %h", dist_msb, e >> 6); end
    if (cyc - lc != 2) begin failures++; $display("latency %0d", cyc - lc); end
  end

  task automatic send_vec(input int kind, input int gap);
    int unsigned s = 0;
    for (int j = 0; j < 64; j++) begin
      logic [7:0] xx; logic [15:0] ww; int unsigned a, b;
      case (kind)
        0: begin xx = 8'h00; ww = 16'hFFFF; end
        1: begin xx = 8'hFF; ww = 16'h0000; end
        2: begin xx = 8'h12; ww = 16'h1212; end
        default: begin xx = 8'($urandom); ww = 16'($urandom); end
      endcase
      a = {xx, xx}; b = ww;
      s += (a > b) ? a - b : b - a;
      @(negedge clk);
      in_valid = 1; in_first = (j == 0); in_last = (j == 63); x = xx; w = ww;
      if (j == 63) begin exp_q.push_back(s); last_cyc.push_back(cyc); end
      if (gap > 0 && j == 31) begin
        @(negedge clk);
        in_valid = 0; in_first = 0; in_last = 0;
        repeat (gap - 1) @(negedge clk);
      end
    end
    @(negedge clk);
    in_valid = 0; in_first = 0; in_last = 0;
  endtask

  initial begin
    in_valid = 0; in_first = 0; in_last = 0; x = 0; w = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    send_vec(0, 0);
    send_vec(1, 0);
    send_vec(2, 0);
    for (int n = 0; n < 40; n++) send_vec(3, (n % 3 == 0) ? 2 : 0);
    repeat (5) @(posedge clk);
    if (exp_q.size() != 0) begin failures++; $display("missing results"); end
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

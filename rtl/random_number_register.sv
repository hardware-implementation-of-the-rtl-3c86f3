// Random-number register for sample selection during training.
//
// The DSP reads this 16-bit register as one of its input ports, and the
// ALU-control unit uses the same value to pick the training sample. The
// original board only says that such a register imports a random number;
// how the number is made is this design's choice: a maximal-length 16-bit
// Galois LFSR (taps 16, 14, 13, 11, period 65535) that steps once for every
// clock in which `advance` is high. It is loaded with a non-zero SEED at
// reset. `rnd` is the register itself, so a step is visible the next clock.
module random_number_register #(
  parameter int unsigned  WIDTH = 16,
  parameter logic [15:0]  SEED  = 16'hACE1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             advance,
  output logic [WIDTH-1:0] rnd
);

  localparam logic [15:0] TAPS = 16'hB400;  // x^16 + x^14 + x^13 + x^11 + 1

  logic [15:0] lfsr_q;

  always_ff @(posedge clk) begin
    if (!rst_n)       lfsr_q <= (SEED == '0) ? 16'h0001 : SEED;
    else if (advance) lfsr_q <= (lfsr_q >> 1) ^ (lfsr_q[0] ? TAPS : 16'h0000);
  end

  assign rnd = WIDTH'(lfsr_q);

endmodule

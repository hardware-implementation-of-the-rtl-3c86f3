// Pattern memory: the training and test image blocks.
//
// Holds up to 1024 vectors of 64 gray-level pixels, 8 bits each, stored
// vector after vector (address = pattern * 64 + pixel), as on the original
// board. Port A is the shared port reached through the data-bus buffers by
// either the PC (loading) or the ALU-control unit (distance computation);
// port B is a read port for the DSP, which needs the sample to adapt the
// codevectors. That second port and the one-clock synchronous reads on both
// ports are this design's choices. Contents are not reset.
module pattern_memory #(
  parameter int unsigned DEPTH = 65536,
  parameter int unsigned WIDTH = 8,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  // port A: PC or ALU side
  input  logic             a_en,
  input  logic             a_we,
  input  logic [AW-1:0]    a_addr,
  input  logic [WIDTH-1:0] a_wdata,
  output logic [WIDTH-1:0] a_rdata,
  // port B: DSP read
  input  logic [AW-1:0]    b_addr,
  output logic [WIDTH-1:0] b_rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_en) begin
      if (a_we) mem[a_addr] <= a_wdata;
      a_rdata <= mem[a_addr];
    end
  end

  always_ff @(posedge clk) b_rdata <= mem[b_addr];

endmodule

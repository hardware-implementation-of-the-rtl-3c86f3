// Codebook (prototype) memory: the codevectors being trained.
//
// Holds up to 256 codevectors of 64 components, 16 bits each (address =
// codevector * 64 + component), as on the original board. Port A is reached
// through the data-bus buffers by the PC (loading, read-back) or by the
// ALU-control unit (distance computation). Port B belongs to the DSP, which
// reads and rewrites codevectors when it applies the adaptation step, so it
// can work while the ALU reads for the next sample. Two ports, synchronous
// one-clock reads (read-before-write) and port B winning a same-address
// write are this design's choices. Contents are not reset.
module codebook_memory #(
  parameter int unsigned DEPTH = 16384,
  parameter int unsigned WIDTH = 16,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  // port A: PC or ALU side
  input  logic             a_en,
  input  logic             a_we,
  input  logic [AW-1:0]    a_addr,
  input  logic [WIDTH-1:0] a_wdata,
  output logic [WIDTH-1:0] a_rdata,
  // port B: DSP
  input  logic             b_en,
  input  logic             b_we,
  input  logic [AW-1:0]    b_addr,
  input  logic [WIDTH-1:0] b_wdata,
  output logic [WIDTH-1:0] b_rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_en) a_rdata <= mem[a_addr];
    if (b_en) b_rdata <= mem[b_addr];
    if (a_en && a_we && !(b_en && b_we && b_addr == a_addr)) mem[a_addr] <= a_wdata;
    if (b_en && b_we) mem[b_addr] <= b_wdata;
  end

endmodule

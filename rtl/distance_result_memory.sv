// Distance-result memory: the distance of every codevector to the sample.
//
// The ALU-control unit writes one 16-bit distance per codevector (address =
// codevector index); the DSP reads them to sort the codevectors, and the PC
// can read them back in board-testing mode. One write port and two
// synchronous read ports (one clock) are this design's choice; the original
// board only names the memory. 256 entries match the largest codebook.
module distance_result_memory #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned WIDTH = 16,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    dsp_addr,
  output logic [WIDTH-1:0] dsp_rdata,
  input  logic [AW-1:0]    host_addr,
  output logic [WIDTH-1:0] host_rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    dsp_rdata  <= mem[dsp_addr];
    host_rdata <= mem[host_addr];
  end

endmodule

// Data-bus buffers: isolation of the pattern and prototype bus segments.
//
// The board data bus is cut by buffers into a segment for the pattern memory
// and a segment for the prototype (codebook) memory. With the buffers open
// the two segments are isolated and the ALU side reads both memories in the
// same clock, each through its own segment; with the buffers closed both
// segments join the PC side, which then loads or reads back either memory.
// The original board builds this from bus buffers; here each buffer is a
// multiplexer on the memory port and a gate on the read data returned to
// each side (a side that does not own the segment sees zero). The PC asks
// for the segments with host_sel (state register bit); it gets them
// (host_owns) only once the ALU is not in the middle of a distance
// (alu_hold low), so a distance is never cut in two. alu_grant tells the
// ALU-control unit it may start the next distance. PC accesses made while
// host_owns is still low are dropped. The hand-over rule is this design's
// choice. Purely combinational.
module data_bus_buffers
  import ngas_pkg::*;
(
  input  logic               host_sel,
  input  logic               alu_hold,
  output logic               alu_grant,
  output logic               host_owns,
  // PC side (I/O-control unit)
  input  logic               host_pat_en,
  input  logic               host_pat_we,
  input  logic [PAT_AW-1:0]  host_pat_addr,
  input  logic [PIX_W-1:0]   host_pat_wdata,
  output logic [PIX_W-1:0]   host_pat_rdata,
  input  logic               host_cb_en,
  input  logic               host_cb_we,
  input  logic [CB_AW-1:0]   host_cb_addr,
  input  logic [CV_W-1:0]    host_cb_wdata,
  output logic [CV_W-1:0]    host_cb_rdata,
  // ALU side (ALU-control unit): read only, both memories at once
  input  logic               alu_rd,
  input  logic [PAT_AW-1:0]  alu_pat_addr,
  input  logic [CB_AW-1:0]   alu_cb_addr,
  output logic [PIX_W-1:0]   alu_x,
  output logic [CV_W-1:0]    alu_w,
  // memory ports
  output logic               pat_en,
  output logic               pat_we,
  output logic [PAT_AW-1:0]  pat_addr,
  output logic [PIX_W-1:0]   pat_wdata,
  input  logic [PIX_W-1:0]   pat_rdata,
  output logic               cb_en,
  output logic               cb_we,
  output logic [CB_AW-1:0]   cb_addr,
  output logic [CV_W-1:0]    cb_wdata,
  input  logic [CV_W-1:0]    cb_rdata
);

  assign alu_grant = !host_sel;
  assign host_owns = host_sel && !alu_hold;

  always_comb begin
    if (host_owns) begin
      pat_en    = host_pat_en;
      pat_we    = host_pat_we;
      pat_addr  = host_pat_addr;
      pat_wdata = host_pat_wdata;
      cb_en     = host_cb_en;
      cb_we     = host_cb_we;
      cb_addr   = host_cb_addr;
      cb_wdata  = host_cb_wdata;
    end else begin
      pat_en    = alu_rd;
      pat_we    = 1'b0;
      pat_addr  = alu_pat_addr;
      pat_wdata = '0;
      cb_en     = alu_rd;
      cb_we     = 1'b0;
      cb_addr   = alu_cb_addr;
      cb_wdata  = '0;
    end
    host_pat_rdata = host_owns ? pat_rdata : '0;
    host_cb_rdata  = host_owns ? cb_rdata  : '0;
    alu_x          = host_owns ? '0 : pat_rdata;
    alu_w          = host_owns ? '0 : cb_rdata;
  end

endmodule

// DSP port interface: the I/O ports through which the DSP sees the board.
//
// The DSP reads five input ports and writes two output ports, addressed by
// io_addr with one-clock io_rd / io_wr strobes (numbers in ngas_pkg):
//   IN 0  state register (8 bits, from the PC)
//   IN 1  random-number register (16 bits, for sample selection)
//   IN 2  distance register: the last distance the ALU produced, 16 MSBs
//   IN 3  index of the sample being processed
//   IN 4  status: bit 15 ALU busy, bit 14 a distance arrived since the last
//         IN 2, bit 13 training iterations used up, bits 8:0 distances
//         delivered for the current sample
//   IN 5  training iterations left
//   OUT 0 control register (8 bits); writing bit 0 starts the ALU on a new
//         sample (alu_start pulses, the bit is not kept), bit 1 interrupts
//         the PC, bit 2 marks the winner index valid
//   OUT 1 winner index register (16 bits), read by the PC
// The state, random, distance, control and winner registers and their widths
// are those of the original board; IN 3 to IN 5, the port numbers and the
// control bits are this design's choices. io_rdata is combinational from
// io_addr. The distance register loads in the clock dist_load is high.
module dsp_port_interface
  import ngas_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [2:0]            io_addr,
  input  logic                  io_rd,
  input  logic                  io_wr,
  input  logic [15:0]           io_wdata,
  output logic [15:0]           io_rdata,
  // board side
  input  state_reg_t            state,
  input  logic [15:0]           rnd,
  input  logic                  dist_load,
  input  logic [DIST_W-1:0]     dist_in,
  input  logic [PAT_IDX_W-1:0]  cur_pattern,
  input  logic                  busy,
  input  logic [CV_IDX_W:0]     dist_count,
  input  logic [15:0]           iter_left,
  input  logic                  train_done,
  output ctrl_reg_t             ctrl_q,
  output logic [15:0]           winner_q,
  output logic                  alu_start
);

  logic [DIST_W-1:0] dist_q;
  logic              dist_new_q;
  logic              ctrl_wr;

  assign ctrl_wr   = io_wr && io_addr == DSP_OUT_CTRL;
  assign alu_start = ctrl_wr && io_wdata[0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      dist_q     <= '0;
      dist_new_q <= 1'b0;
      ctrl_q     <= '0;
      winner_q   <= '0;
    end else begin
      if (dist_load) begin
        dist_q     <= dist_in;
        dist_new_q <= 1'b1;
      end else if (io_rd && io_addr == DSP_IN_DIST) begin
        dist_new_q <= 1'b0;
      end
      if (ctrl_wr) begin
        ctrl_q           <= ctrl_reg_t'(io_wdata[7:0]);
        ctrl_q.alu_start <= 1'b0;
      end
      if (io_wr && io_addr == DSP_OUT_WINNER) winner_q <= io_wdata;
    end
  end

  always_comb begin
    unique case (io_addr)
      DSP_IN_STATE:   io_rdata = {8'h00, state};
      DSP_IN_RANDOM:  io_rdata = rnd;
      DSP_IN_DIST:    io_rdata = dist_q;
      DSP_IN_PATTERN: io_rdata = 16'(cur_pattern);
      DSP_IN_STATUS:  io_rdata = {busy, dist_new_q, train_done, 4'b0, 9'(dist_count)};
      DSP_IN_ITER:    io_rdata = iter_left;
      default:        io_rdata = 16'h0000;
    endcase
  end

endmodule

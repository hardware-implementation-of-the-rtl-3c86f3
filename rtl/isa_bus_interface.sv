// ISA bus interface: turns PC I/O cycles into one-clock strobes.
//
// The board answers 16 I/O addresses starting at BASE (the port map is in
// ngas_pkg). The board clock is the ISA bus clock, but IOW#/IOR# are still
// taken through two flip-flops. While IOW# is low the address offset and
// data byte are captured every clock; when IOW# returns high, wr_stb pulses
// for one clock with that offset and byte. A read drives sd_out from `rdata`
// (chosen by the I/O-control unit from rd_port, the live address offset)
// for as long as IOR# is low, and rd_stb pulses once when IOR# returns high,
// so that an auto-incrementing data port steps after the byte was taken.
// Cycles with AEN high (DMA) are ignored. The original board reaches the PC
// through an ISA interface with PPI chips; this strobe logic, the base
// address and the end-of-cycle strobes are this design's choices.
module isa_bus_interface #(
  parameter logic [9:0]  BASE        = 10'h300,
  parameter int unsigned NPORTS_LOG2 = 4
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [9:0]             sa,
  input  logic [7:0]             sd_in,
  output logic [7:0]             sd_out,
  output logic                   sd_oe,
  input  logic                   iow_n,
  input  logic                   ior_n,
  input  logic                   aen,
  output logic                   wr_stb,
  output logic                   rd_stb,
  output logic [NPORTS_LOG2-1:0] port,
  output logic [7:0]             wdata,
  output logic [NPORTS_LOG2-1:0] rd_port,
  input  logic [7:0]             rdata
);

  logic hit;
  assign hit = !aen && (sa[9:NPORTS_LOG2] == BASE[9:NPORTS_LOG2]);

  logic [2:0] iow_s, ior_s;    // synchroniser + previous value (active high)
  logic       wr_hit_q, rd_hit_q;
  logic [NPORTS_LOG2-1:0] port_q;
  logic [7:0] data_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      iow_s    <= '0;
      ior_s    <= '0;
      wr_hit_q <= 1'b0;
      rd_hit_q <= 1'b0;
      port_q   <= '0;
      data_q   <= '0;
    end else begin
      iow_s <= {iow_s[1:0], !iow_n};
      ior_s <= {ior_s[1:0], !ior_n};
      if (iow_s[1]) begin
        wr_hit_q <= hit;
        port_q   <= sa[NPORTS_LOG2-1:0];
        data_q   <= sd_in;
      end else if (ior_s[1]) begin
        rd_hit_q <= hit;
        port_q   <= sa[NPORTS_LOG2-1:0];
      end
    end
  end

  assign wr_stb  = iow_s[2] && !iow_s[1] && wr_hit_q;
  assign rd_stb  = ior_s[2] && !ior_s[1] && rd_hit_q;
  assign port    = port_q;
  assign wdata   = data_q;
  assign rd_port = sa[NPORTS_LOG2-1:0];
  assign sd_oe   = !ior_n && hit;
  assign sd_out  = sd_oe ? rdata : 8'h00;

endmodule

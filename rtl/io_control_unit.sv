// I/O-control unit: data transfers between the PC and the board memories.
//
// The PC writes the 8-bit state register (mode, memory bank, bus owner,
// software flags; layout in ngas_pkg), the codebook size, the number of
// samples and the number of training iterations, sets a 16-bit transfer address, and then streams bytes through
// the data port. Each data access moves one pattern pixel, or one byte of a
// 16-bit codebook or distance word (low byte first); the address steps
// after every pixel or every second byte. Writes reach a memory only while
// the state register gives the PC the memory buses; the distance bank is
// read-only. To answer ISA reads at once, the word at the transfer address
// is fetched into a latch whenever the address or the state register
// changes. Board testing reads back the memories, the DSP control register,
// the winner index and a status byte.
//
// The original board states what this unit does (PC-to-memory transfers and
// back, state register of 8 bits); the port map, byte order, prefetch and
// register layout are this design's choices. Strobes come one clock wide
// from the ISA interface; a memory access is issued in the strobe's clock
// and its data are latched two clocks later.
module io_control_unit
  import ngas_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  // decoded PC accesses
  input  logic                  wr_stb,
  input  logic                  rd_stb,
  input  logic [3:0]            port,
  input  logic [7:0]            wdata,
  input  logic [3:0]            rd_port,
  output logic [7:0]            rdata,
  // board registers
  output state_reg_t            state_q,
  output logic [CV_IDX_W-1:0]   num_cv_m1,
  output logic [PAT_IDX_W:0]    num_pat,
  output logic [15:0]           num_iter,
  input  logic [15:0]           winner,
  input  logic [7:0]            ctrl,
  input  logic [7:0]            status,
  // host side of the memories
  output logic                  pat_en,
  output logic                  pat_we,
  output logic [PAT_AW-1:0]     pat_addr,
  output logic [PIX_W-1:0]      pat_wdata,
  input  logic [PIX_W-1:0]      pat_rdata,
  output logic                  cb_en,
  output logic                  cb_we,
  output logic [CB_AW-1:0]      cb_addr,
  output logic [CV_W-1:0]       cb_wdata,
  input  logic [CV_W-1:0]       cb_rdata,
  output logic [CV_IDX_W-1:0]   dist_addr,
  input  logic [DIST_W-1:0]     dist_rdata
);

  logic [15:0] addr_q;
  logic        hi_q;          // next byte of a 16-bit word is the high one
  logic [7:0]  lo_q;          // low byte waiting for its high byte
  logic [15:0] word_q;        // prefetched word at addr_q
  logic        fetch_q, capture_q;
  bank_e       fetch_bank_q;

  logic data_wr, data_rd, wide_bank, step;
  assign data_wr   = wr_stb && port == PORT_DATA;
  assign data_rd   = rd_stb && port == PORT_DATA;
  assign wide_bank = state_q.bank != BANK_PATTERN;
  // address steps after a pixel, or after the high byte of a word
  assign step      = (data_wr || data_rd) && (!wide_bank || hi_q);

  // memory requests
  always_comb begin
    pat_en    = 1'b0;
    pat_we    = 1'b0;
    cb_en     = 1'b0;
    cb_we     = 1'b0;
    pat_addr  = addr_q[PAT_AW-1:0];
    cb_addr   = addr_q[CB_AW-1:0];
    dist_addr = addr_q[CV_IDX_W-1:0];
    pat_wdata = wdata;
    cb_wdata  = {wdata, lo_q};
    if (data_wr && state_q.bank == BANK_PATTERN) begin
      pat_en = 1'b1;
      pat_we = 1'b1;
    end else if (data_wr && state_q.bank == BANK_CODEBOOK && hi_q) begin
      cb_en  = 1'b1;
      cb_we  = 1'b1;
    end else if (fetch_q) begin
      pat_en = (state_q.bank == BANK_PATTERN);
      cb_en  = (state_q.bank == BANK_CODEBOOK);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q      <= '0;
      num_cv_m1    <= '1;
      num_pat      <= (PAT_IDX_W+1)'(MAX_PAT);
      num_iter     <= '1;
      addr_q       <= '0;
      hi_q         <= 1'b0;
      lo_q         <= '0;
      word_q       <= '0;
      fetch_q      <= 1'b0;
      capture_q    <= 1'b0;
      fetch_bank_q <= BANK_PATTERN;
    end else begin
      fetch_q   <= 1'b0;
      capture_q <= fetch_q;
      if (fetch_q) fetch_bank_q <= state_q.bank;
      if (capture_q) begin
        unique case (fetch_bank_q)
          BANK_PATTERN:  word_q <= {8'h00, pat_rdata};
          BANK_CODEBOOK: word_q <= cb_rdata;
          BANK_DISTANCE: word_q <= dist_rdata;
          default:       word_q <= '0;
        endcase
      end
      if (wr_stb) begin
        unique case (port)
          PORT_ADDR_LO: begin addr_q[7:0]  <= wdata; hi_q <= 1'b0; fetch_q <= 1'b1; end
          PORT_ADDR_HI: begin addr_q[15:8] <= wdata; hi_q <= 1'b0; fetch_q <= 1'b1; end
          PORT_STATE:   begin state_q <= state_reg_t'(wdata); hi_q <= 1'b0; fetch_q <= 1'b1; end
          PORT_NCV:     num_cv_m1 <= wdata;
          PORT_NPAT_LO: num_pat[7:0] <= wdata;
          PORT_NPAT_HI: num_pat[PAT_IDX_W:8] <= wdata[PAT_IDX_W-8:0];
          PORT_ITER_LO: num_iter[7:0]  <= wdata;
          PORT_ITER_HI: num_iter[15:8] <= wdata;
          default: ;
        endcase
      end
      if (data_wr && wide_bank && !hi_q) lo_q <= wdata;
      if (data_wr || data_rd) begin
        if (wide_bank) hi_q <= !hi_q;
        if (step) begin
          addr_q  <= addr_q + 1'b1;
          fetch_q <= 1'b1;
        end
      end
    end
  end

  // byte returned to the PC
  always_comb begin
    unique case (rd_port)
      PORT_DATA:    rdata = (wide_bank && hi_q) ? word_q[15:8] : word_q[7:0];
      PORT_ADDR_LO: rdata = addr_q[7:0];
      PORT_ADDR_HI: rdata = addr_q[15:8];
      PORT_STATE:   rdata = state_q;
      PORT_WIN_LO:  rdata = winner[7:0];
      PORT_WIN_HI:  rdata = winner[15:8];
      PORT_CTRL:    rdata = ctrl;
      PORT_STATUS:  rdata = status;
      PORT_NCV:     rdata = num_cv_m1;
      PORT_NPAT_LO: rdata = num_pat[7:0];
      PORT_NPAT_HI: rdata = 8'(num_pat[PAT_IDX_W:8]);
      PORT_ITER_LO: rdata = num_iter[7:0];
      PORT_ITER_HI: rdata = num_iter[15:8];
      default:      rdata = 8'h00;
    endcase
  end

endmodule

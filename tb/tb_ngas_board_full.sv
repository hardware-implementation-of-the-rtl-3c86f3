// Full-size run of the end-to-end board test: the largest codebook (256
// codevectors) and the largest pattern set (1024 samples of 64 pixels) are
// loaded over ISA, two training samples are processed against all 256
// codevectors, and three samples are coded at run time with their winners
// read by the PC. The board is instantiated with its default parameters
// inside tb_ngas_board.
module tb_ngas_board_full;
  tb_ngas_board #(.K(256), .N(1024), .T(2), .R(3), .ADAPT_RANKS(4)) u_run ();
endmodule

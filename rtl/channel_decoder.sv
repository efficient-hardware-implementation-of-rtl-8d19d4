// channel_decoder: the receiver's 12 MHz back end. Each equalised QPSK
// symbol is de-mapped by the signs of I and Q, the 96 bits of a symbol are
// de-interleaved in a double buffer, and the Viterbi decoder turns the 48
// coded pairs back into the 48 data bits of the frame. bit_out is valid
// while out_ce is high; with a continuous input the decoder delivers one
// bit per clock (12 Mb/s).
module channel_decoder
  import cofdm_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  cplx_t sym,
  input  logic  sym_valid,
  output logic  bit_out,
  output logic  out_ce
);
  logic [1:0] dibit, pair;
  logic       pair_valid;

  qpsk_demapper u_dm (.sym, .bits(dibit));

  interleaver #(.N_CBPS(N_CBPS), .INVERSE(1'b1)) u_dil (
    .clk, .rst_n, .wr_en(sym_valid), .wr_bits(dibit),
    .rd_valid(pair_valid), .rd_bits(pair), .frame_start());

  viterbi_decoder #(.FRAME(N_DATA), .MW(8)) u_vit (
    .clk, .rst_n, .in_valid(pair_valid), .a(pair[0]), .b(pair[1]),
    .out_valid(out_ce), .bit_out);
endmodule

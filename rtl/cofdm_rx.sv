// cofdm_rx: COFDM receiver with two clock domains.
//
// 20 MHz domain: the time synchronizer finds a packet with the short
// preamble auto-correlator and its symbol timing with the long preamble
// cross-correlator; it starts the demodulator, which drops the cyclic
// prefixes and runs the FFT. The channel equalizer corrects the phase
// from the pilots, estimates the channel from the second long training
// symbol and equalises the data symbols. Their 48 data sub-carriers go
// through an asynchronous FIFO to the 12 MHz domain, where the channel
// decoder de-maps, de-interleaves and Viterbi-decodes them into 48 bits per
// OFDM symbol. A packet carries n_syms data symbols (an input, as the
// processor has no signalling field). rx_valid qualifies the input samples.
module cofdm_rx
  import cofdm_pkg::*;
#(
  parameter int FIFO_AW = 7
) (
  input  logic        clk20,
  input  logic        rst20_n,
  input  logic        rx_valid,
  input  cplx_t       rx_din,
  input  logic [15:0] n_syms,
  output logic        sync_start,
  output logic        sync_detect,
  output logic        eq_valid,
  output cplx_t       eq_dout,
  output logic        fifo_overflow,
  input  logic        clk12,
  input  logic        rst12_n,
  output logic        bit_out,
  output logic        out_ce
);
  logic       dm_busy, dm_flush, dm_valid, dm_first;
  cplx_t      dm_dout;
  logic [5:0] dm_k;
  logic [15:0] dm_sym;

  time_sync u_sync (
    .clk(clk20), .rst_n(rst20_n), .en(rx_valid), .din(rx_din), .demod_busy(dm_busy && !dm_flush),
    .start(sync_start), .detected(sync_detect), .peak());

  demodulator u_dem (
    .clk(clk20), .rst_n(rst20_n), .en(rx_valid), .din(rx_din), .start(sync_start), .n_syms,
    .busy(dm_busy), .flushing(dm_flush), .out_valid(dm_valid), .out_first(dm_first), .dout(dm_dout), .out_k(dm_k),
    .out_sym(dm_sym));

  channel_equalizer u_eq (
    .clk(clk20), .rst_n(rst20_n), .in_valid(dm_valid), .in_first(dm_sym == 16'd0), .din(dm_dout),
    .in_k(dm_k), .out_valid(eq_valid), .dout(eq_dout));

  logic  f_full, f_empty;
  cplx_t f_dout;

  async_fifo #(.DW(2 * SW), .AW(FIFO_AW)) u_fifo (
    .wr_clk(clk20), .wr_rst_n(rst20_n), .wr_en(eq_valid && !f_full), .din(eq_dout), .full(f_full),
    .wr_count(), .rd_clk(clk12), .rd_rst_n(rst12_n), .rd_en(!f_empty), .dout(f_dout),
    .empty(f_empty), .rd_count());

  always_ff @(posedge clk20 or negedge rst20_n)
    if (!rst20_n) fifo_overflow <= 1'b0;
    else          fifo_overflow <= eq_valid && f_full;

  channel_decoder u_dec (
    .clk(clk12), .rst_n(rst12_n), .sym(f_dout), .sym_valid(!f_empty), .bit_out, .out_ce);
endmodule

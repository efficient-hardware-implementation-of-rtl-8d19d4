// cofdm_tx: COFDM transmitter with two clock domains.
//
// 12 MHz domain: the channel coder turns the bit stream (bit_in with
// enable) into QPSK symbols, one per clock, which enter an asynchronous
// FIFO. 20 MHz domain: once the FIFO holds a whole OFDM symbol (48 QPSK
// symbols) a packet starts. The preamble ROM plays 320 training samples and
// the multiplexer then switches, without a gap, to the modulator, which
// sends n_syms data symbols of 80 samples each. The modulator is started
// early enough that its first sample arrives right after the preamble.
//
// tx_ready (12 MHz) is high while the FIFO can take another 48-bit frame;
// the source should only start a frame when it is high. tx_valid marks the
// samples of a packet; between packets the output is zero.
module cofdm_tx
  import cofdm_pkg::*;
#(
  parameter int FIFO_AW = 8
) (
  input  logic        clk12,
  input  logic        rst12_n,
  input  logic        bit_in,
  input  logic        enable,
  output logic        tx_ready,
  input  logic        clk20,
  input  logic        rst20_n,
  input  logic [15:0] n_syms,
  output logic        tx_valid,
  output cplx_t       tx_dout,
  output logic        tx_busy,
  output logic        underflow
);
  // ---------------- 12 MHz ----------------
  cplx_t          c_sym;
  logic           c_valid, f_full;
  logic [FIFO_AW:0] f_wcount, f_rcount;

  channel_coder u_coder (.clk(clk12), .rst_n(rst12_n), .bit_in, .enable, .sym(c_sym), .sym_valid(c_valid));

  assign tx_ready = int'(f_wcount) <= 2**FIFO_AW - 2 * N_DATA - 4;

  // ---------------- 20 MHz ----------------
  cplx_t f_dout;
  logic  f_empty, f_rd;

  async_fifo #(.DW(2 * SW), .AW(FIFO_AW)) u_fifo (
    .wr_clk(clk12), .wr_rst_n(rst12_n), .wr_en(c_valid), .din(c_sym), .full(f_full), .wr_count(f_wcount),
    .rd_clk(clk20), .rd_rst_n(rst20_n), .rd_en(f_rd), .dout(f_dout), .empty(f_empty), .rd_count(f_rcount));

  localparam int MOD_START = PRE_LEN + 1 - 170;   // modulator latency is 170

  logic [15:0] pcnt;          // sample counter within the packet preamble
  logic        in_pre, mod_start, mod_busy, m_valid, m_first;
  logic [31:0] data_left;
  cplx_t       rom_q, m_dout;

  preamble_rom u_rom (.clk(clk20), .addr(9'(pcnt)), .dout(rom_q));

  assign mod_start = tx_busy && int'(pcnt) == MOD_START;

  modulator u_mod (
    .clk(clk20), .rst_n(rst20_n), .start(mod_start), .n_syms, .busy(mod_busy),
    .fifo_dout(f_dout), .fifo_empty(f_empty), .fifo_rd(f_rd),
    .out_valid(m_valid), .out_first(m_first), .dout(m_dout), .underflow);

  always_ff @(posedge clk20 or negedge rst20_n)
    if (!rst20_n) begin
      tx_busy <= 1'b0; pcnt <= '0; in_pre <= 1'b0; data_left <= '0;
      tx_valid <= 1'b0; tx_dout <= '0;
    end else begin
      if (!tx_busy) begin
        if (int'(f_rcount) >= N_DATA && !mod_busy && n_syms != 0) begin
          tx_busy   <= 1'b1;
          pcnt      <= '0;
          data_left <= 32'(n_syms) * SYM_LEN;
        end
      end else begin
        if (int'(pcnt) <= PRE_LEN) pcnt <= pcnt + 1'b1;
        if (int'(pcnt) > PRE_LEN && m_valid) begin
          data_left <= data_left - 1;
          if (data_left == 32'd1) tx_busy <= 1'b0;
        end
      end
      // the ROM output is one clock behind its address
      in_pre   <= tx_busy && int'(pcnt) < PRE_LEN;
      tx_valid <= in_pre || (tx_busy && int'(pcnt) > PRE_LEN && m_valid);
      if (in_pre)                                          tx_dout <= rom_q;
      else if (tx_busy && int'(pcnt) > PRE_LEN && m_valid) tx_dout <= m_dout;
      else                                                 tx_dout <= '0;
    end

  // the modulator's first sample must follow the last preamble sample directly
  assert property (@(posedge clk20) disable iff (!rst20_n)
    (tx_busy && int'(pcnt) == PRE_LEN) |=> m_valid);
endmodule

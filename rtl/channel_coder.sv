// channel_coder: the transmitter's 12 MHz front end. Incoming bits (bit_in
// qualified by enable) are convolutionally encoded (K = 7, r = 1/2), the 96
// coded bits of each 48-bit frame are interleaved in a double buffer, and
// the interleaved di-bits are mapped to 48 QPSK symbols. With a continuous
// 12 Mb/s input it emits one symbol per clock (12 Msymbols/s), one frame
// after the bits went in.
module channel_coder
  import cofdm_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  bit_in,
  input  logic  enable,
  output cplx_t sym,
  output logic  sym_valid
);
  logic       a, b;
  logic       rd_valid;
  logic [1:0] rd_bits;

  conv_encoder u_enc (.clk, .rst_n, .en(enable), .bit_in, .a, .b);

  interleaver #(.N_CBPS(N_CBPS), .INVERSE(1'b0)) u_il (
    .clk, .rst_n, .wr_en(enable), .wr_bits({b, a}),
    .rd_valid, .rd_bits, .frame_start());

  cplx_t map_sym;
  qpsk_mapper u_map (.bits(rd_bits), .sym(map_sym));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      sym <= '0; sym_valid <= 1'b0;
    end else begin
      sym       <= map_sym;
      sym_valid <= rd_valid;
    end
endmodule

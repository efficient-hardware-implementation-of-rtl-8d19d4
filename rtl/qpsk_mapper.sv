// qpsk_mapper: maps an interleaved di-bit (b0, b1) to a unit-power QPSK
// symbol. Each axis is a two-entry table: b0 selects I, b1 selects Q, and a
// one selects +A, a zero -A, with A = sqrt(2)/2 = 5793 in a 14-bit format
// with 13 fractional bits (sign-extended here to the 16-bit sample parts).
// Purely combinational.
module qpsk_mapper
  import cofdm_pkg::*;
(
  input  logic [1:0] bits,   // bits[0] = b0, bits[1] = b1
  output cplx_t      sym
);
  localparam logic signed [SW-1:0] POS = SW'(QPSK_A);
  localparam logic signed [SW-1:0] NEG = -SW'(QPSK_A);

  assign sym.re = bits[0] ? POS : NEG;
  assign sym.im = bits[1] ? POS : NEG;
endmodule

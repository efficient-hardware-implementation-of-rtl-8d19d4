// qpsk_demapper: hard QPSK decision by quadrant. b0 is the inverted sign
// bit of I and b1 the inverted sign bit of Q, the inverse of qpsk_mapper
// (a value of zero counts as positive). Purely combinational.
module qpsk_demapper
  import cofdm_pkg::*;
(
  input  cplx_t      sym,
  output logic [1:0] bits
);
  assign bits[0] = ~sym.re[SW-1];
  assign bits[1] = ~sym.im[SW-1];
endmodule

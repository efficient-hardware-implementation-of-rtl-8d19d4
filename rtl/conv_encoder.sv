// conv_encoder: rate-1/2, constraint length 7 convolutional encoder with
// generator polynomials g0 = 133 and g1 = 171 (octal), as used by the
// processor's channel coder.
//
// A six-stage shift register holds the previous inputs d1..d6 (d1 newest).
// On every cycle with en high the coded pair is
//   a = u ^ d2 ^ d3 ^ d5 ^ d6   (g0)
//   b = u ^ d1 ^ d2 ^ d3 ^ d6   (g1)
// and u shifts in. a and b are combinational outputs for the current u;
// the register updates on the clock edge. The register is not cleared per
// frame: the data source ends every 48-bit frame with six zero bits, which
// brings it back to state 0 (the decoder relies on the same rule).
module conv_encoder (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic bit_in,
  output logic a,
  output logic b
);
  logic [5:0] sr;  // sr[5] = d1 ... sr[0] = d6

  assign a = bit_in ^ sr[4] ^ sr[3] ^ sr[1] ^ sr[0];
  assign b = bit_in ^ sr[5] ^ sr[4] ^ sr[3] ^ sr[0];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)  sr <= '0;
    else if (en) sr <= {bit_in, sr[5:1]};
endmodule

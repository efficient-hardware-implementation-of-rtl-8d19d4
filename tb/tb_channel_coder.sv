`timescale 1ns/1ps
// tb_channel_coder: checks encoder, interleaver and QPSK mapper together.
// Six frames of 48 bits (42 random, 6 zero tail bits) are applied one bit
// per clock with enable high, with idle gaps between frames. The model
// encodes them with generators 133/171 (history array), interleaves the 96
// coded bits with i(k) = 6 * (k mod 16) + floor(k / 16) (coded bits in the
// order a0 b0 a1 b1 ...) and maps bit pairs to +-5793. Timing: 48 symbols
// per frame on consecutive cycles, the first two cycles after the frame's
// last bit was clocked in (one cycle of interleaver, one output register).
module tb_channel_coder;
  import cofdm_pkg::*;
  logic clk = 0, rst_n = 0, bit_in = 0, enable = 0, sym_valid;
  cplx_t sym;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  channel_coder dut (.clk, .rst_n, .bit_in, .enable, .sym, .sym_valid);

  localparam int NF = 6;
  bit coded [NF][96];
  int last_bit [NF];
  int cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    bit h [7];
    for (int i = 0; i < 7; i++) h[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < NF; f++) begin
      for (int n = 0; n < 48; n++) begin
        bit u;
        u = (n < 42) ? 1'($urandom_range(0, 1)) : 1'b0;
        h[0] = u;
        coded[f][2*n]   = h[0] ^ h[2] ^ h[3] ^ h[5] ^ h[6];
        coded[f][2*n+1] = h[0] ^ h[1] ^ h[2] ^ h[3] ^ h[6];
        for (int d = 6; d > 0; d--) h[d] = h[d-1];
        bit_in = u; enable = 1;
        if (n == 47) last_bit[f] = cyc;
        @(negedge clk);
      end
      enable = 0;
      repeat ($urandom_range(0, 20)) @(negedge clk);
    end
  end

  int no = 0;
  always @(posedge clk) if (rst_n && sym_valid) begin
    int f, j, kb0, kb1;
    bit e0, e1;
    f = no / 48; j = 2 * (no % 48);
    for (int k = 0; k < 96; k++) begin
      if (6 * (k % 16) + k / 16 == j)     e0 = coded[f][k];
      if (6 * (k % 16) + k / 16 == j + 1) e1 = coded[f][k];
    end
    checks++;
    if (int'(sym.re) != (e0 ? 5793 : -5793) || int'(sym.im) != (e1 ? 5793 : -5793)) begin
      failures++;
      if (failures < 5) $display("symbol %0d: %0d %0d", no, sym.re, sym.im);
    end
    if (no % 48 == 0) begin
      checks++;
      if (cyc != last_bit[f] + 3) begin failures++; $display("frame %0d starts at +%0d", f, cyc - last_bit[f]); end
    end
    no++;
  end

  initial begin
    repeat (NF * 48 + NF * 20 + 200) @(posedge clk);
    checks++;
    if (no != NF * 48) begin failures++; $display("%0d symbols", no); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

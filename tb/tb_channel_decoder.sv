`timescale 1ns/1ps
// tb_channel_decoder: checks hard demapping, de-interleaving and Viterbi
// decoding together. Ten frames of 48 bits (42 random, 6 zero tail bits)
// are encoded (133/171), interleaved with i(k) = 6 * (k mod 16) +
// floor(k / 16) and mapped to +-5793 here; the symbols get random
// amplitude noise that never crosses zero, except that in frames 1..9 two
// symbols have one part pushed across zero (a wrong hard decision). The
// symbols arrive with random gaps (as from the clock-crossing FIFO). Every
// decoded bit must equal the bit sent, and 480 bits must come out, each
// frame's 48 bits on consecutive cycles with out_ce.
module tb_channel_decoder;
  import cofdm_pkg::*;
  logic clk = 0, rst_n = 0, sym_valid = 0, bit_out, out_ce;
  cplx_t sym = '0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  channel_decoder dut (.clk, .rst_n, .sym, .sym_valid, .bit_out, .out_ce);

  localparam int NF = 10;
  bit src [NF][48];

  initial begin
    bit h [7];
    bit coded [96], il [96];
    for (int i = 0; i < 7; i++) h[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < NF; f++) begin
      int bad0, bad1;
      for (int n = 0; n < 48; n++) begin
        bit u;
        u = (n < 42) ? 1'($urandom_range(0, 1)) : 1'b0;
        src[f][n] = u;
        h[0] = u;
        coded[2*n]   = h[0] ^ h[2] ^ h[3] ^ h[5] ^ h[6];
        coded[2*n+1] = h[0] ^ h[1] ^ h[2] ^ h[3] ^ h[6];
        for (int d = 6; d > 0; d--) h[d] = h[d-1];
      end
      for (int k = 0; k < 96; k++) il[6 * (k % 16) + k / 16] = coded[k];
      bad0 = $urandom_range(0, 20); bad1 = $urandom_range(25, 47);
      for (int s = 0; s < 48; s++) begin
        int re, im;
        re = (il[2*s]   ? 5793 : -5793) * int'($urandom_range(30, 130)) / 100;
        im = (il[2*s+1] ? 5793 : -5793) * int'($urandom_range(30, 130)) / 100;
        if (f > 0 && s == bad0) re = -re / 4;
        if (f > 0 && s == bad1) im = -im / 4;
        while ($urandom_range(0, 1) == 0) begin sym_valid = 0; @(negedge clk); end
        sym_valid = 1; sym.re = 16'(re); sym.im = 16'(im);
        @(negedge clk);
      end
    end
    sym_valid = 0;
  end

  int no = 0, prev = 0;
  always @(posedge clk) if (rst_n) begin
    if (out_ce) begin
      checks++;
      if (bit_out != src[no / 48][no % 48]) begin
        failures++;
        if (failures < 6) $display("frame %0d bit %0d wrong", no / 48, no % 48);
      end
      if (no % 48 != 0) begin checks++; if (!prev) failures++; end
      no++;
    end
    prev <= out_ce;
  end

  initial begin
    repeat (NF * 48 * 4 + 400) @(posedge clk);
    checks++;
    if (no != NF * 48) begin failures++; $display("%0d bits out", no); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

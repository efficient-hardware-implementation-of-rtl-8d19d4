`timescale 1ns/1ps
// tb_demodulator: checks symbol windowing and the forward FFT. After a
// start pulse the demodulator is given 1 + NSYM slots of 80 random
// samples (amplitude up to 1000) at one per enable, with random idle
// cycles. For each slot it must drop the first 16 samples (the guard) and
// output the DFT of the other 64, scaled by 1/4, as 64 bins in natural
// order (out_k = 0..63) within 12 LSB of a real-arithmetic DFT; out_sym
// counts the frames. Afterwards two flush frames run at one per clock, so
// the last frame must be out within 2 * 80 + 64 + 80 cycles of the last
// sample, flushing must have been high, and busy must drop. A second
// packet then checks that a new start works after the first one.
module tb_demodulator;
  import cofdm_pkg::*;
  localparam int NSYM = 4;
  logic clk = 0, rst_n = 0, en = 0, start = 0, busy, flushing, out_valid, out_first;
  cplx_t din = '0, dout;
  logic [5:0] out_k;
  logic [15:0] out_sym;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  demodulator dut (.clk, .rst_n, .en, .din, .start, .n_syms(16'(NSYM)), .busy, .flushing,
                   .out_valid, .out_first, .dout, .out_k, .out_sym);

  real xr [2][NSYM + 1][80], xi [2][NSYM + 1][80];
  int last_cyc [2], done_cyc [2], nflush = 0;
  int cyc = 0;
  always @(posedge clk) begin cyc++; if (rst_n && flushing) nflush++; end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < 2; p++) begin
      repeat (5) @(negedge clk);
      start = 1; @(negedge clk); start = 0;
      for (int s = 0; s <= NSYM; s++)
        for (int n = 0; n < 80; n++) begin
          while ($urandom_range(0, 4) == 0) begin en = 0; @(negedge clk); end
          xr[p][s][n] = int'($urandom_range(0, 2000)) - 1000;
          xi[p][s][n] = int'($urandom_range(0, 2000)) - 1000;
          en = 1; din.re = 16'($rtoi(xr[p][s][n])); din.im = 16'($rtoi(xi[p][s][n]));
          last_cyc[p] = cyc;
          @(negedge clk);
        end
      en = 0;
      wait (!busy);
      repeat (300) @(negedge clk);
    end
  end

  int no = 0;
  always @(posedge clk) if (rst_n && out_valid) begin
    int p, s, k;
    real ar, ai, ph;
    p = no / (64 * (NSYM + 1)); s = (no / 64) % (NSYM + 1); k = no % 64;
    ar = 0; ai = 0;
    for (int n = 0; n < 64; n++) begin
      ph = -2.0 * 3.141592653589793 * k * n / 64.0;
      ar += xr[p][s][16 + n] * $cos(ph) - xi[p][s][16 + n] * $sin(ph);
      ai += xr[p][s][16 + n] * $sin(ph) + xi[p][s][16 + n] * $cos(ph);
    end
    ar /= 4.0; ai /= 4.0;
    checks++;
    if (real'(dout.re) - ar > 12 || ar - real'(dout.re) > 12 || real'(dout.im) - ai > 12 || ai - real'(dout.im) > 12 ||
        int'(out_k) != k || out_first != (k == 0)) begin
      failures++;
      if (failures < 6) $display("packet %0d frame %0d bin %0d: %0d %0d expected %0.1f %0.1f", p, s, out_k, dout.re, dout.im, ar, ai);
    end
    checks++;
    if (int'(out_sym) != s) failures++;
    if (s == NSYM && k == 63) done_cyc[p] = cyc;
    no++;
  end

  initial begin
    repeat (4000) @(posedge clk);
    checks++;
    if (no != 2 * 64 * (NSYM + 1)) begin failures++; $display("%0d bins out", no); end
    for (int p = 0; p < 2; p++) begin
      checks++;
      if (done_cyc[p] - last_cyc[p] > 2 * 80 + 64 + 80) begin failures++; $display("last frame %0d cycles after input", done_cyc[p] - last_cyc[p]); end
    end
    checks++;
    if (nflush != 2 * 160 || busy) begin failures++; $display("flush cycles %0d busy %0d", nflush, busy); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

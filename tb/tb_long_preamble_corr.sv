`timescale 1ns/1ps
// tb_long_preamble_corr: checks the 32-tap sign-bit cross-correlator bit
// for bit and its peak positions. Input: 100 noise samples, the 160-sample
// long training part (32-sample guard, then the 64-sample symbol twice,
// made here from L(-26..26)), 100 noise samples, with a random enable.
// The model correlates the signs of the last 32 samples with the signs of
// the first 32 samples of the long symbol and takes |Re| + |Im|; mag must
// equal it for the window ending one enable before. The magnitude must
// reach 64 exactly where the window holds l[0..31] of either copy, and
// stay below 44 (the receiver's threshold) everywhere else.
module tb_long_preamble_corr;
  import cofdm_pkg::*;
  logic clk = 0, rst_n = 0, en = 0;
  cplx_t din = '0;
  logic [7:0] mag;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  long_preamble_corr dut (.clk, .rst_n, .en, .din, .mag);

  int lseq [53] = '{1, 1, -1, -1, 1, 1, -1, 1, -1, 1, 1, 1, 1, 1, 1, -1, -1, 1, 1, -1, 1, -1, 1, 1, 1, 1,
                    0, 1, -1, -1, 1, 1, -1, 1, -1, 1, -1, -1, -1, -1, -1, 1, 1, -1, -1, 1, -1, 1, -1, 1, 1, 1, 1};
  function automatic void long_sample(int n, output real re, output real im);
    real ph;
    re = 0; im = 0;
    for (int sc = -26; sc <= 26; sc++) begin
      ph = 2.0 * 3.141592653589793 * sc * n / 64.0;
      re += lseq[sc + 26] * $cos(ph);
      im += lseq[sc + 26] * $sin(ph);
    end
  endfunction

  localparam int NS = 360, P0 = 100;
  int xr [NS], xi [NS];
  int mmag [NS];
  bit lr [32], li [32];

  initial begin
    for (int k = 0; k < 32; k++) begin
      real a, b;
      long_sample(k, a, b);
      lr[k] = a < 0; li[k] = b < 0;
    end
    for (int n = 0; n < NS; n++) begin
      xr[n] = int'($urandom_range(0, 2000)) - 1000; xi[n] = int'($urandom_range(0, 2000)) - 1000;
      if (n >= P0 && n < P0 + 160) begin
        real a, b;
        int m;
        m = n - P0;
        long_sample(m < 32 ? m + 32 : (m - 32) % 64, a, b);
        xr[n] = $rtoi(a * 128.0); xi[n] = $rtoi(b * 128.0);
      end
    end
    for (int n = 0; n < NS; n++) begin
      int ar, ai;
      ar = 0; ai = 0;
      for (int k = 0; k < 32; k++) begin
        int j, sa, sb, sc, sd;
        j = n - 31 + k;
        sa = (j >= 0 && xr[j] < 0) ? -1 : 1;   // reset contents count as positive
        sb = (j >= 0 && xi[j] < 0) ? -1 : 1;
        sc = lr[k] ? -1 : 1;
        sd = li[k] ? -1 : 1;
        ar += sa * sc + sb * sd;
        ai += sb * sc - sa * sd;
      end
      mmag[n] = (ar < 0 ? -ar : ar) + (ai < 0 ? -ai : ai);
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < NS + 1; n++) begin
      while ($urandom_range(0, 3) == 0) begin en = 0; @(negedge clk); end
      en = 1;
      din.re = (n < NS) ? 16'(xr[n]) : '0;
      din.im = (n < NS) ? 16'(xi[n]) : '0;
      @(negedge clk);
      if (n >= 1) begin
        int m;
        bit at_peak;
        m = n - 1;
        at_peak = (m == P0 + 32 + 31) || (m == P0 + 96 + 31);
        checks++;
        if (int'(mag) != mmag[m]) begin
          failures++;
          if (failures < 6) $display("sample %0d: mag %0d expected %0d", m, mag, mmag[m]);
        end
        checks++;
        if (at_peak ? (mag != 8'd64) : (mag >= 8'd44)) begin
          failures++; $display("sample %0d: mag %0d (peak position %0d)", m, mag, at_peak);
        end
      end
    end
    en = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

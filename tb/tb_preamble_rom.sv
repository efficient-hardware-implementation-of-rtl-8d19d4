`timescale 1ns/1ps
// tb_preamble_rom: checks all 320 preamble samples against values computed
// here from the IEEE 802.11a training sequences, written out as tables:
// samples 0..159 repeat the 16-sample short symbol, 160..191 are the last
// 32 samples of the long symbol (its guard) and 192..319 the long symbol
// twice. Each sample is (1/64) * sum X(sc) exp(j 2 pi sc n / 64) in units
// of 8192, the short symbol's values scaled by sqrt(13/6) and (1 + j).
// The ROM has one cycle of latency; a difference of 1 LSB is allowed.
module tb_preamble_rom;
  import cofdm_pkg::*;
  logic clk = 0;
  logic [8:0] addr = 0;
  cplx_t dout;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  preamble_rom dut (.clk, .addr, .dout);

  // L(-26..26) and the signs of S at sc = -24, -20, ..., 24 (0 at DC)
  int lseq [53] = '{1, 1, -1, -1, 1, 1, -1, 1, -1, 1, 1, 1, 1, 1, 1, -1, -1, 1, 1, -1, 1, -1, 1, 1, 1, 1,
                    0, 1, -1, -1, 1, 1, -1, 1, -1, 1, -1, -1, -1, -1, -1, 1, 1, -1, -1, 1, -1, 1, -1, 1, 1, 1, 1};
  int sseq [13] = '{1, -1, 1, -1, -1, 1, 0, -1, -1, 1, 1, 1, 1};

  function automatic void ref_sample(int a, output int re, output int im);
    real ar, ai, ph, amp;
    int n;
    bit lng;
    lng = a >= 160;
    n = !lng ? a % 16 : (a < 192 ? a - 160 + 32 : (a - 192) % 64);
    ar = 0; ai = 0;
    for (int sc = -26; sc <= 26; sc++) begin
      real xr, xi;
      xr = 0; xi = 0;
      if (lng) begin xr = lseq[sc + 26]; end
      else if (sc % 4 == 0 && sc >= -24 && sc <= 24) begin
        amp = $sqrt(13.0 / 6.0) * sseq[(sc + 24) / 4];
        xr = amp; xi = amp;
      end
      ph = 2.0 * 3.141592653589793 * sc * n / 64.0;
      ar += xr * $cos(ph) - xi * $sin(ph);
      ai += xr * $sin(ph) + xi * $cos(ph);
    end
    re = $rtoi(ar / 64.0 * 8192.0 + (ar >= 0 ? 0.5 : -0.5));
    im = $rtoi(ai / 64.0 * 8192.0 + (ai >= 0 ? 0.5 : -0.5));
  endfunction

  initial begin
    for (int a = 0; a < 320; a++) begin
      int er, ei;
      @(negedge clk);
      addr = 9'(a);
      @(negedge clk);
      ref_sample(a, er, ei);
      checks++;
      if (int'(dout.re) - er > 1 || er - int'(dout.re) > 1 || int'(dout.im) - ei > 1 || ei - int'(dout.im) > 1) begin
        failures++;
        if (failures < 6) $display("addr %0d: got %0d %0d expected %0d %0d", a, dout.re, dout.im, er, ei);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

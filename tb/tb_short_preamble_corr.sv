`timescale 1ns/1ps
// tb_short_preamble_corr: checks the delayed auto-correlator bit for bit.
// Input: 200 samples of weak noise, the 160-sample short training sequence
// (made here from its sub-carrier signs, with noise added), 200 more noise
// samples, with a random enable. The model keeps the last 2L quantised
// samples (top 12 bits) in a plain array and forms the window sums
// directly, P = sum |r[n-i]|^2 and S = sum r[n-i] r*[n-i-L] for
// i = 0..L-1, then P^2, |S|^2 and the decision |S|^2 >= P^2 - P^2/8 with
// P > PMIN. Each output must match the model for the sample entered two
// enables before. Behaviour: det must be high for at least 100 samples of
// the preamble and never while only noise is in both windows.
module tb_short_preamble_corr;
  import cofdm_pkg::*;
  localparam int L = 16, CW = 12, PMIN = 4096;
  localparam int QW = 2 * (2 * CW + $clog2(L) + 1);
  logic clk = 0, rst_n = 0, en = 0, det;
  cplx_t din = '0;
  logic [QW-1:0] p2, s2;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  short_preamble_corr dut (.clk, .rst_n, .en, .din, .det, .p2, .s2);

  int sseq [13] = '{1, -1, 1, -1, -1, 1, 0, -1, -1, 1, 1, 1, 1};
  function automatic void short_sample(int n, output int re, output int im);
    real ar, ai, ph, amp;
    ar = 0; ai = 0;
    for (int sc = -24; sc <= 24; sc += 4) begin
      amp = $sqrt(13.0 / 6.0) * sseq[(sc + 24) / 4];
      ph = 2.0 * 3.141592653589793 * sc * n / 64.0;
      ar += amp * ($cos(ph) - $sin(ph));
      ai += amp * ($sin(ph) + $cos(ph));
    end
    re = $rtoi(ar / 64.0 * 8192.0);
    im = $rtoi(ai / 64.0 * 8192.0);
  endfunction

  localparam int NS = 560;
  int xr [NS], xi [NS];
  longint mp2 [NS], ms2 [NS];
  bit mdet [NS];
  int ndet_pre = 0, ndet_noise = 0, ne = 0;

  initial begin
    for (int n = 0; n < NS; n++) begin
      int r, i;
      r = int'($urandom_range(0, 400)) - 200; i = int'($urandom_range(0, 400)) - 200;
      if (n >= 200 && n < 360) begin
        int sr, si;
        short_sample(n - 200, sr, si);
        r = 4 * sr + r / 4; i = 4 * si + i / 4;
      end
      xr[n] = r; xi[n] = i;
    end
    // model
    for (int n = 0; n < NS; n++) begin
      longint P, Sr, Si;
      P = 0; Sr = 0; Si = 0;
      for (int k = 0; k < L; k++) begin
        longint ar, ai, br, bi;
        ar = (n - k >= 0) ? (xr[n-k] >>> 4) : 0;
        ai = (n - k >= 0) ? (xi[n-k] >>> 4) : 0;
        br = (n - k - L >= 0) ? (xr[n-k-L] >>> 4) : 0;
        bi = (n - k - L >= 0) ? (xi[n-k-L] >>> 4) : 0;
        P += ar * ar + ai * ai;
        Sr += ar * br + ai * bi;
        Si += ai * br - ar * bi;
      end
      mp2[n] = P * P;
      ms2[n] = Sr * Sr + Si * Si;
      mdet[n] = (ms2[n] >= mp2[n] - (mp2[n] >> 3)) && P > PMIN;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < NS + 2; n++) begin
      while ($urandom_range(0, 3) == 0) begin en = 0; @(negedge clk); end
      en = 1;
      din.re = (n < NS) ? 16'(xr[n]) : '0;
      din.im = (n < NS) ? 16'(xi[n]) : '0;
      @(negedge clk);
      // the enable just applied entered sample n; outputs now refer to n - 2
      if (n >= 2) begin
        int m;
        m = n - 2;
        checks++;
        if (det != mdet[m] || longint'(p2) != mp2[m] || longint'(s2) != ms2[m]) begin
          failures++;
          if (failures < 6) $display("sample %0d: det %0d/%0d p2 %0d/%0d s2 %0d/%0d", m, det, mdet[m], p2, mp2[m], s2, ms2[m]);
        end
        if (det && m >= 200 && m < 360) ndet_pre++;
        if (det && (m < 200 || m >= 360 + 2 * L)) ndet_noise++;
      end
    end
    en = 0;
    checks++;
    if (ndet_pre < 100 || ndet_noise != 0) begin
      failures++; $display("detections: %0d in the preamble, %0d in noise", ndet_pre, ndet_noise);
    end
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

`timescale 1ns/1ps
// tb_time_sync: checks packet detection and symbol timing. Each of three
// packets is 300 noise samples, the 320-sample preamble (made here from
// the training sequences, with a random gain, phase and noise) and 400
// samples of data-like noise. Samples arrive one per clock, with random
// idle cycles in the third packet. demod_busy is driven like the
// demodulator: high from start for 300 samples.
// For each packet: detected must pulse once, during the short training
// part; peak must pulse once; start must pulse once, on the cycle that
// presents preamble sample 237, so that the demodulator (which counts the
// sample after start as its first, drops 16 and transforms the next 64)
// takes samples 254..317: the second long symbol, begun EARLY = 2 samples
// early inside its cyclic guard. Nothing may pulse in the noise.
module tb_time_sync;
  import cofdm_pkg::*;
  logic clk = 0, rst_n = 0, en = 0, demod_busy = 0, start, detected, peak;
  cplx_t din = '0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  time_sync dut (.clk, .rst_n, .en, .din, .demod_busy, .start, .detected, .peak);

  int lseq [53] = '{1, 1, -1, -1, 1, 1, -1, 1, -1, 1, 1, 1, 1, 1, 1, -1, -1, 1, 1, -1, 1, -1, 1, 1, 1, 1,
                    0, 1, -1, -1, 1, 1, -1, 1, -1, 1, -1, -1, -1, -1, -1, 1, 1, -1, -1, 1, -1, 1, -1, 1, 1, 1, 1};
  int sseq [13] = '{1, -1, 1, -1, -1, 1, 0, -1, -1, 1, 1, 1, 1};
  function automatic void pre_sample(int a, output real re, output real im);
    real ph;
    int n;
    re = 0; im = 0;
    if (a < 160) begin
      n = a % 16;
      for (int sc = -24; sc <= 24; sc += 4) begin
        real amp;
        amp = $sqrt(13.0 / 6.0) * sseq[(sc + 24) / 4];
        ph = 2.0 * 3.141592653589793 * sc * n / 64.0;
        re += amp * ($cos(ph) - $sin(ph));
        im += amp * ($sin(ph) + $cos(ph));
      end
    end else begin
      n = (a < 192) ? a - 160 + 32 : (a - 192) % 64;
      for (int sc = -26; sc <= 26; sc++) begin
        ph = 2.0 * 3.141592653589793 * sc * n / 64.0;
        re += lseq[sc + 26] * $cos(ph);
        im += lseq[sc + 26] * $sin(ph);
      end
    end
    re = re / 64.0 * 8192.0; im = im / 64.0 * 8192.0;
  endfunction

  int idx = -1;        // preamble sample index on din, -1 outside
  int busy_left = 0;
  int n_det [3], n_peak [3], n_start [3], start_at [3], det_at [3];
  int pk = 0;
  bit noise_event = 0;

  always @(posedge clk) if (rst_n) begin
    if (detected) begin n_det[pk]++; det_at[pk] = idx; end
    if (peak) n_peak[pk]++;
    if (start) begin n_start[pk]++; start_at[pk] = idx; busy_left = 300; end
    if ((detected || peak || start) && idx < 0) noise_event = 1;
  end

  initial begin
    for (int p = 0; p < 3; p++) begin n_det[p] = 0; n_peak[p] = 0; n_start[p] = 0; start_at[p] = -1; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < 3; p++) begin
      real g, th;
      pk = p;
      g = 2.0 + $urandom_range(0, 300) / 100.0;
      th = $urandom_range(0, 628) / 100.0;
      for (int n = 0; n < 1020; n++) begin
        real a, b;
        int r1, r2, r3, r4;
        if (p == 2) while ($urandom_range(0, 3) == 0) begin en = 0; @(negedge clk); end
        a = 0; b = 0;
        idx = (n >= 300 && n < 620) ? n - 300 : -1;
        if (idx >= 0) pre_sample(idx, a, b);
        r1 = int'($urandom_range(0, 1200)) - 600; r2 = int'($urandom_range(0, 1200)) - 600;
        r3 = int'($urandom_range(0, 60)) - 30;    r4 = int'($urandom_range(0, 60)) - 30;
        if (idx < 0 && n >= 620) begin a = r1; b = r2; end
        a = a * g + r3;
        b = b * g + r4;
        en = 1;
        din.re = 16'($rtoi(a * $cos(th) - b * $sin(th)));
        din.im = 16'($rtoi(a * $sin(th) + b * $cos(th)));
        if (busy_left > 0) busy_left--;
        demod_busy = busy_left > 0;
        @(negedge clk);
      end
      idx = -1;
    end
    en = 0;
    for (int p = 0; p < 3; p++) begin
      $display("packet %0d: detected at %0d, start at sample %0d", p, det_at[p], start_at[p]);
      checks++;
      if (n_det[p] != 1 || n_peak[p] != 1 || n_start[p] != 1) begin
        failures++; $display("  pulses: detected %0d peak %0d start %0d", n_det[p], n_peak[p], n_start[p]);
      end
      checks++;
      if (det_at[p] < 0 || det_at[p] >= 160) failures++;
      checks++;
      if (start_at[p] != 237) failures++;
    end
    checks++;
    if (noise_event) begin failures++; $display("pulse during noise"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (8000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

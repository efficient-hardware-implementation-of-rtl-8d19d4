`timescale 1ns/1ps
// tb_channel_equalizer: checks phase correction followed by channel
// cancellation. A packet is a training frame carrying G * H[k] * L[k]
// (G = 1500, H a random gain 0.4..1.4 and phase per bin, L the long
// training sequence) and ten data frames carrying G * H[k] * X[k] rotated
// by a common phase theta_n growing 0.4 rad per frame, where X is a random
// QPSK point on the 48 data sub-carriers, the pilot value (1, 1, 1, -1 at
// sub-carriers -21, -7, 7, 21) times a random polarity on the pilots, and
// 0 elsewhere. Bins arrive in natural order, one per clock, 80 cycles
// apart. The output must be the 48 data sub-carriers of each data frame,
// in sub-carrier order -26..26, each X in Q13 (+-5793) within 2.5 %.
module tb_channel_equalizer;
  import cofdm_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, in_first = 0, out_valid;
  cplx_t din = '0, dout;
  logic [5:0] in_k = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  channel_equalizer dut (.clk, .rst_n, .in_valid, .in_first, .din, .in_k, .out_valid, .dout);

  int lseq [53] = '{1, 1, -1, -1, 1, 1, -1, 1, -1, 1, 1, 1, 1, 1, 1, -1, -1, 1, 1, -1, 1, -1, 1, 1, 1, 1,
                    0, 1, -1, -1, 1, 1, -1, 1, -1, 1, -1, -1, -1, -1, -1, 1, 1, -1, -1, 1, -1, 1, -1, 1, 1, 1, 1};
  localparam int NF = 11;
  int exp_re [$], exp_im [$];

  initial begin
    real hr [64], hi [64];
    for (int k = 0; k < 64; k++) begin
      real g, th;
      g = 0.4 + $urandom_range(0, 100) / 100.0;
      th = $urandom_range(0, 628) / 100.0;
      hr[k] = g * $cos(th); hi[k] = g * $sin(th);
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < NF; f++) begin
      real th, xr [64], xi [64];
      int pol;
      th = 0.4 * f;
      pol = $urandom_range(0, 1) ? 1 : -1;
      for (int s = -32; s < 32; s++) begin
        int k;
        k = (s + 64) % 64;
        xr[k] = 0; xi[k] = 0;
        if (f == 0) xr[k] = (s < -26 || s > 26) ? 0 : lseq[s + 26];
        else if (s == -21 || s == -7 || s == 7) xr[k] = pol;
        else if (s == 21) xr[k] = -pol;
        else if (s >= -26 && s <= 26 && s != 0) begin
          xr[k] = $urandom_range(0, 1) ? 0.70710678 : -0.70710678;
          xi[k] = $urandom_range(0, 1) ? 0.70710678 : -0.70710678;
          exp_re.push_back(xr[k] > 0 ? 5793 : -5793);
          exp_im.push_back(xi[k] > 0 ? 5793 : -5793);
        end
      end
      for (int k = 0; k < 64; k++) begin
        real yr, yi;
        yr = 1500.0 * (hr[k] * xr[k] - hi[k] * xi[k]);
        yi = 1500.0 * (hr[k] * xi[k] + hi[k] * xr[k]);
        in_valid = 1; in_first = (f == 0); in_k = 6'(k);
        din.re = 16'($rtoi(yr * $cos(th) - yi * $sin(th)));
        din.im = 16'($rtoi(yr * $sin(th) + yi * $cos(th)));
        @(negedge clk);
      end
      in_valid = 0;
      repeat (16) @(negedge clk);
    end
  end

  int no = 0;
  always @(posedge clk) if (rst_n && out_valid) begin
    int er, ei;
    er = exp_re.pop_front(); ei = exp_im.pop_front();
    checks++;
    if (int'(dout.re) - er > 145 || er - int'(dout.re) > 145 || int'(dout.im) - ei > 145 || ei - int'(dout.im) > 145) begin
      failures++;
      if (failures < 6) $display("output %0d: %0d %0d expected %0d %0d", no, dout.re, dout.im, er, ei);
    end
    no++;
  end

  initial begin
    repeat (NF * 80 + 200) @(posedge clk);
    checks++;
    if (no != (NF - 1) * 48) begin failures++; $display("%0d outputs", no); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

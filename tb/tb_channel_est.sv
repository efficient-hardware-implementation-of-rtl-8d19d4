`timescale 1ns/1ps
// tb_channel_est: checks channel estimation and cancellation on bins.
// Each of two packets gives a random channel H[k] (gain 0.3..1.5, any
// phase) to every bin. Its training frame (in_first) carries
// G * H[k] * L[k] with G = 3000 and L the long training sequence, 0 at
// the unused bins. Then four data frames carry G * H[k] * X[k] with X a
// random QPSK point of unit power. Bins arrive in sub-carrier order
// (bin 32..63, then 0..31), one per clock, frames 80 cycles apart.
// For data frames the output must be X[k] in Q13 (+-5793 per part)
// within 12 LSB (the rounding of a weak training bin) where L[k] != 0,
// and exactly 0 where it is 0; nothing may come out for training
// frames; out_k must follow in_k three registers later (the output is
// seen on the fourth rising edge after the input was applied).
module tb_channel_est;
  import cofdm_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, in_first = 0, out_valid;
  logic signed [17:0] in_re = 0, in_im = 0;
  logic [5:0] in_k = 0, out_k;
  cplx_t dout;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  channel_est dut (.clk, .rst_n, .in_valid, .in_first, .in_re, .in_im, .in_k, .out_valid, .dout, .out_k);

  int lseq [53] = '{1, 1, -1, -1, 1, 1, -1, 1, -1, 1, 1, 1, 1, 1, 1, -1, -1, 1, 1, -1, 1, -1, 1, 1, 1, 1,
                    0, 1, -1, -1, 1, 1, -1, 1, -1, 1, -1, -1, -1, -1, -1, 1, 1, -1, -1, 1, -1, 1, -1, 1, 1, 1, 1};
  function automatic int lval(int k);
    int sc;
    sc = (k < 32) ? k : k - 64;
    return (sc < -26 || sc > 26) ? 0 : lseq[sc + 26];
  endfunction

  int exp_re [$], exp_im [$], exp_k [$];
  int cyc = 0, in_cyc [$];
  always @(posedge clk) cyc++;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < 2; p++) begin
      real hr [64], hi [64];
      for (int k = 0; k < 64; k++) begin
        real g, th;
        g = 0.3 + $urandom_range(0, 120) / 100.0;
        th = $urandom_range(0, 628) / 100.0;
        hr[k] = g * $cos(th); hi[k] = g * $sin(th);
      end
      for (int f = 0; f < 5; f++) begin
        for (int c = 0; c < 64; c++) begin
          int k;
          real xr, xi;
          k = (c + 32) % 64;
          if (f == 0) begin xr = lval(k); xi = 0; end
          else begin
            xr = $urandom_range(0, 1) ? 0.70710678 : -0.70710678;
            xi = $urandom_range(0, 1) ? 0.70710678 : -0.70710678;
            exp_k.push_back(k);
            exp_re.push_back(lval(k) == 0 ? 0 : $rtoi(xr * 8192.0 + (xr > 0 ? 0.5 : -0.5)));
            exp_im.push_back(lval(k) == 0 ? 0 : $rtoi(xi * 8192.0 + (xi > 0 ? 0.5 : -0.5)));
            in_cyc.push_back(cyc);
          end
          in_valid = 1; in_first = (f == 0); in_k = 6'(k);
          in_re = 18'($rtoi(3000.0 * (hr[k] * xr - hi[k] * xi)));
          in_im = 18'($rtoi(3000.0 * (hr[k] * xi + hi[k] * xr)));
          if (f == 0 && lval(k) == 0) begin in_re = 0; in_im = 0; end
          @(negedge clk);
        end
        in_valid = 0;
        repeat (16) @(negedge clk);
      end
    end
  end

  int no = 0;
  always @(posedge clk) if (rst_n && out_valid) begin
    int er, ei, ek, ec;
    er = exp_re.pop_front(); ei = exp_im.pop_front(); ek = exp_k.pop_front(); ec = in_cyc.pop_front();
    checks++;
    if (int'(out_k) != ek || (er == 0 ? (dout.re != 0 || dout.im != 0) :
        (int'(dout.re) - er > 12 || er - int'(dout.re) > 12 || int'(dout.im) - ei > 12 || ei - int'(dout.im) > 12))) begin
      failures++;
      if (failures < 6) $display("out %0d k %0d: %0d %0d expected %0d %0d", no, out_k, dout.re, dout.im, er, ei);
    end
    checks++;
    if (cyc - ec != 4) begin failures++; if (failures < 6) $display("latency %0d", cyc - ec); end
    no++;
  end

  initial begin
    repeat (2 * 5 * 80 + 100) @(posedge clk);
    checks++;
    if (no != 2 * 4 * 64) begin failures++; $display("%0d outputs", no); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

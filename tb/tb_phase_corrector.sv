`timescale 1ns/1ps
// tb_phase_corrector: checks the pilot-based phase correction. A packet is
// a training frame (in_first) and 12 data frames of 64 random bins
// (amplitude about 2000) in natural bin order, one per clock, 80 cycles
// apart. Data frame n is rotated as a whole by theta_n, which grows by
// 0.5 rad per frame (so it passes +-90 degrees and wraps), and the four
// pilot bins get a random common sign per frame, as the pilot polarity
// sequence does. Every output bin must equal the CORDIC gain (1.6468)
// times the bin before rotation, within 1.5 % + 8 LSB: the training frame
// itself unrotated, the data frames with theta_n removed. Outputs must
// come in sub-carrier order (bins 32..63, then 0..31) with out_k,
// out_first on the training frame's bins, and the first output bin of a
// frame must appear RD_DLY + 14 = 22 cycles after its last input bin.
module tb_phase_corrector;
  import cofdm_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, in_first = 0, out_valid, out_first;
  cplx_t din = '0;
  logic [5:0] in_k = 0, out_k;
  logic signed [17:0] out_re, out_im;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  phase_corrector dut (.clk, .rst_n, .in_valid, .in_first, .din, .in_k, .out_valid, .out_first,
                       .out_re, .out_im, .out_k);

  localparam int NF = 13;
  real br [NF][64], bi [NF][64];
  int last_in [NF];
  int cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < NF; f++) begin
      real th;
      int pol;
      th = 0.5 * f;
      pol = $urandom_range(0, 1) ? 1 : -1;
      for (int k = 0; k < 64; k++) begin
        real r, a;
        if (k == 7 || k == 21 || k == 43 || k == 57) begin
          r = 2000.0 * (f == 0 ? 1 : pol) * ((k == 21) ? -1 : 1); a = 0;
        end else begin
          r = 1000.0 + $urandom_range(0, 1500); a = $urandom_range(0, 628) / 100.0;
        end
        br[f][k] = r * $cos(a); bi[f][k] = r * $sin(a);
        in_valid = 1; in_first = (f == 0); in_k = 6'(k);
        din.re = 16'($rtoi(br[f][k] * $cos(th) - bi[f][k] * $sin(th)));
        din.im = 16'($rtoi(br[f][k] * $sin(th) + bi[f][k] * $cos(th)));
        if (k == 63) last_in[f] = cyc;
        @(negedge clk);
      end
      in_valid = 0;
      repeat (16) @(negedge clk);
    end
  end

  int no = 0;
  always @(posedge clk) if (rst_n && out_valid) begin
    int f, c, k;
    real er, ei, err, mag;
    f = no / 64; c = no % 64; k = (c + 32) % 64;
    er = 1.6468 * br[f][k]; ei = 1.6468 * bi[f][k];
    mag = $sqrt(er * er + ei * ei);
    err = $sqrt((real'(out_re) - er) ** 2 + (real'(out_im) - ei) ** 2);
    checks++;
    if (err > 0.015 * mag + 8.0 || int'(out_k) != k || out_first != (f == 0)) begin
      failures++;
      if (failures < 8) $display("frame %0d bin %0d: (%0d,%0d) expected (%0.0f,%0.0f)", f, out_k, out_re, out_im, er, ei);
    end
    if (c == 0) begin
      checks++;
      if (cyc - last_in[f] != 23) begin failures++; $display("frame %0d latency %0d", f, cyc - last_in[f] - 1); end
    end
    no++;
  end

  initial begin
    repeat (NF * 80 + 200) @(posedge clk);
    checks++;
    if (no != NF * 64) begin failures++; $display("%0d outputs", no); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

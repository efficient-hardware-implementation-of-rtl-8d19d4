`timescale 1ns/1ps
// tb_cofdm_tx: checks the whole transmitter. 2 x NSYM frames of 48 bits
// (42 random, 6 zero tail bits) are written at 12 MHz whenever tx_ready is
// high; with n_syms = NSYM two packets must be sent at 20 MHz.
// Per packet: exactly 320 + 80 * NSYM samples with tx_valid high on
// consecutive cycles; the 320-sample preamble within 1 LSB of values
// computed here from the training sequences; for each data symbol the
// first 16 samples equal the last 16 (cyclic prefix) and the DFT of the
// last 64, in units of 8192, gives within 48 LSB: the QPSK point (+-5793)
// of the coded, interleaved bits on the 48 data sub-carriers (in order
// -26..26), the pilots 1, 1, 1, -1 (sub-carriers -21, -7, 7, 21) times the
// 802.11a polarity value p_s of the symbol, and 0 on the other carriers.
// The model encodes with taps 133/171 by delay, interleaves with
// i(k) = 6 * (k mod 16) + floor(k / 16). No underflow may occur.
module tb_cofdm_tx;
  import cofdm_pkg::*;
  localparam int NSYM = 6;
  logic clk12 = 0, clk20 = 0, rst_n = 0, bit_in = 0, enable = 0;
  logic tx_ready, tx_valid, tx_busy, underflow;
  cplx_t tx_dout;
  always #41.667 clk12 = ~clk12;
  always #25     clk20 = ~clk20;
  int checks = 0, failures = 0;
  cofdm_tx dut (.clk12, .rst12_n(rst_n), .bit_in, .enable, .tx_ready, .clk20, .rst20_n(rst_n),
                .n_syms(16'(NSYM)), .tx_valid, .tx_dout, .tx_busy, .underflow);

  int lseq [53] = '{1, 1, -1, -1, 1, 1, -1, 1, -1, 1, 1, 1, 1, 1, 1, -1, -1, 1, 1, -1, 1, -1, 1, 1, 1, 1,
                    0, 1, -1, -1, 1, 1, -1, 1, -1, 1, -1, -1, -1, -1, -1, 1, 1, -1, -1, 1, -1, 1, -1, 1, 1, 1, 1};
  int sseq [13] = '{1, -1, 1, -1, -1, 1, 0, -1, -1, 1, 1, 1, 1};
  int pol [16] = '{1, 1, 1, 1, -1, -1, -1, 1, -1, -1, -1, -1, 1, 1, -1, 1};
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

  localparam int NF = 2 * NSYM;
  bit ilv [NF][96];   // interleaved coded bits of each frame

  initial begin
    bit h [7];
    bit coded [96];
    for (int i = 0; i < 7; i++) h[i] = 0;
    repeat (4) @(negedge clk12);
    rst_n = 1;
    repeat (4) @(negedge clk12);
    for (int f = 0; f < NF; f++) begin
      while (!tx_ready) @(negedge clk12);
      for (int n = 0; n < 48; n++) begin
        bit u;
        u = (n < 42) ? 1'($urandom_range(0, 1)) : 1'b0;
        h[0] = u;
        coded[2*n]   = h[0] ^ h[2] ^ h[3] ^ h[5] ^ h[6];
        coded[2*n+1] = h[0] ^ h[1] ^ h[2] ^ h[3] ^ h[6];
        for (int d = 6; d > 0; d--) h[d] = h[d-1];
        bit_in = u; enable = 1;
        @(negedge clk12);
      end
      enable = 0;
      for (int k = 0; k < 96; k++) ilv[f][6 * (k % 16) + k / 16] = coded[k];
    end
  end

  // collect the packets
  real sr [2][320 + 80 * NSYM], si [2][320 + 80 * NSYM];
  int np = 0, ns = 0, runs = 0, n_under = 0;
  logic vd = 0;
  always @(posedge clk20) begin
    if (tx_valid && !vd) runs++;
    vd <= tx_valid;
    if (underflow) n_under++;
    if (tx_valid) begin
      if (np < 2) begin sr[np][ns] = tx_dout.re; si[np][ns] = tx_dout.im; end
      ns++;
      if (ns == 320 + 80 * NSYM) begin np++; ns = 0; end
    end
  end

  task automatic check_packet(int p);
    for (int a = 0; a < 320; a++) begin
      real er, ei;
      pre_sample(a, er, ei);
      checks++;
      if (sr[p][a] - er > 1.5 || er - sr[p][a] > 1.5 || si[p][a] - ei > 1.5 || ei - si[p][a] > 1.5) begin
        failures++; if (failures < 6) $display("packet %0d preamble %0d: %0.0f %0.0f expected %0.1f %0.1f", p, a, sr[p][a], si[p][a], er, ei);
      end
    end
    for (int s = 0; s < NSYM; s++) begin
      int b0, d;
      b0 = 320 + 80 * s;
      for (int n = 0; n < 16; n++) begin
        checks++;
        if (sr[p][b0 + n] != sr[p][b0 + 64 + n] || si[p][b0 + n] != si[p][b0 + 64 + n]) failures++;
      end
      d = 0;
      for (int sc = -32; sc < 32; sc++) begin
        real ar, ai, ph, er, ei;
        ar = 0; ai = 0;
        for (int n = 0; n < 64; n++) begin
          ph = -2.0 * 3.141592653589793 * sc * n / 64.0;
          ar += sr[p][b0 + 16 + n] * $cos(ph) - si[p][b0 + 16 + n] * $sin(ph);
          ai += sr[p][b0 + 16 + n] * $sin(ph) + si[p][b0 + 16 + n] * $cos(ph);
        end
        er = 0; ei = 0;
        if (sc == -21 || sc == -7 || sc == 7) er = 8192.0 * pol[s];
        else if (sc == 21) er = -8192.0 * pol[s];
        else if (sc >= -26 && sc <= 26 && sc != 0) begin
          er = ilv[p * NSYM + s][2 * d] ? 5793.0 : -5793.0;
          ei = ilv[p * NSYM + s][2 * d + 1] ? 5793.0 : -5793.0;
          d++;
        end
        checks++;
        if (ar - er > 48 || er - ar > 48 || ai - ei > 48 || ei - ai > 48) begin
          failures++;
          if (failures < 10) $display("packet %0d symbol %0d sc %0d: %0.0f %0.0f expected %0.0f %0.0f", p, s, sc, ar, ai, er, ei);
        end
      end
    end
  endtask

  initial begin
    repeat (2 * (NSYM + 10) * 80 + 4000) @(posedge clk20);
    checks++;
    if (np != 2 || runs != 2 || ns != 0) begin failures++; $display("packets %0d, runs %0d, extra %0d", np, runs, ns); end
    checks++;
    if (n_under != 0) begin failures++; $display("underflow"); end
    for (int p = 0; p < np && p < 2; p++) check_packet(p);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

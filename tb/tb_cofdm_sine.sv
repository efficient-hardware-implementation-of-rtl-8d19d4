`timescale 1ns/1ps
// tb_cofdm_sine: the processor's sine-wave demonstration, end to end at the
// default configuration. One period of a sine of 256 samples of 12 bits is
// sent as one packet of 256 OFDM symbols: each 48-bit frame carries one
// sample in bits 0..11 (LSB first), zeros in bits 12..41 and the six-zero
// tail in bits 42..47. At 12 Mb/s that is 12 MHz / 48 / 256 = 976.5625 Hz.
// The samples pass a channel model (gain 0.9, phase -1.2 rad, a slow phase
// drift, an echo of 0.15 at two samples, noise of +-12) into the receiver.
//
// Checks: every received 12-bit sample equals the one sent (256 checks), the
// packet is detected and started exactly once, 256 frames come out, and the
// time from the first bit entering the transmitter to the first decoded bit
// is at most 77 us, the latency the processor is specified with. A watchdog
// ends the run after the packet's airtime plus a margin.
module tb_cofdm_sine;
  import cofdm_pkg::*;
  localparam int NSYM = 256;
  localparam real PI = 3.14159265358979;

  logic clk12 = 0, clk20 = 0, rst_n = 0;
  always #41.667 clk12 = ~clk12;
  always #25     clk20 = ~clk20;
  int checks = 0, failures = 0;

  logic bit_in = 0, enable = 0, tx_ready, tx_valid, tx_busy, tx_underflow;
  logic rx_sync, rx_fifo_overflow, bit_out, out_ce;
  cplx_t tx_sample, rx_sample;
  logic [15:0] pkt_syms = 16'(NSYM);

  cofdm_top dut (
    .clk12, .clk20, .rst_n, .bit_in, .enable, .tx_ready, .tx_pkt_syms(pkt_syms), .tx_valid,
    .tx_sample, .tx_busy, .tx_underflow, .rx_valid(1'b1), .rx_sample, .rx_pkt_syms(pkt_syms),
    .rx_sync, .rx_fifo_overflow, .bit_out, .out_ce);

  // ---------------- channel model ----------------
  real ch_gain = 0.9, ch_phase = -1.2, ch_drift = 0.00001, echo = 0.15;
  real hist_r [3], hist_i [3];
  int  nsamp = 0;
  always @(posedge clk20) begin
    real xr, xi, yr, yi, ph;
    int nr, ni;
    xr = tx_sample.re; xi = tx_sample.im;
    yr = xr + echo * hist_r[1];
    yi = xi + echo * hist_i[1];
    for (int i = 2; i > 0; i--) begin hist_r[i] = hist_r[i-1]; hist_i[i] = hist_i[i-1]; end
    hist_r[0] = xr; hist_i[0] = xi;
    ph = ch_phase + ch_drift * nsamp;
    nr = int'($urandom_range(0, 24)) - 12;
    ni = int'($urandom_range(0, 24)) - 12;
    rx_sample.re <= 16'($rtoi(ch_gain * (yr * $cos(ph) - yi * $sin(ph)) + real'(nr)));
    rx_sample.im <= 16'($rtoi(ch_gain * (yr * $sin(ph) + yi * $cos(ph)) + real'(ni)));
    nsamp++;
  end

  // ---------------- source: one sine period ----------------
  logic [11:0] sine [NSYM];
  realtime t_first_in = 0, t_first_out = 0;
  initial begin
    for (int i = 0; i < 3; i++) begin hist_r[i] = 0; hist_i[i] = 0; end
    rx_sample = '0;
    for (int s = 0; s < NSYM; s++) sine[s] = 12'($rtoi($floor(2047.0 * $sin(2.0 * PI * s / NSYM) + 0.5)));
    repeat (4) @(negedge clk12);
    rst_n = 1;
    repeat (4) @(negedge clk12);
    for (int f = 0; f < NSYM; f++) begin
      while (!tx_ready) @(negedge clk12);
      for (int n = 0; n < 48; n++) begin
        if (f == 0 && n == 0) t_first_in = $realtime;
        bit_in = (n < 12) ? sine[f][n] : 1'b0;
        enable = 1;
        @(negedge clk12);
      end
      enable = 0;
    end
    enable = 0;
  end

  // ---------------- sink: rebuild the samples ----------------
  int n_bits = 0, n_samples = 0, n_sync = 0, n_wrong = 0;
  logic [11:0] got = '0;
  always @(posedge clk20) if (rst_n && rx_sync) n_sync++;
  always @(posedge clk12) if (rst_n && out_ce) begin
    int pos;
    if (n_bits == 0) t_first_out = $realtime;
    pos = n_bits % 48;
    if (pos < 12) got[pos] = bit_out;
    if (pos == 47) begin
      checks++;
      if (got !== sine[n_samples]) begin
        failures++;
        if (n_wrong < 10) $display("sample %0d: got %0d expected %0d", n_samples,
                                   $signed(got), $signed(sine[n_samples]));
        n_wrong++;
      end
      n_samples++;
    end
    n_bits++;
  end

  initial begin
    real lat;
    #(1.0 * (NSYM + 12) * 4000.0 + 20000.0);
    lat = (t_first_out - t_first_in) / 1000.0;
    $display("%0d sine samples received, %0d wrong; latency %0.2f us", n_samples, n_wrong, lat);
    checks++;
    if (n_samples != NSYM) begin failures++; $display("expected %0d samples", NSYM); end
    checks++;
    if (n_sync != 1) begin failures++; $display("demodulator started %0d times", n_sync); end
    checks++;
    if (n_bits == 0 || lat > 77.0) begin failures++; $display("latency above 77 us"); end
    checks++;
    if (rx_fifo_overflow || tx_underflow) begin failures++; $display("FIFO underflow or overflow"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

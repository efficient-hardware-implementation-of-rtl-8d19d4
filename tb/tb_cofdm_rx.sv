`timescale 1ns/1ps
// tb_cofdm_rx: checks the whole receiver. The stimulus is made by the
// transmitter (cofdm_tx) from random 48-bit frames (42 random, 6 zero tail
// bits); its 20 MHz samples reach the receiver after 150 idle samples,
// through a channel with gain 0.6, a phase of 2.2 rad, a one-sample echo
// of 0.3 and noise of +-16 LSB. Two packets of NSYM symbols are sent.
// The receiver must: detect each packet once (sync_detect), start the
// demodulator once per packet (sync_start), give 48 equalised data
// sub-carriers per symbol on eq_valid, never overflow its FIFO, and
// deliver every bit sent, in order, at 12 MHz on out_ce.
module tb_cofdm_rx;
  import cofdm_pkg::*;
  localparam int NSYM = 8;
  logic clk12 = 0, clk20 = 0, rst_n = 0, bit_in = 0, enable = 0;
  logic tx_ready, tx_valid, tx_busy, underflow;
  cplx_t tx_dout, rx_din = '0, eq_dout;
  logic sync_start, sync_detect, eq_valid, fifo_overflow, bit_out, out_ce;
  always #41.667 clk12 = ~clk12;
  always #25     clk20 = ~clk20;
  int checks = 0, failures = 0;

  cofdm_tx u_src (.clk12, .rst12_n(rst_n), .bit_in, .enable, .tx_ready, .clk20, .rst20_n(rst_n),
                  .n_syms(16'(NSYM)), .tx_valid, .tx_dout, .tx_busy, .underflow);
  cofdm_rx dut (.clk20, .rst20_n(rst_n), .rx_valid(1'b1), .rx_din, .n_syms(16'(NSYM)), .sync_start,
                .sync_detect, .eq_valid, .eq_dout, .fifo_overflow, .clk12, .rst12_n(rst_n), .bit_out, .out_ce);

  real pr = 0, pi = 0;
  always @(posedge clk20) begin
    real xr, xi, yr, yi;
    xr = tx_dout.re; xi = tx_dout.im;
    yr = xr + 0.3 * pr; yi = xi + 0.3 * pi;
    pr = xr; pi = xi;
    rx_din.re <= 16'($rtoi(0.6 * (yr * $cos(2.2) - yi * $sin(2.2))) + int'($urandom_range(0, 32)) - 16);
    rx_din.im <= 16'($rtoi(0.6 * (yr * $sin(2.2) + yi * $cos(2.2))) + int'($urandom_range(0, 32)) - 16);
  end

  bit sent [$];
  initial begin
    repeat (4) @(negedge clk12);
    rst_n = 1;
    repeat (100) @(negedge clk12);
    for (int f = 0; f < 2 * NSYM; f++) begin
      while (!tx_ready) @(negedge clk12);
      for (int n = 0; n < 48; n++) begin
        bit u;
        u = (n < 42) ? 1'($urandom_range(0, 1)) : 1'b0;
        sent.push_back(u);
        bit_in = u; enable = 1;
        @(negedge clk12);
      end
      enable = 0;
    end
  end

  int n_start = 0, n_det = 0, n_eq = 0, n_over = 0, nbits = 0;
  always @(posedge clk20) if (rst_n) begin
    if (sync_start) n_start++;
    if (sync_detect) n_det++;
    if (eq_valid) n_eq++;
    if (fifo_overflow) n_over++;
  end
  always @(posedge clk12) if (rst_n && out_ce) begin
    bit e;
    e = sent.pop_front();
    checks++;
    if (bit_out != e) begin failures++; if (failures < 6) $display("bit %0d wrong", nbits); end
    nbits++;
  end

  initial begin
    #(2.0 * (NSYM + 12) * 4000.0 + 60000.0);
    checks++;
    if (nbits != 2 * NSYM * 48) begin failures++; $display("%0d bits decoded", nbits); end
    checks++;
    if (n_start != 2 || n_det != 2) begin failures++; $display("starts %0d detections %0d", n_start, n_det); end
    checks++;
    if (n_eq != 2 * NSYM * 48 || n_over != 0) begin failures++; $display("equalised %0d overflow %0d", n_eq, n_over); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

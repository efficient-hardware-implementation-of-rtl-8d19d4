`timescale 1ns/1ps
// tb_cofdm_top: end-to-end test of the whole processor at its default
// configuration. Random 48-bit frames (42 random bits and six zero tail
// bits) are sent into the transmitter at 12 MHz whenever it is ready; its
// 20 MHz samples pass through a channel model (gain, phase rotation, a
// phase that drifts from symbol to symbol, an echo and a little noise) into
// the receiver, whose decoded bits must equal the bits sent. NPKT packets
// of NSYM data symbols are sent back to back; with NSYM = 256 each packet
// carries 256 frames of 48 random bits.
//
// Checks: every bit decoded correctly, the transmitter sends exactly
// 320 + 80 * NSYM samples per packet with no gap between preamble and
// data, no FIFO underflow or overflow. Mechanisms that must occur, each
// counted and a failure when never seen: packet start, flush frames in
// the modulator and the demodulator, short-preamble detection,
// long-preamble peak, demodulator start, pilot phase correction (the
// channel phase drifts), equalised sub-carriers, transmitter
// back-pressure (tx_ready low), symbols through the receive FIFO, and
// Viterbi correction of wrong hard decisions (a noise burst).
// The test runs about 2.2 ms of simulated time.
module tb_cofdm_top;
  import cofdm_pkg::*;
  localparam int NPKT = 2;
  localparam int NSYM = 256;

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
  real ch_gain = 0.8, ch_phase = 0.7, ch_drift = 0.00002, echo = 0.2;
  real hist_r [4], hist_i [4];
  int  nsamp = 0, namp;
  localparam int BURST0 = 12000, NB = 350;
  always @(posedge clk20) begin
    real xr, xi, yr, yi, ph;
    xr = tx_sample.re; xi = tx_sample.im;
    // echo three samples later, then rotation and gain
    yr = xr + echo * hist_r[2];
    yi = xi + echo * hist_i[2];
    for (int i = 3; i > 0; i--) begin hist_r[i] = hist_r[i-1]; hist_i[i] = hist_i[i-1]; end
    hist_r[0] = xr; hist_i[0] = xi;
    ph = ch_phase + ch_drift * nsamp;
    nsamp++;
    // background noise +-20; a burst of +-NB over a few data symbols of
    // the first packet makes hard decisions wrong for the decoder to fix
    namp = (nsamp > BURST0 && nsamp < BURST0 + 800) ? NB : 20;
    rx_sample.re <= 16'($rtoi(ch_gain * (yr * $cos(ph) - yi * $sin(ph)) + real'(int'($urandom_range(0, 2 * namp)) - namp)));
    rx_sample.im <= 16'($rtoi(ch_gain * (yr * $sin(ph) + yi * $cos(ph)) + real'(int'($urandom_range(0, 2 * namp)) - namp)));
  end

  // ---------------- source ----------------
  logic sent [$];
  realtime t_first_in = 0, t_first_out = 0;
  initial begin
    for (int i = 0; i < 4; i++) begin hist_r[i] = 0; hist_i[i] = 0; end
    repeat (4) @(negedge clk12);
    rst_n = 1;
    repeat (4) @(negedge clk12);
    for (int f = 0; f < NPKT * NSYM; f++) begin
      while (!tx_ready) @(negedge clk12);
      for (int n = 0; n < 48; n++) begin
        logic v;
        v = (n < 42) ? 1'($urandom_range(0, 1)) : 1'b0;
        sent.push_back(v);
        if (f == 0 && n == 0) t_first_in = $realtime;
        bit_in = v; enable = 1;
        @(negedge clk12);
      end
      enable = 0;
    end
    enable = 0;
  end

  // ---------------- mechanism counters ----------------
  int n_pkt = 0, n_sync = 0, n_detect = 0, n_peak = 0, n_backpressure = 0, n_under = 0;
  int n_rxbits = 0, n_biterr = 0, n_frames = 0, n_hard_err = 0, n_eq = 0, n_over = 0;
  int n_txs = 0, n_txflush = 0, n_rxflush = 0, n_phase = 0, n_gap = 0;
  logic busy_d = 0, valid_d = 0, eq_seen;
  assign eq_seen = dut.u_rx.eq_valid;
  always @(posedge clk20) if (rst_n) begin
    if (tx_busy && !busy_d) n_pkt++;
    busy_d <= tx_busy;
    if (rx_sync) n_sync++;
    if (dut.u_rx.sync_detect) n_detect++;
    if (dut.u_rx.u_sync.peak) n_peak++;
    if (rst_n && tx_underflow) n_under++;
    if (tx_valid) n_txs++;
    if (tx_valid && !valid_d) n_gap++;   // start of a run of samples
    valid_d <= tx_valid;
    if (dut.u_tx.u_mod.busy && !dut.u_tx.u_mod.data_slot) n_txflush++;
    if (dut.u_rx.dm_flush) n_rxflush++;
    if (dut.u_rx.u_eq.u_pc.rbusy && dut.u_rx.u_eq.u_pc.rcnt == 0 && dut.u_rx.u_eq.u_pc.lrp1 != 0) n_phase++;
    if (eq_seen) n_eq++;
    if (rst_n && rx_fifo_overflow) n_over++;
  end
  always @(posedge clk12) if (rst_n && !tx_ready) n_backpressure++;

  // hard decisions before the decoder that differ from what was sent
  logic tx_bits [$];
  always @(posedge clk12) if (rst_n && dut.u_tx.u_coder.sym_valid) begin
    tx_bits.push_back(dut.u_tx.u_coder.sym.re > 0);
    tx_bits.push_back(dut.u_tx.u_coder.sym.im > 0);
  end
  int rx_sym_cnt = 0;
  always @(posedge clk12) if (rst_n && dut.u_rx.u_dec.sym_valid) begin
    logic e0, e1;
    e0 = tx_bits.pop_front(); e1 = tx_bits.pop_front();
    if (dut.u_rx.u_dec.dibit[0] != e0) n_hard_err++;
    if (dut.u_rx.u_dec.dibit[1] != e1) n_hard_err++;
    rx_sym_cnt++;
  end

  always @(posedge clk12) if (rst_n && out_ce) begin
    logic e;
    e = sent.pop_front();
    if (n_rxbits == 0) t_first_out = $realtime;
    checks++;
    if (bit_out != e) begin
      failures++;
      if (n_biterr < 10) $display("bit %0d: got %0d expected %0d", n_rxbits, bit_out, e);
      n_biterr++;
    end
    n_rxbits++;
    if (n_rxbits % 48 == 0) n_frames++;
  end

  task automatic need(string what, int n);
    checks++;
    if (n == 0) begin failures++; $display("mechanism never happened: %s", what); end
    else $display("  %-34s %0d", what, n);
  endtask

  initial begin
    #(1.0 * NPKT * (NSYM + 12) * 4000.0 + 20000.0);
    $display("first bit in to first bit out: %0.2f us", (t_first_out - t_first_in) / 1000.0);
    $display("received %0d bits of %0d, %0d wrong; %0d hard-decision errors corrected",
             n_rxbits, NPKT * NSYM * 48, n_biterr, n_hard_err);
    checks++;
    if (n_rxbits != NPKT * NSYM * 48) failures++;
    checks++;
    if (n_txs != NPKT * (PRE_LEN + NSYM * SYM_LEN) || n_gap != NPKT) begin
      failures++; $display("transmitted %0d samples in %0d runs", n_txs, n_gap);
    end
    need("packets sent", n_pkt);
    need("modulator flush-frame cycles", n_txflush);
    need("demodulator flush-frame cycles", n_rxflush);
    need("symbols with pilot phase correction", n_phase);
    need("equalised data sub-carriers", n_eq);
    need("short-preamble detections", n_detect);
    need("long-preamble peaks", n_peak);
    need("demodulator starts", n_sync);
    need("transmitter back-pressure cycles", n_backpressure);
    need("decoded 48-bit frames", n_frames);
    need("symbols through the receive FIFO", rx_sym_cnt);
    need("wrong hard decisions (Viterbi)", n_hard_err);
    checks++;
    if (n_under != 0 || n_over != 0) begin failures++; $display("underflow %0d overflow %0d", n_under, n_over); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// cofdm_top: the complete COFDM baseband processor, transmitter and
// receiver side by side. Each runs a 12 MHz domain for bits and QPSK
// symbols and a 20 MHz domain for OFDM samples (4 us per 80-sample
// symbol); the two are decoupled by asynchronous FIFOs, so no common 60 MHz
// clock is needed. The sample buses go to and come from the converters
// (DAC and ADC) outside this design. One asynchronous reset input is
// synchronised into each clock domain.
//
// Lint notes: the receiver's debug outputs (detection flag, equaliser
// output) and a few FIFO fill counts and correlator taps inside the
// sub-blocks are left unconnected on purpose, hence the empty-pin warnings.
// The synchronised resets feed asynchronous-reset flops and also disable
// the handshake assertions, which the lint tool reports as a reset used
// both synchronously and asynchronously; the assertions are not logic.
module cofdm_top
  import cofdm_pkg::*;
(
  input  logic        clk12,
  input  logic        clk20,
  input  logic        rst_n,
  // transmitter
  input  logic        bit_in,
  input  logic        enable,
  output logic        tx_ready,
  input  logic [15:0] tx_pkt_syms,
  output logic        tx_valid,
  output cplx_t       tx_sample,
  output logic        tx_busy,
  output logic        tx_underflow,
  // receiver
  input  logic        rx_valid,
  input  cplx_t       rx_sample,
  input  logic [15:0] rx_pkt_syms,
  output logic        rx_sync,
  output logic        rx_fifo_overflow,
  output logic        bit_out,
  output logic        out_ce
);
  logic r12_n, r20_n;
  rst_sync u_rs12 (.clk(clk12), .rst_in_n(rst_n), .rst_out_n(r12_n));
  rst_sync u_rs20 (.clk(clk20), .rst_in_n(rst_n), .rst_out_n(r20_n));

  cofdm_tx u_tx (
    .clk12, .rst12_n(r12_n), .bit_in, .enable, .tx_ready,
    .clk20, .rst20_n(r20_n), .n_syms(tx_pkt_syms), .tx_valid, .tx_dout(tx_sample), .tx_busy,
    .underflow(tx_underflow));

  cofdm_rx u_rx (
    .clk20, .rst20_n(r20_n), .rx_valid, .rx_din(rx_sample), .n_syms(rx_pkt_syms),
    .sync_start(rx_sync), .sync_detect(), .eq_valid(), .eq_dout(), .fifo_overflow(rx_fifo_overflow),
    .clk12, .rst12_n(r12_n), .bit_out, .out_ce);
endmodule

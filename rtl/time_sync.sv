// time_sync: the receiver's time synchronizer. It first waits for the
// short-preamble auto-correlator to report a packet for DET_RUN
// consecutive samples; that arms the long-preamble cross-correlator. The
// first correlation value that exceeds THR_L and is not smaller than its
// successor is taken as the peak, which occurs on the 32nd sample of the
// first long training symbol. From there the position of every later
// symbol is fixed, and START_DLY samples after the peak the start pulse
// tells the demodulator that its first 80-sample window begins: the 16
// samples before the second long training symbol, then that symbol. The
// window is placed EARLY samples ahead of the exact position, inside the
// cyclic prefix, as a margin against a late peak. While the demodulator is
// busy no new packet is searched for; if no peak arrives within TIMEOUT
// samples of arming, the search restarts.
module time_sync
  import cofdm_pkg::*;
#(
  parameter int THR_L   = 44,
  parameter int DET_RUN = 8,
  parameter int EARLY   = 2,
  parameter int TIMEOUT = 400
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,          // one sample per enable
  input  cplx_t din,
  input  logic  demod_busy,
  output logic  start,
  output logic  detected,    // short-preamble detection has armed the search
  output logic  peak         // long-preamble peak found
);
  // The peak of the second long copy is recognised one enable after mag
  // has fallen from it (mag_d >= mag). Counting START_DLY enables in WAIT
  // from there puts start on the cycle that presents preamble sample
  // 239 - EARLY, so the demodulator's first transformed sample is
  // 256 - EARLY: the second long symbol, entered EARLY samples early.
  localparam int START_DLY = 12 - EARLY;

  typedef enum logic [1:0] {SEARCH, ARMED, WAIT, BUSY} state_t;
  state_t state;

  logic       det;
  logic [7:0] mag, mag_d;
  logic [8:0] run;
  logic [9:0] cnt;

  short_preamble_corr u_spc (.clk, .rst_n, .en, .din, .det, .p2(), .s2());
  long_preamble_corr  u_lpc (.clk, .rst_n, .en, .din, .mag);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state <= SEARCH; mag_d <= '0; run <= '0; cnt <= '0;
      start <= 1'b0; detected <= 1'b0; peak <= 1'b0;
    end else begin
      start <= 1'b0; detected <= 1'b0; peak <= 1'b0;
      if (en) begin
        mag_d <= mag;
        case (state)
          SEARCH: begin
            run <= det ? run + 1'b1 : '0;
            if (det && int'(run) == DET_RUN - 1) begin
              state <= ARMED; cnt <= '0; detected <= 1'b1;
            end
          end
          ARMED: begin
            cnt <= cnt + 1'b1;
            if (int'(mag_d) > THR_L && mag_d >= mag) begin
              state <= WAIT; cnt <= '0; peak <= 1'b1;
            end else if (int'(cnt) == TIMEOUT) begin
              state <= SEARCH; run <= '0;
            end
          end
          WAIT: begin
            cnt <= cnt + 1'b1;
            if (int'(cnt) == START_DLY - 1) begin
              start <= 1'b1; state <= BUSY;
            end
          end
          BUSY: if (!demod_busy && !start) begin state <= SEARCH; run <= '0; end
        endcase
      end
    end
endmodule

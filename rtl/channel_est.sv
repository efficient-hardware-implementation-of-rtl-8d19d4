// channel_est: channel estimation and cancellation.
//
// For the long training symbol of each packet (in_first) the received,
// phase-corrected bins L_r[k] are written into a 64-word SSRAM addressed by
// the bin number. For every data symbol each bin is divided by L_r[k] of
// the same bin and multiplied by the known transmitted value L_t[k] from a
// 64 x 16 ROM (+-1 or 0 in Q13), giving H_c[k] * L_t[k] / L_r[k], the bin
// with the channel's gain and phase removed. The complex division is
// a * conj(b) / |b|^2 with the quotient in Q13, so an undistorted QPSK
// point comes out as +-5793; a bin with L_r = 0 gives 0. Three registers
// (input and SSRAM read, quotient, product) give a latency of 3 cycles.
module channel_est
  import cofdm_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic               in_first,
  input  logic signed [17:0] in_re,
  input  logic signed [17:0] in_im,
  input  logic [5:0]         in_k,
  output logic               out_valid,
  output cplx_t              dout,
  output logic [5:0]         out_k
);
  function automatic logic [64*16-1:0] lt_table();
    logic [64*16-1:0] t;
    for (int k = 0; k < 64; k++) t[16*k +: 16] = 16'(long_sc(bin2sc(k)) * ONE_Q13);
    return t;
  endfunction
  localparam logic [64*16-1:0] LT = lt_table();

  logic signed [17:0] lr_re [64], lr_im [64];

  // stage 1: input register and synchronous SSRAM read
  logic               r1_valid;
  logic signed [17:0] r1_re, r1_im, b_re, b_im;
  logic [5:0]         r1_k;
  always_ff @(posedge clk) begin
    if (in_valid && in_first) begin
      lr_re[in_k] <= in_re;
      lr_im[in_k] <= in_im;
    end
    b_re <= lr_re[in_k];
    b_im <= lr_im[in_k];
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      r1_valid <= 1'b0; r1_re <= '0; r1_im <= '0; r1_k <= '0;
    end else begin
      r1_valid <= in_valid && !in_first;
      r1_re <= in_re; r1_im <= in_im; r1_k <= in_k;
    end

  // stage 2: complex divider
  logic signed [63:0] num_re, num_im, den, q_re, q_im;
  always_comb begin
    num_re = (64'(r1_re) * 64'(b_re) + 64'(r1_im) * 64'(b_im)) <<< 13;
    num_im = (64'(r1_im) * 64'(b_re) - 64'(r1_re) * 64'(b_im)) <<< 13;
    den    = 64'(b_re) * 64'(b_re) + 64'(b_im) * 64'(b_im);
    q_re   = (den == 0) ? 64'sd0 : num_re / den;
    q_im   = (den == 0) ? 64'sd0 : num_im / den;
  end

  logic               r2_valid;
  logic signed [17:0] r2_re, r2_im;
  logic [5:0]         r2_k;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      r2_valid <= 1'b0; r2_re <= '0; r2_im <= '0; r2_k <= '0;
    end else begin
      r2_valid <= r1_valid;
      r2_re <= (q_re > 64'sd131071) ? 18'sh1ffff : (q_re < -64'sd131072) ? -18'sh20000 : 18'(q_re);
      r2_im <= (q_im > 64'sd131071) ? 18'sh1ffff : (q_im < -64'sd131072) ? -18'sh20000 : 18'(q_im);
      r2_k  <= r1_k;
    end

  // stage 3: multiplier by L_t
  logic signed [15:0] lt;
  logic signed [47:0] p_re, p_im;
  assign lt   = LT[16*r2_k +: 16];
  assign p_re = (48'(r2_re) * 48'(lt)) >>> 13;
  assign p_im = (48'(r2_im) * 48'(lt)) >>> 13;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      out_valid <= 1'b0; dout <= '0; out_k <= '0;
    end else begin
      out_valid <= r2_valid;
      dout.re   <= sat16(p_re);
      dout.im   <= sat16(p_im);
      out_k     <= r2_k;
    end
endmodule

// sdf_stage: one single-path delay-feedback butterfly of the pipelined FFT.
//
// A feedback delay line of D samples holds the first half of every block of
// 2D samples. During the first half (cnt bit log2(D) low) the input enters
// the line and the line's oldest sample, a difference from the previous
// block, leaves as output. During the second half the output is the sum of
// the line's sample and the input, and their difference goes back into the
// line. Every register moves only when adv is high, so the stage stalls
// with its input.
//
// With JROT set (the second butterfly of a radix-2^2 pair) the input is
// first multiplied by -j (+j for the inverse transform) when the two top
// bits of its position in the 4D-sample block are both one; that trivial
// factor is what lets the radix-2^2 pipeline skip every other twiddle
// multiplier. With SCALE set the output is halved with round-to-nearest,
// ties to even; without it, it saturates to 16 bits. Output is registered.
module sdf_stage
  import cofdm_pkg::*;
#(
  parameter int D       = 32,
  parameter bit JROT    = 1'b0,
  parameter bit INVERSE = 1'b0,
  parameter bit SCALE   = 1'b1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       adv,
  input  logic [5:0] cnt,   // position of x in the stream, modulo 64
  input  cplx_t      x,
  output cplx_t      y
);
  localparam int LD = $clog2(D);

  cplx_t dl [D];
  cplx_t xr, dl_in, sum;
  logic  second;

  assign second = cnt[LD];

  always_comb begin
    xr = x;
    if (JROT && cnt[LD + 1] && second) begin
      if (INVERSE) begin xr.re = -x.im; xr.im =  x.re; end
      else         begin xr.re =  x.im; xr.im = -x.re; end
    end
  end

  logic signed [SW:0] s_re, s_im, d_re, d_im;
  assign s_re = dl[D-1].re + xr.re;
  assign s_im = dl[D-1].im + xr.im;
  assign d_re = dl[D-1].re - xr.re;
  assign d_im = dl[D-1].im - xr.im;

  function automatic logic signed [SW-1:0] fit(logic signed [SW:0] v);
    if (SCALE) return sat16(rne_shift(48'(v), 1));
    else       return sat16(48'(v));
  endfunction

  always_comb begin
    if (second) begin
      dl_in.re = fit(d_re);
      dl_in.im = fit(d_im);
      sum.re   = fit(s_re);
      sum.im   = fit(s_im);
    end else begin
      dl_in = xr;
      sum   = dl[D-1];
    end
  end

  // In the second half the difference is stored already scaled, so the
  // first-half output (the line's oldest sample) must not be scaled again.
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      y <= '0;
      for (int i = 0; i < D; i++) dl[i] <= '0;
    end else if (adv) begin
      y     <= sum;
      dl[0] <= dl_in;
      for (int i = 1; i < D; i++) dl[i] <= dl[i-1];
    end
endmodule

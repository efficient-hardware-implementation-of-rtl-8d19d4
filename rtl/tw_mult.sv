// tw_mult: twiddle multiplier between the radix-2^2 butterfly pairs of the
// pipelined FFT. The stream arrives in blocks of L/4 samples; within each
// group of L the block number b (0..3) and position m give the factor
// W_L^(k*m) with k = 0, 2, 1, 3 for b = 0, 1, 2, 3 (the bit-reversed block
// number). W_L^e = W_64^(e*64/L) comes from a 64-entry table of Q14 cosines
// and sines computed at elaboration. The product is rounded (nearest, ties
// to even) back to 16 bits and registered; like the butterflies, the stage
// moves only when adv is high.
module tw_mult
  import cofdm_pkg::*;
#(
  parameter int L       = 64,
  parameter bit INVERSE = 1'b0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       adv,
  input  logic [5:0] cnt,
  input  cplx_t      x,
  output cplx_t      y
);
  localparam int LL = $clog2(L);

  function automatic logic [64*16-1:0] table_of(bit imag);
    logic [64*16-1:0] t;
    for (int e = 0; e < 64; e++) t[e*16 +: 16] = 16'(twiddle(e, imag, INVERSE));
    return t;
  endfunction
  localparam logic [64*16-1:0] TRE = table_of(1'b0);
  localparam logic [64*16-1:0] TIM = table_of(1'b1);

  logic [1:0] blk;
  logic [5:0] m, k, e;
  assign blk = cnt[LL-1 -: 2];
  assign m   = cnt & 6'((L / 4) - 1);
  assign k   = {4'b0, blk[0], blk[1]};
  assign e   = 6'((k * m) * (64 / L));

  logic signed [15:0] wr, wi;
  assign wr = TRE[e*16 +: 16];
  assign wi = TIM[e*16 +: 16];

  logic signed [47:0] pr, pi;
  assign pr = 48'(x.re) * 48'(wr) - 48'(x.im) * 48'(wi);
  assign pi = 48'(x.re) * 48'(wi) + 48'(x.im) * 48'(wr);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)   y <= '0;
    else if (adv) begin
      y.re <= sat16(rne_shift(pr, 14));
      y.im <= sat16(rne_shift(pi, 14));
    end
endmodule

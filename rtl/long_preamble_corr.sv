// long_preamble_corr: clipped cross-correlator against the first 32
// samples l[0..31] of the long training symbol. Only sign bits are used:
// the input keeps sign(Re x) + j sign(Im x) for its last 32 samples, each
// is multiplied by sign(Re l[k]) - j sign(Im l[k]) in a 1-bit complex
// multiplier (every product part is -2, 0 or +2), the 32 products are
// summed and the magnitude is taken as |Re| + |Im|. The result peaks (64)
// when the last input sample is l[31]. The reference signs are computed at
// elaboration. Advances on en; mag is registered, so after an enable it
// shows the window that ended with the sample entered one enable before.
module long_preamble_corr
  import cofdm_pkg::*;
#(
  parameter int TAPS = 32
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  cplx_t      din,
  output logic [7:0] mag
);
  function automatic logic [2*TAPS-1:0] ref_signs();
    logic [2*TAPS-1:0] t;
    for (int k = 0; k < TAPS; k++) begin
      t[2*k]     = train_sample(1'b1, k, 1'b0) < 0;   // 1 = negative
      t[2*k + 1] = train_sample(1'b1, k, 1'b1) < 0;
    end
    return t;
  endfunction
  localparam logic [2*TAPS-1:0] LREF = ref_signs();

  // sr[k] holds the sample that must line up with l[k]; sr[TAPS-1] is newest
  logic [1:0] sr [TAPS];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) for (int k = 0; k < TAPS; k++) sr[k] <= '0;
    else if (en) begin
      sr[TAPS-1] <= {din.im[SW-1], din.re[SW-1]};
      for (int k = 0; k < TAPS - 1; k++) sr[k] <= sr[k+1];
    end

  logic signed [8:0] acc_re, acc_im;
  always_comb begin
    acc_re = '0; acc_im = '0;
    for (int k = 0; k < TAPS; k++) begin
      // a + jb times c - jd with a, b, c, d = +-1: real ac + bd, imag bc - ad
      logic signed [2:0] a, b, c, d;
      a = sr[k][0] ? -3'sd1 : 3'sd1;
      b = sr[k][1] ? -3'sd1 : 3'sd1;
      c = LREF[2*k]     ? -3'sd1 : 3'sd1;
      d = LREF[2*k + 1] ? -3'sd1 : 3'sd1;
      acc_re = acc_re + 9'(a * c + b * d);
      acc_im = acc_im + 9'(b * c - a * d);
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)  mag <= '0;
    else if (en) mag <= 8'((acc_re < 0 ? -acc_re : acc_re) + (acc_im < 0 ? -acc_im : acc_im));
endmodule

// short_preamble_corr: delayed auto-correlator that detects the start of a
// packet from the periodicity (L = 16 samples) of the short training
// sequence.
//
// Upper branch: r[n] r*[n] is summed over a sliding window of L samples by
// a CIC section (integrator plus comb with delay L) giving P[n], which is
// squared. Lower branch: r[n] r*[n-L] is summed the same way giving S[n],
// and |S[n]|^2 is formed. The packet is detected (det) while
// |S[n]|^2 >= t P^2[n] with t = (2^TSHIFT - 1)/2^TSHIFT, computed as
// P^2 - (P^2 >> TSHIFT), and while P[n] exceeds the energy floor PMIN
// (without it a silent channel, where both sides are zero, would detect).
// Samples are cut to their top CW bits first. Everything advances on en;
// det, p2 and s2 are registered; after an enable they refer to the sample
// entered two enables before (the newest window ends there).
module short_preamble_corr
  import cofdm_pkg::*;
#(
  parameter int L      = 16,
  parameter int CW     = 12,
  parameter int TSHIFT = 3,
  parameter int PMIN   = 4096
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  cplx_t din,
  output logic  det,
  output logic [2*(2*CW+$clog2(L)+1)-1:0] p2,
  output logic [2*(2*CW+$clog2(L)+1)-1:0] s2
);
  localparam int PW = 2 * CW + $clog2(L) + 1;   // width of the window sums
  localparam int QW = 2 * PW;

  logic signed [CW-1:0] r_re, r_im;
  assign r_re = din.re[SW-1 -: CW];
  assign r_im = din.im[SW-1 -: CW];

  // r[n-L]
  logic signed [CW-1:0] dre [L], dim [L];
  // products
  logic signed [PW-1:0] e_n, c_re, c_im;
  assign e_n  = PW'(r_re * r_re) + PW'(r_im * r_im);
  assign c_re = PW'(r_re * dre[L-1]) + PW'(r_im * dim[L-1]);
  assign c_im = PW'(r_im * dre[L-1]) - PW'(r_re * dim[L-1]);

  // CIC: integrators and combs of delay L
  logic signed [PW-1:0] ie, ir, ii;
  logic signed [PW-1:0] de [L], dr [L], di [L];
  logic signed [PW-1:0] P, S_re, S_im;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int i = 0; i < L; i++) begin
        dre[i] <= '0; dim[i] <= '0; de[i] <= '0; dr[i] <= '0; di[i] <= '0;
      end
      ie <= '0; ir <= '0; ii <= '0; P <= '0; S_re <= '0; S_im <= '0;
      det <= 1'b0; p2 <= '0; s2 <= '0;
    end else if (en) begin
      dre[0] <= r_re; dim[0] <= r_im;
      for (int i = 1; i < L; i++) begin dre[i] <= dre[i-1]; dim[i] <= dim[i-1]; end
      ie <= ie + e_n; ir <= ir + c_re; ii <= ii + c_im;
      de[0] <= ie; dr[0] <= ir; di[0] <= ii;
      for (int i = 1; i < L; i++) begin de[i] <= de[i-1]; dr[i] <= dr[i-1]; di[i] <= di[i-1]; end
      // comb: window sum of the last L products
      P    <= ie - de[L-1];
      S_re <= ir - dr[L-1];
      S_im <= ii - di[L-1];
      p2   <= QW'(P) * QW'(P);
      s2   <= QW'(S_re) * QW'(S_re) + QW'(S_im) * QW'(S_im);
      det  <= (QW'(S_re) * QW'(S_re) + QW'(S_im) * QW'(S_im)) >= (QW'(P) * QW'(P)) - ((QW'(P) * QW'(P)) >> TSHIFT)
              && P > PW'(PMIN);
    end
endmodule

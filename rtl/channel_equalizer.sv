// channel_equalizer: phase correction followed by channel
// estimation-cancellation. Bins of every symbol arrive in natural order;
// the phase corrector returns them rotated and in sub-carrier order, the
// estimator keeps the long training symbol (in_first) as its channel
// estimate and equalises the data symbols. Only the 48 data sub-carriers
// of each data symbol are passed on, in sub-carrier order -26..26, which is
// the order the transmitter filled them in. Latency from the last input bin
// of a symbol to its first equalised output is about 40 cycles.
module channel_equalizer
  import cofdm_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic       in_first,
  input  cplx_t      din,
  input  logic [5:0] in_k,
  output logic       out_valid,
  output cplx_t      dout
);
  logic               p_valid, p_first;
  logic signed [17:0] p_re, p_im;
  logic [5:0]         p_k;

  phase_corrector u_pc (
    .clk, .rst_n, .in_valid, .in_first, .din, .in_k,
    .out_valid(p_valid), .out_first(p_first), .out_re(p_re), .out_im(p_im), .out_k(p_k));

  logic       e_valid;
  cplx_t      e_dout;
  logic [5:0] e_k;

  channel_est u_ce (
    .clk, .rst_n, .in_valid(p_valid), .in_first(p_first), .in_re(p_re), .in_im(p_im), .in_k(p_k),
    .out_valid(e_valid), .dout(e_dout), .out_k(e_k));

  assign out_valid = e_valid && is_data_sc(bin2sc(int'(e_k)));
  assign dout      = e_dout;
endmodule

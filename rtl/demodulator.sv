// demodulator: removes the cyclic prefix and runs the receiver's 64-point
// FFT. After start it cuts the sample stream into 80-sample windows, drops
// the first 16 of each and feeds the other 64 to the FFT: window 0 is the
// second long training symbol (used for channel estimation), windows
// 1..n_syms the data symbols. Two more zero frames flush the FFT pipeline.
// The FFT scales its first two butterflies by 1/2, so a bin is a quarter
// of the plain DFT. The bit-reversal buffer returns each symbol in natural
// bin order; out_sym numbers the symbols (0 = long training symbol).
module demodulator
  import cofdm_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,        // one input sample per enable
  input  cplx_t       din,
  input  logic        start,
  input  logic [15:0] n_syms,
  output logic        busy,
  output logic        flushing,   // only the two flush frames are left
  output logic        out_valid,
  output logic        out_first,
  output cplx_t       dout,
  output logic [5:0]  out_k,
  output logic [15:0] out_sym
);
  logic [15:0] slot;
  logic [6:0]  c;
  logic        take, real_win;
  cplx_t       x;

  assign flushing = busy && slot > n_syms;
  assign real_win   = !flushing;
  // real windows take samples as they come; flush frames go one per clock
  assign take = busy && (flushing ? c >= 7'(CP_LEN) : (en && c >= 7'(CP_LEN)));
  assign x    = flushing ? cplx_t'('0) : din;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      busy <= 1'b0; slot <= '0; c <= '0;
    end else if (start && !busy) begin
      busy <= 1'b1; slot <= '0; c <= '0;
    end else if (busy && (en || flushing)) begin
      if (c == 7'(SYM_LEN - 1)) begin
        c <= '0;
        if (slot == n_syms + 16'd2) busy <= 1'b0;
        slot <= slot + 1'b1;
      end else
        c <= c + 1'b1;
    end

  logic       f_valid, f_tag;
  cplx_t      f_dout;
  logic [5:0] f_idx;

  fft64 #(.INVERSE(1'b0), .SCALE_MASK(6'b000011)) u_fft (
    .clk, .rst_n, .in_valid(take), .in_tag(real_win), .din(x),
    .out_valid(f_valid), .out_tag(f_tag), .dout(f_dout), .out_idx(f_idx));

  reorder_cp #(.CP(0), .ALT_SIGN(1'b0)) u_rev (
    .clk, .rst_n, .in_valid(f_valid), .in_tag(f_tag), .din(f_dout), .in_idx(f_idx),
    .out_valid, .out_first, .dout, .out_k);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)                     out_sym <= '0;
    else if (start && !busy)        out_sym <= '0;
    else if (out_valid && out_k == 6'd63) out_sym <= out_sym + 1'b1;
endmodule

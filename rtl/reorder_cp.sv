// reorder_cp: bit-reversal double buffer of the FFT, with an optional
// cyclic-prefix generator.
//
// The FFT delivers each 64-sample frame in bit-reversed order together with
// the bin index of every sample (in_idx). Tagged samples are written at
// their index into one of two 64-entry banks; when a bank holds a whole
// frame the banks swap and the full one is read out in natural order,
// starting on the next cycle: first its last CP_LEN samples (the cyclic
// prefix), then all 64. out_first marks the first output sample of a frame
// and out_k its sample index. The next frame fills the other bank in the
// meantime, so the writer may deliver a frame as soon as every 64 + CP_LEN
// cycles.
//
// ALT_SIGN negates the odd-indexed samples. The transmitter feeds its IFFT
// in sub-carrier order (-32..31) instead of bin order; that half-band shift
// of the input multiplies the time signal by (-1)^n, which this undoes.
module reorder_cp
  import cofdm_pkg::*;
#(
  parameter int CP  = 16,
  parameter bit ALT_SIGN = 1'b0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic       in_tag,
  input  cplx_t      din,
  input  logic [5:0] in_idx,
  output logic       out_valid,
  output logic       out_first,
  output cplx_t      dout,
  output logic [5:0] out_k
);
  localparam int OLEN = 64 + CP;

  cplx_t      bank [2][64];
  logic       wb;            // bank being written
  logic [6:0] wcnt;
  logic       rbusy;
  logic [6:0] rcnt;
  logic [5:0] raddr;

  assign raddr = (int'(rcnt) < CP) ? 6'(64 - CP + int'(rcnt)) : 6'(int'(rcnt) - CP);

  always_ff @(posedge clk) begin
    if (in_valid && in_tag) bank[wb][in_idx] <= din;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      wb <= 1'b0; wcnt <= '0; rbusy <= 1'b0; rcnt <= '0;
      out_valid <= 1'b0; out_first <= 1'b0; dout <= '0; out_k <= '0;
    end else begin
      out_valid <= rbusy;
      out_first <= rbusy && rcnt == '0;
      out_k     <= raddr;
      dout      <= bank[~wb][raddr];
      if (ALT_SIGN && raddr[0]) begin
        dout.re <= -bank[~wb][raddr].re;
        dout.im <= -bank[~wb][raddr].im;
      end
      if (rbusy) begin
        rcnt <= rcnt + 1'b1;
        if (int'(rcnt) == OLEN - 1) rbusy <= 1'b0;
      end
      if (in_valid && in_tag) begin
        if (wcnt == 7'd63) begin
          wcnt  <= '0;
          wb    <= ~wb;
          rbusy <= 1'b1;
          rcnt  <= '0;
        end else
          wcnt <= wcnt + 1'b1;
      end
    end

  // a new frame may only complete once the previous one has been read out
  assert property (@(posedge clk) disable iff (!rst_n)
    (in_valid && in_tag && wcnt == 7'd63) |-> (!rbusy || int'(rcnt) == OLEN - 1));
endmodule

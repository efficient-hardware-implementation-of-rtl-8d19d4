// modulator: the transmitter's 20 MHz OFDM modulator. For every data symbol
// it spends one 80-cycle slot (4 us): in cycles 0..63 it walks the
// sub-carriers -32..31, taking a QPSK symbol from the FIFO for each of the
// 48 data sub-carriers, inserting the BPSK pilots at -21, -7, 7 and 21 and
// zeros elsewhere, and feeds them to the 64-point IFFT. The IFFT output goes
// through the bit-reversal buffer, which prepends the 16-sample cyclic
// prefix, giving 80 samples per symbol at one sample per clock.
//
// start begins a packet of n_syms data symbols; two zero slots follow to
// flush the IFFT pipeline. The first sample of the first symbol leaves
// 170 cycles after start. Pilot values are +-1 (8192) times the
// 127-step 802.11a polarity sequence (x^7 + x^4 + 1, seeded with ones),
// advanced once per data symbol. A read from an empty FIFO sends zero and
// pulses underflow.
module modulator
  import cofdm_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [15:0] n_syms,
  output logic        busy,
  // FIFO read port (first-word fall-through)
  input  cplx_t       fifo_dout,
  input  logic        fifo_empty,
  output logic        fifo_rd,
  // time-domain output
  output logic        out_valid,
  output logic        out_first,
  output cplx_t       dout,
  output logic        underflow
);

  logic [15:0] slot;      // slot number within the packet
  logic [6:0]  c;         // cycle within the slot
  logic        data_slot;
  logic [6:0]  lfsr;
  int          sc;
  cplx_t       x;
  logic        x_valid;

  assign data_slot = busy && slot < n_syms;
  assign sc        = int'(c) - 32;

  always_comb begin
    x       = '0;
    fifo_rd = 1'b0;
    x_valid = busy && c < 7'd64;
    if (x_valid && data_slot) begin
      if (is_data_sc(sc)) begin
        fifo_rd = !fifo_empty;
        x       = fifo_empty ? cplx_t'('0) : fifo_dout;
      end else if (is_pilot_sc(sc)) begin
        // polarity bit 1 means -1; the sub-carrier 21 pilot is negated once more
        x.re = (lfsr[6] ^ lfsr[3] ^ pilot_neg_sc(sc)) ? -SW'(ONE_Q13) : SW'(ONE_Q13);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      busy <= 1'b0; slot <= '0; c <= '0; lfsr <= '1; underflow <= 1'b0;
    end else begin
      underflow <= x_valid && data_slot && is_data_sc(sc) && fifo_empty;
      if (start && !busy) begin
        busy <= 1'b1; slot <= '0; c <= '0; lfsr <= '1;
      end else if (busy) begin
        if (c == 7'(SYM_LEN - 1)) begin
          c <= '0;
          if (data_slot) lfsr <= {lfsr[5:0], lfsr[6] ^ lfsr[3]};
          if (slot == n_syms + 16'd1) busy <= 1'b0;
          slot <= slot + 1'b1;
        end else
          c <= c + 1'b1;
      end
    end

  logic       f_valid, f_tag;
  cplx_t      f_dout;
  logic [5:0] f_idx;

  fft64 #(.INVERSE(1'b1), .SCALE_MASK(6'b111111)) u_ifft (
    .clk, .rst_n, .in_valid(x_valid), .in_tag(data_slot), .din(x),
    .out_valid(f_valid), .out_tag(f_tag), .dout(f_dout), .out_idx(f_idx));

  reorder_cp #(.CP(CP_LEN), .ALT_SIGN(1'b1)) u_cp (
    .clk, .rst_n, .in_valid(f_valid), .in_tag(f_tag), .din(f_dout), .in_idx(f_idx),
    .out_valid, .out_first, .dout, .out_k());
endmodule

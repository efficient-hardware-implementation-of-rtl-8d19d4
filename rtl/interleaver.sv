// interleaver: block interleaver for one OFDM symbol of N_CBPS coded bits,
// double-buffered. It implements the first permutation of IEEE 802.11a,
// i = (N_CBPS/16) * (k mod 16) + floor(k/16), with the mod-16 split done by
// bit slicing; for QPSK the second permutation is the identity.
//
// Two bits are written per cycle with wr_en (the pair k = 2n, 2n+1) and two
// are read per cycle. With INVERSE = 0 (transmitter) input bit k is stored
// at position i(k); with INVERSE = 1 (receiver) input bit j is stored at the
// position k whose i(k) = j, which undoes the transmitter's permutation.
// After N_CBPS/2 writes the bank is full: the banks swap and the full one is
// read out over the next N_CBPS/2 cycles (rd_valid high, rd_bits = positions
// 2t, 2t+1) while the other bank fills. Reading is at one pair per cycle, so
// it always finishes before the next bank can be full.
module interleaver #(
  parameter int  N_CBPS  = 96,
  parameter bit  INVERSE = 1'b0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       wr_en,
  input  logic [1:0] wr_bits,   // [0] = bit 2n, [1] = bit 2n+1
  output logic       rd_valid,
  output logic [1:0] rd_bits,
  output logic       frame_start // high with the first pair of a frame
);
  localparam int NP = N_CBPS / 2;
  localparam int AW = $clog2(N_CBPS);
  localparam int COLS = N_CBPS / 16;

  logic [N_CBPS-1:0] bank [2];
  logic              wbank;
  logic [AW-1:0]     wcnt;      // pair index n being written
  logic [AW-1:0]     rcnt;
  logic              rbusy;

  function automatic int perm(int k);
    if (INVERSE) return 16 * (k % COLS) + k / COLS;  // inverse of i(k)
    else         return COLS * (k % 16) + k / 16;
  endfunction

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      wbank <= 1'b0; wcnt <= '0; rcnt <= '0; rbusy <= 1'b0;
      bank[0] <= '0; bank[1] <= '0;
    end else begin
      if (wr_en) begin
        bank[wbank][perm(2 * int'(wcnt))]     <= wr_bits[0];
        bank[wbank][perm(2 * int'(wcnt) + 1)] <= wr_bits[1];
        if (int'(wcnt) == NP - 1) begin
          wcnt  <= '0;
          wbank <= ~wbank;
          rbusy <= 1'b1;
          rcnt  <= '0;
        end else
          wcnt <= wcnt + 1'b1;
      end
      if (rbusy && !(wr_en && int'(wcnt) == NP - 1)) begin
        if (int'(rcnt) == NP - 1) rbusy <= 1'b0;
        rcnt <= rcnt + 1'b1;
      end
    end

  // the bank being read is the one not being written
  assign rd_valid    = rbusy;
  assign rd_bits     = {bank[~wbank][2 * int'(rcnt) + 1], bank[~wbank][2 * int'(rcnt)]};
  assign frame_start = rbusy && rcnt == '0;
endmodule

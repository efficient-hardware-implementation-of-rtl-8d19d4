// cofdm_pkg: types, constants and elaboration-time tables shared by the
// COFDM baseband transmitter and receiver.
//
// Samples and sub-carrier values are complex numbers with 16-bit signed
// parts (cplx_t). QPSK symbols use Q13 (A = sqrt(2)/2 = 5793), so a unit
// amplitude is 8192. The sub-carrier plan, the training sequences and the
// pilot polarity sequence are those of IEEE 802.11a, which the processor
// follows; they are computed here from their definitions rather than stored.
package cofdm_pkg;

  localparam int SW       = 16;   // bits per real/imaginary part
  localparam int N_FFT    = 64;
  localparam int CP_LEN   = 16;
  localparam int SYM_LEN  = N_FFT + CP_LEN;   // 80 samples, 4 us at 20 MHz
  localparam int N_DATA   = 48;   // data sub-carriers = QPSK symbols per OFDM symbol
  localparam int N_CBPS   = 96;   // coded bits per OFDM symbol
  localparam int QPSK_A   = 5793; // sqrt(2)/2 in Q13
  localparam int ONE_Q13  = 8192;
  localparam int SHORT_LEN = 160; // 10 periods of 16 samples
  localparam int LONG_LEN  = 160; // 32-sample guard + 2 x 64
  localparam int PRE_LEN   = SHORT_LEN + LONG_LEN;

  typedef struct packed {
    logic signed [SW-1:0] re;
    logic signed [SW-1:0] im;
  } cplx_t;

  // Sub-carrier number (-32..31) carried by FFT bin k (0..63).
  function automatic int bin2sc(int k);
    return (k < 32) ? k : k - 64;
  endfunction

  function automatic bit is_pilot_sc(int sc);
    return (sc == -21) || (sc == -7) || (sc == 7) || (sc == 21);
  endfunction

  function automatic bit is_data_sc(int sc);
    return (sc >= -26) && (sc <= 26) && (sc != 0) && !is_pilot_sc(sc);
  endfunction

  // Base pilot values at sc = -21, -7, 7, 21 are 1, 1, 1, -1.
  function automatic bit pilot_neg_sc(int sc);
    return sc == 21;
  endfunction

  // Long training sequence L(-26..26), bit 52-j holds L(j-26): 1 -> +1, 0 -> -1
  // (the DC entry, j = 26, is zero and its bit is unused).
  localparam logic [52:0] LONG_SEQ =
    53'b11001101_01111110_01101011_11_0_10011010_10000011_00101011_11;

  function automatic int long_sc(int sc);   // L(sc) in {-1,0,1}
    if (sc < -26 || sc > 26 || sc == 0) return 0;
    return LONG_SEQ[52 - (sc + 26)] ? 1 : -1;
  endfunction

  // Short training sequence: non-zero only at multiples of 4, value
  // +-sqrt(13/6)(1+j). Sign for sc = -24,-20,...,24 (index (sc+24)/4, 0 = DC).
  localparam logic [12:0] SHORT_POS = 13'b1_0_1_0_0_1_0_0_0_1_1_1_1;
  function automatic int short_sc(int sc);  // sign in {-1,0,1}
    if (sc % 4 != 0 || sc < -24 || sc > 24 || sc == 0) return 0;
    return SHORT_POS[12 - (sc + 24) / 4] ? 1 : -1;
  endfunction

  // Time-domain training samples, IDFT scaled by 1/64 (the scaling of the
  // data IFFT), in units of ONE_Q13. Evaluated only at elaboration.
  function automatic int train_sample(bit is_long, int n, bit imag);
    real acc, ph, amp;
    acc = 0.0;
    amp = is_long ? 1.0 : $sqrt(13.0 / 6.0);
    for (int sc = -26; sc <= 26; sc++) begin
      int v;
      v = is_long ? long_sc(sc) : short_sc(sc);
      if (v != 0) begin
        ph = 2.0 * 3.14159265358979 * sc * n / 64.0;
        // X = v*amp for the long sequence, v*amp*(1+j) for the short one
        if (is_long)
          acc += imag ? v * amp * $sin(ph) : v * amp * $cos(ph);
        else
          acc += imag ? v * amp * ($cos(ph) + $sin(ph)) : v * amp * ($cos(ph) - $sin(ph));
      end
    end
    acc = acc / 64.0 * ONE_Q13;
    return $rtoi(acc + (acc >= 0.0 ? 0.5 : -0.5));
  endfunction

  // Twiddle W64^e = exp(-+j*2*pi*e/64) in Q14 (16384 = 1.0).
  function automatic int twiddle(int e, bit imag, bit inverse);
    real ph, v;
    ph = 2.0 * 3.14159265358979 * e / 64.0;
    v = imag ? (inverse ? $sin(ph) : -$sin(ph)) : $cos(ph);
    v = v * 16384.0;
    return $rtoi(v + (v >= 0.0 ? 0.5 : -0.5));
  endfunction

  // CORDIC arctangent table atan(2^-i), angle unit pi = 2^15.
  function automatic int atan_tab(int i);
    real v;
    v = $atan(1.0 / (2.0 ** i)) / 3.14159265358979 * 32768.0;
    return $rtoi(v + 0.5);
  endfunction

  // Shift right by s with round-to-nearest, ties to even.
  function automatic logic signed [47:0] rne_shift(logic signed [47:0] x, int s);
    logic signed [47:0] q, rem, half;
    if (s == 0) return x;
    q    = x >>> s;
    rem  = x - (q <<< s);
    half = 48'sd1 <<< (s - 1);
    if (rem > half || (rem == half && q[0])) q = q + 1;
    return q;
  endfunction

  function automatic logic signed [SW-1:0] sat16(logic signed [47:0] x);
    if (x > 48'sd32767)  return 16'sh7fff;
    if (x < -48'sd32768) return -16'sh8000;
    return x[SW-1:0];
  endfunction

endpackage

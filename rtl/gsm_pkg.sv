// gsm_pkg: frame sizes, the burst layout, the training sequence and the
// elaboration-time tables (sine, Gaussian filter taps) shared by the GSM
// baseband transmitter and receiver.
//
// Frame sizes follow the full-rate speech channel: a 260-bit frame splits into
// 50 class Ia, 132 class Ib and 78 class II bits; Ia gets 3 parity bits, 4 tail
// bits close the 189-bit block that the rate-1/2 code doubles to 378, and the
// 78 class II bits make it 456. The interleaver spreads the 456 bits over
// 8 blocks of 57 and pairs them into 4 bursts of 114 data bits.
//
// The burst layout (3 tail, 26 training, 114 data, 3 tail) is this design's
// own simplification of a GSM normal burst: the receiver's equalizer needs a
// known training sequence, and the tail bits let the Gaussian filter settle.
// The training sequence is GSM training sequence code 0.
package gsm_pkg;

  localparam int N_SPEECH   = 260;
  localparam int N_IA       = 50;
  localparam int N_IB       = 132;
  localparam int N_II       = 78;
  localparam int N_PARITY   = 3;
  localparam int N_TAIL     = 4;
  localparam int N_INFO     = N_IA + N_PARITY + N_IB + N_TAIL;   // 189
  localparam int N_CODED    = 2 * N_INFO;                        // 378
  localparam int N_FRAME    = N_CODED + N_II;                    // 456
  localparam int N_BLOCKS   = 8;
  localparam int BLOCK_LEN  = N_FRAME / N_BLOCKS;                // 57
  localparam int N_BURSTS   = N_BLOCKS / 2;                      // 4
  localparam int BURST_DATA = 2 * BLOCK_LEN;                     // 114

  // Burst layout on the air, in bit periods.
  localparam int TSC_LEN     = 26;
  localparam int GUARD_TAIL  = 3;
  localparam int BURST_LEN   = GUARD_TAIL + TSC_LEN + BURST_DATA + GUARD_TAIL; // 146
  localparam int TSC_START   = GUARD_TAIL;                        // 3
  localparam int DATA_START  = GUARD_TAIL + TSC_LEN;              // 29
  // Idle bit periods after each burst, so that the receiver's equalizer has
  // finished one burst before the next arrives (it takes about 46 bit periods).
  localparam int GUARD_BITS  = 64;

  // GSM training sequence code 0, first bit in bit 25 (MSB).
  localparam logic [TSC_LEN-1:0] TSC0 = 26'b00100101110000100010010111;

  // Training bit i as it is seen after the modulator's differential encoder
  // (the symbol domain in which the receiver's discriminator works).
  function automatic logic tsc_symbol(input int i);
    return TSC0[TSC_LEN-1-i];
  endfunction

  // Bits the transmitter sends so that, after differential encoding
  // d(i) = b(i) xor b(i-1) with b(-1) = 0 (the preceding tail bit), the
  // symbols equal TSC0: b(i) = b(i-1) xor tsc(i).
  function automatic logic [TSC_LEN-1:0] tsc_tx_bits();
    logic [TSC_LEN-1:0] r;
    logic prev;
    prev = 1'b0;
    for (int i = 0; i < TSC_LEN; i++) begin
      prev = prev ^ TSC0[TSC_LEN-1-i];
      r[TSC_LEN-1-i] = prev;
    end
    return r;
  endfunction

  localparam logic [TSC_LEN-1:0] TSC_TX = tsc_tx_bits();

  // ---------------------------------------------------------------- tables
  localparam real PI = 3.14159265358979323846;

  // Phase accumulators are PHASE_W bits wide; 2**PHASE_W is one full turn.
  localparam int PHASE_W = 16;
  localparam int LUT_AW  = 8;          // sine table address bits (top phase bits)
  localparam int AMP_W   = 12;         // signed amplitude of the sine table
  typedef logic signed [AMP_W-1:0] amp_t;
  typedef amp_t sine_tab_t [2**LUT_AW];

  // sin(2*pi*i/256) scaled to +-2047, rounded to nearest.
  function automatic sine_tab_t make_sine_tab();
    sine_tab_t t;
    for (int i = 0; i < 2**LUT_AW; i++)
      t[i] = AMP_W'($rtoi($floor(2047.0 * $sin(2.0 * PI * i / (2.0**LUT_AW)) + 0.5)));
    return t;
  endfunction

  localparam sine_tab_t SINE_TAB = make_sine_tab();

  function automatic amp_t sin_lut(input logic [PHASE_W-1:0] ph);
    return SINE_TAB[ph[PHASE_W-1 -: LUT_AW]];
  endfunction

  function automatic amp_t cos_lut(input logic [PHASE_W-1:0] ph);
    logic [PHASE_W-1:0] p;
    p = ph + PHASE_W'(2**(PHASE_W-2));   // cos(x) = sin(x + pi/2)
    return SINE_TAB[p[PHASE_W-1 -: LUT_AW]];
  endfunction

  // Gaussian pulse h(t) = exp(-t^2 / (2 sigma^2 T^2)), sigma = sqrt(ln 2)/(2 pi BT),
  // sampled at T/osr over 3 bit periods (3*osr+1 taps) and scaled so that the
  // taps add up to 2**(PHASE_W-2)/osr: one bit, held for osr samples, then
  // turns the phase by exactly 2**(PHASE_W-2), i.e. pi/2. The largest rounding
  // error is put on the centre tap so that the sum is exact.
  localparam int GAUSS_MAX_TAPS = 64;
  typedef int gauss_tab_t [GAUSS_MAX_TAPS];

  function automatic gauss_tab_t make_gauss_tab(input int osr, input real bt);
    gauss_tab_t t;
    real sigma, w, tsum, x;
    int n, total, acc;
    n = 3 * osr + 1;
    sigma = $sqrt($ln(2.0)) / (2.0 * PI * bt);
    tsum = 0.0;
    for (int k = 0; k < n; k++) begin
      x = (k - (n - 1) / 2.0) / osr;
      tsum = tsum + $exp(-(x * x) / (2.0 * sigma * sigma));
    end
    total = (2**(PHASE_W-2)) / osr;
    acc = 0;
    for (int k = 0; k < GAUSS_MAX_TAPS; k++) begin
      if (k < n) begin
        x = (k - (n - 1) / 2.0) / osr;
        w = $exp(-(x * x) / (2.0 * sigma * sigma)) * total / tsum;
        t[k] = $rtoi($floor(w + 0.5));
        acc = acc + t[k];
      end else begin
        t[k] = 0;
      end
    end
    t[(n - 1) / 2] = t[(n - 1) / 2] + (total - acc);
    return t;
  endfunction

endpackage

// gmsk_modulator: GMSK modulator with BT = 0.3, producing an IF signal.
//
// The chain is the document's: a differential encoder (d = b xor previous b,
// sent as the NRZ level +1 for d = 0 and -1 for d = 1), a Gaussian filter
// with BT = 0.3, an integrator that turns frequency into phase, and two
// multipliers that mix cos(phase) with cos(w0) and sin(phase) with -sin(w0)
// before the sum goes to the RF stage. The digital form is this design's:
// the clock is the sample clock, OSR samples per bit; the filter is an FIR
// with 3*OSR+1 taps of the Gaussian pulse sampled at T/OSR and scaled so that
// one bit turns the phase by exactly pi/2 (modulation index 0.5); phase and
// carrier phase are PHASE_W-bit accumulators (2**PHASE_W = one turn); sine
// and cosine come from a 256-entry table; the carrier advances CARRIER_STEP
// per sample (default a quarter turn, an IF of a quarter of the sample rate).
//
// Interface: a new bit is taken every OSR cycles (bit_ready pulses); if none
// is offered the modulator sends a 0 (idle fill) so the signal never stops.
// burst_start pulses in the cycle a bit flagged bit_first is taken. i_out and
// q_out are cos/sin of the GMSK phase, rf_out the mixed IF sample; all three
// are registered, 4 cycles after the filter input changes.
module gmsk_modulator
  import gsm_pkg::*;
#(
  parameter int              OSR          = 8,
  parameter real             BT           = 0.3,
  parameter logic [PHASE_W-1:0] CARRIER_STEP = 16'h4000
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                bit_valid,
  output logic                bit_ready,
  input  logic                bit_in,
  input  logic                bit_first,
  output logic                burst_start,
  output amp_t                i_out,
  output amp_t                q_out,
  output logic signed [AMP_W:0] rf_out
);
  localparam int NTAPS = 3 * OSR + 1;
  localparam gauss_tab_t TAPS = make_gauss_tab(OSR, BT);
  localparam int FW = PHASE_W + 1;                   // filter output width

  logic [$clog2(OSR)-1:0] scnt;                      // sample in bit period
  logic                   prev_b;                    // differential encoder register
  logic                   d_cur;                     // encoded bit being sent
  logic [NTAPS-1:0]       nrz;                       // 1 = level -1, nrz[0] newest
  logic signed [FW-1:0]   freq;
  logic [PHASE_W-1:0]     phase, cphase;

  assign bit_ready = (scnt == '0);
  wire   take      = bit_ready;                      // a bit (or idle 0) every OSR samples
  wire   b_now     = bit_valid ? bit_in : 1'b0;
  wire   d_now     = b_now ^ prev_b;

  // Gaussian FIR over the held NRZ levels.
  logic signed [FW-1:0] fsum;
  always_comb begin
    fsum = '0;
    for (int k = 0; k < NTAPS; k++)
      fsum = nrz[k] ? fsum - FW'(TAPS[k]) : fsum + FW'(TAPS[k]);
  end

  logic signed [2*AMP_W-1:0] pi_, pq_;
  amp_t                      cc, cs;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      scnt        <= '0;
      prev_b      <= 1'b0;
      d_cur       <= 1'b0;
      nrz         <= '0;
      freq        <= '0;
      phase       <= '0;
      cphase      <= '0;
      i_out       <= '0;
      q_out       <= '0;
      cc          <= '0;
      cs          <= '0;
      rf_out      <= '0;
      burst_start <= 1'b0;
    end else begin
      scnt        <= (scnt == $clog2(OSR)'(OSR-1)) ? '0 : scnt + 1'b1;
      burst_start <= take && bit_valid && bit_first;
      if (take) begin
        prev_b <= b_now;
        d_cur  <= d_now;
        nrz    <= {nrz[NTAPS-2:0], d_now};
      end else begin
        nrz    <= {nrz[NTAPS-2:0], d_cur};
      end
      freq   <= fsum;
      phase  <= phase + PHASE_W'(freq);             // integrator
      i_out  <= cos_lut(phase);
      q_out  <= sin_lut(phase);
      cphase <= cphase + CARRIER_STEP;
      cc     <= cos_lut(cphase);
      cs     <= sin_lut(cphase);
      rf_out <= (AMP_W+1)'((pi_ - pq_) >>> (AMP_W-1));
    end
  end

  // I * cos(w0) + Q * (-sin(w0))
  assign pi_ = i_out * cc;
  assign pq_ = q_out * cs;
endmodule

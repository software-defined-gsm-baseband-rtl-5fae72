// gmsk_demodulator: recovers per-bit soft decisions and data bits from the
// GMSK IF signal.
//
// The chain follows the document's receiver: a band-pass filter, mixing with
// cos(w0) and -sin(w0) into I and Q, a derivator and a low-pass filter in
// each branch, a sum, and a register with a modulo-2 adder that undoes the
// differential encoding. The filters and the combination are this design's:
// the band-pass filter is x(n) - x(n-2), which passes a quarter of the sample
// rate (the default IF) and blocks DC and half the sample rate; the low-pass
// filter averages two samples, which cancels the mixing product at twice the
// IF; since both filters and the derivator are linear, the derivator is
// applied after the low-pass filter, and the sum combines the two branches as
// the frequency discriminator I*dQ - Q*dI. The discriminator is summed over
// each bit period (integrate and dump): its sign is the NRZ level of the
// differentially encoded symbol, its value (soft_out, saturated to 8 bits) is
// what the equalizer works on, and diff_decoder turns the sign into data bits.
//
// Timing: the clock is the sample clock. burst_start marks, in the cycle of
// the first IF sample of a burst, the start of its first bit; the integration
// windows are aligned DUMP_DELAY samples later and repeat every OSR samples.
// soft_valid pulses once per bit, soft_first with the first bit of a burst.
module gmsk_demodulator
  import gsm_pkg::*;
#(
  parameter int                 OSR          = 8,
  parameter int                 DUMP_DELAY   = 20,
  parameter logic [PHASE_W-1:0] CARRIER_STEP = 16'h4000
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic signed [AMP_W:0] rf_in,
  input  logic                  burst_start,
  output logic                  soft_valid,
  output logic                  soft_first,
  output logic signed [7:0]     soft_out,
  output logic                  sym_out,      // differentially encoded bit (sign)
  output logic                  bit_out       // after modulo-2 differential decoding
);
  localparam int XW = AMP_W + 2;             // band-pass output width
  localparam int PW = 2 * XW + 2;            // discriminator product width
  localparam int AW = 20;                    // integrator width

  logic signed [AMP_W:0]   x1, x2;
  logic signed [XW-1:0]    bp;
  logic [PHASE_W-1:0]      cphase;
  logic signed [XW-1:0]    mi, mq, mi_d, mq_d;
  logic signed [XW-1:0]    li, lq, li_d, lq_d;
  logic signed [PW-1:0]    disc;
  logic signed [AW-1:0]    acc;
  logic [DUMP_DELAY-1:0]   mark_dly;
  logic [$clog2(OSR)-1:0]  scnt;
  logic                    first_pend;

  // mixing products (scaled back by the table amplitude)
  logic signed [XW+AMP_W-1:0] pmi, pmq;
  assign pmi = bp * cos_lut(cphase);
  assign pmq = -(bp * sin_lut(cphase));

  // derivator and discriminator: I*dQ - Q*dI
  logic signed [XW:0]   di, dq;
  assign di   = li - li_d;
  assign dq   = lq - lq_d;
  wire signed [PW-1:0] xprod = PW'(li * dq) - PW'(lq * di);

  wire mark  = mark_dly[DUMP_DELAY-1];
  wire dump  = (scnt == $clog2(OSR)'(OSR-1));
  wire signed [AW-1:0] acc_n = acc + AW'(disc >>> 8);
  wire signed [AW-1:0] soft_full = acc_n >>> 8;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x1 <= '0; x2 <= '0; bp <= '0; cphase <= '0;
      mi <= '0; mq <= '0; mi_d <= '0; mq_d <= '0;
      li <= '0; lq <= '0; li_d <= '0; lq_d <= '0;
      disc <= '0; acc <= '0; mark_dly <= '0; scnt <= '0;
      first_pend <= 1'b0;
      soft_valid <= 1'b0; soft_first <= 1'b0; soft_out <= '0;
    end else begin
      // band-pass filter
      x1 <= rf_in;
      x2 <= x1;
      bp <= XW'(rf_in) - XW'(x2);
      // carrier and mixers
      cphase <= cphase + CARRIER_STEP;
      mi <= XW'(pmi >>> (AMP_W-1));
      mq <= XW'(pmq >>> (AMP_W-1));
      mi_d <= mi;
      mq_d <= mq;
      // low-pass filter (two-sample average)
      li <= XW'((XW+1)'(mi) + (XW+1)'(mi_d)) >>> 1;
      lq <= XW'((XW+1)'(mq) + (XW+1)'(mq_d)) >>> 1;
      li_d <= li;
      lq_d <= lq;
      disc <= xprod;
      // bit timing
      mark_dly <= {mark_dly[DUMP_DELAY-2:0], burst_start};
      soft_valid <= 1'b0;
      if (mark) begin
        scnt       <= '0;
        acc        <= AW'(disc >>> 8);
        first_pend <= 1'b1;
      end else if (dump) begin
        scnt       <= '0;
        acc        <= '0;
        soft_valid <= 1'b1;
        soft_first <= first_pend;
        first_pend <= 1'b0;
        soft_out   <= (soft_full > 127) ? 8'sd127 : (soft_full < -127) ? -8'sd127 : 8'(soft_full);
      end else begin
        scnt <= scnt + 1'b1;
        acc  <= acc_n;
      end
    end
  end

  assign sym_out = soft_out[7];

  diff_decoder u_dd (
    .clk, .rst_n,
    .first  (1'b0),
    .ref_bit(1'b0),
    .en     (soft_valid),
    .in_bit (sym_out),
    .out_bit(bit_out)
  );
endmodule

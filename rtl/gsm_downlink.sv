// gsm_downlink: the baseband receiver. The IF signal goes through the GMSK
// demodulator (per-bit soft values), the Viterbi equalizer (symbol decisions
// for the 114 data bits of a burst), the modulo-2 differential decoder, the
// deinterleaver (456 bits in their original order) and the channel decoder,
// which returns the 260-bit speech frame and a parity check of the class Ia
// bits.
//
// The order demodulator -> equalizer -> deinterleaver -> channel decoder is
// the document's. Here the differential decoding (the demodulator's register
// and modulo-2 adder) runs after the equalizer, because the equalizer works
// on the differentially encoded symbols the discriminator sees; the first
// data bit of a burst is decoded against the last training bit.
//
// Interface: rf_in is one sample per cycle; burst_start is the transmitter's
// burst_start pulse, delayed by as many cycles as the signal (burst
// synchronisation itself is outside the design). Frame bits leave with
// valid/ready, out_last on bit 260, parity_ok valid with them.
module gsm_downlink
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
  output logic                  out_valid,
  input  logic                  out_ready,
  output logic                  out_bit,
  output logic                  out_last,
  output logic                  parity_ok,
  output logic                  raw_valid,   // demodulator's own hard decisions
  output logic                  raw_bit,
  output logic signed [8:0]     h_est [3]    // equalizer's channel estimate
);
  logic              s_valid, s_first, s_sym;
  logic signed [7:0] s_soft;
  logic              eq_busy, eq_valid, eq_ready, eq_bit, eq_first;
  logic              dd_bit;
  logic              di_valid, di_ready, di_bit, di_last;

  gmsk_demodulator #(.OSR(OSR), .DUMP_DELAY(DUMP_DELAY), .CARRIER_STEP(CARRIER_STEP)) u_demod (
    .clk, .rst_n,
    .rf_in, .burst_start,
    .soft_valid(s_valid), .soft_first(s_first), .soft_out(s_soft),
    .sym_out(s_sym), .bit_out(raw_bit)
  );
  assign raw_valid = s_valid;

  viterbi_equalizer u_eq (
    .clk, .rst_n,
    .in_valid(s_valid), .in_first(s_first), .in_soft(s_soft),
    .busy(eq_busy),
    .out_valid(eq_valid), .out_ready(eq_ready), .out_bit(eq_bit), .out_first(eq_first),
    .h_est
  );

  diff_decoder u_dd (
    .clk, .rst_n,
    .first  (eq_first),
    .ref_bit(TSC_TX[0]),                  // last training bit sent
    .en     (eq_valid && eq_ready),
    .in_bit (eq_bit),
    .out_bit(dd_bit)
  );

  deinterleaver u_di (
    .clk, .rst_n,
    .in_valid (eq_valid), .in_ready(eq_ready), .in_bit(dd_bit),
    .out_valid(di_valid), .out_ready(di_ready), .out_bit(di_bit), .out_last(di_last)
  );

  channel_decoder u_cd (
    .clk, .rst_n,
    .in_valid (di_valid), .in_ready(di_ready), .in_bit(di_bit),
    .out_valid, .out_ready, .out_bit, .out_last, .parity_ok
  );

  // A burst must not arrive while the equalizer is still busy with the last.
  always_ff @(posedge clk) begin
    if (rst_n && s_valid && s_first)
      assert (!eq_busy && !eq_valid) else $error("burst arrived while the equalizer was busy");
  end
  logic unused;
  assign unused = s_sym ^ di_last;
endmodule

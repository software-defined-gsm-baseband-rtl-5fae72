// gsm_uplink: the baseband transmitter. A 260-bit speech frame goes through
// the channel encoder (456 bits), the interleaver (4 bursts of 114 bits), the
// burst formatter (tail, training sequence, data, tail, guard) and the GMSK
// modulator, which produces the IF signal for the RF stage.
//
// The chain channel encoder -> interleaver -> GMSK modulator is the
// document's; the burst formatter between the last two is this design's (it
// supplies the training sequence the receiver's equalizer needs).
//
// Interface: frame bits in with valid/ready; the clock is the sample clock
// (OSR samples per bit). i_out/q_out/rf_out are new every cycle; burst_start
// pulses one cycle after the first tail bit of a burst enters the
// modulator's filter, four cycles ahead of that bit's first effect on rf_out.
module gsm_uplink
  import gsm_pkg::*;
#(
  parameter int                 OSR          = 8,
  parameter logic [PHASE_W-1:0] CARRIER_STEP = 16'h4000
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  output logic                  in_ready,
  input  logic                  in_bit,
  output logic                  burst_start,
  output amp_t                  i_out,
  output amp_t                  q_out,
  output logic signed [AMP_W:0] rf_out
);
  logic ce_valid, ce_ready, ce_bit, ce_last;
  logic il_valid, il_ready, il_bit, il_last;
  logic bf_valid, bf_ready, bf_bit, bf_first;

  channel_encoder u_enc (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_bit,
    .out_valid(ce_valid), .out_ready(ce_ready), .out_bit(ce_bit), .out_last(ce_last)
  );

  interleaver u_il (
    .clk, .rst_n,
    .in_valid (ce_valid), .in_ready(ce_ready), .in_bit(ce_bit),
    .out_valid(il_valid), .out_ready(il_ready), .out_bit(il_bit), .out_last(il_last)
  );

  burst_formatter u_bf (
    .clk, .rst_n,
    .in_valid (il_valid), .in_ready(il_ready), .in_bit(il_bit),
    .out_valid(bf_valid), .out_ready(bf_ready), .out_bit(bf_bit), .out_first(bf_first)
  );

  gmsk_modulator #(.OSR(OSR), .CARRIER_STEP(CARRIER_STEP)) u_mod (
    .clk, .rst_n,
    .bit_valid(bf_valid), .bit_ready(bf_ready), .bit_in(bf_bit), .bit_first(bf_first),
    .burst_start, .i_out, .q_out, .rf_out
  );

  // The frame and burst boundaries are implied by the counts; the last flags
  // serve only as checks.
  always_ff @(posedge clk) begin
    if (rst_n && ce_valid && ce_ready && ce_last)
      assert (il_valid == 1'b0) else $error("interleaver busy at the end of a frame");
  end
  logic unused;
  assign unused = il_last;
endmodule

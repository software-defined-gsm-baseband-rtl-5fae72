// gsm_baseband_top: the GSM baseband processor, transmitter and receiver side
// by side on one chip, as a telemedicine terminal would use them: speech or
// bio-signal frames of 260 bits go out through gsm_uplink as a GMSK IF signal,
// and an IF signal coming in through gsm_downlink returns 260-bit frames.
//
// The two halves share only the clock and reset; the RF/IF stage between
// tx_rf and rx_rf is outside the design. All parameters are handed down.
module gsm_baseband_top
  import gsm_pkg::*;
#(
  parameter int                 OSR          = 8,
  parameter int                 DUMP_DELAY   = 20,
  parameter logic [PHASE_W-1:0] CARRIER_STEP = 16'h4000
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // transmitter
  input  logic                  tx_valid,
  output logic                  tx_ready,
  input  logic                  tx_bit,
  output logic                  tx_burst_start,
  output amp_t                  tx_i,
  output amp_t                  tx_q,
  output logic signed [AMP_W:0] tx_rf,
  // receiver
  input  logic signed [AMP_W:0] rx_rf,
  input  logic                  rx_burst_start,
  output logic                  rx_valid,
  input  logic                  rx_ready,
  output logic                  rx_bit,
  output logic                  rx_last,
  output logic                  rx_parity_ok,
  output logic                  rx_raw_valid,
  output logic                  rx_raw_bit,
  output logic signed [8:0]     rx_h_est [3]
);
  gsm_uplink #(.OSR(OSR), .CARRIER_STEP(CARRIER_STEP)) u_tx (
    .clk, .rst_n,
    .in_valid(tx_valid), .in_ready(tx_ready), .in_bit(tx_bit),
    .burst_start(tx_burst_start), .i_out(tx_i), .q_out(tx_q), .rf_out(tx_rf)
  );

  gsm_downlink #(.OSR(OSR), .DUMP_DELAY(DUMP_DELAY), .CARRIER_STEP(CARRIER_STEP)) u_rx (
    .clk, .rst_n,
    .rf_in(rx_rf), .burst_start(rx_burst_start),
    .out_valid(rx_valid), .out_ready(rx_ready), .out_bit(rx_bit), .out_last(rx_last),
    .parity_ok(rx_parity_ok), .raw_valid(rx_raw_valid), .raw_bit(rx_raw_bit),
    .h_est(rx_h_est)
  );
endmodule

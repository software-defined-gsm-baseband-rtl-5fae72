// burst_formatter: frames each 114-bit interleaved burst for the air as
// 3 tail bits (0), 26 training bits, the 114 data bits and 3 tail bits (0),
// 146 bits in all, followed by GUARD_BITS bit periods in which it offers
// nothing (the modulator then sends idle zeros).
//
// The training bits are GSM training sequence code 0 pre-coded so that,
// after the modulator's differential encoder, the transmitted symbols are the
// training sequence itself; the receiver's equalizer estimates the channel
// from them. This framing is this design's own: the document's transmitter
// chain goes from the interleaver straight to the modulator, but its receiver
// needs a known training sequence, which only the transmitter can supply.
//
// Interface: valid/ready in (from the interleaver) and valid/ready out, where
// out_ready is the modulator's once-per-bit-period request; out_first marks
// the first bit of a burst. A burst starts
// only when its first data bit is already waiting, so the data section is
// never starved by a ready source.
module burst_formatter
  import gsm_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  logic in_bit,
  output logic out_valid,
  input  logic out_ready,
  output logic out_bit,
  output logic out_first
);
  logic       active;
  logic [7:0] pos;                       // 0 .. BURST_LEN-1
  logic [7:0] guard;                     // bit periods of guard left

  wire in_data  = pos >= 8'(DATA_START) && pos < 8'(DATA_START + BURST_DATA);
  wire in_tsc   = pos >= 8'(TSC_START) && pos < 8'(DATA_START);

  // index into the training bits, MSB first
  wire [4:0] tsc_idx = 5'(8'(TSC_START + TSC_LEN - 1) - pos);

  assign out_valid = active ? (in_data ? in_valid : 1'b1) : (in_valid && guard == '0);
  assign in_ready  = active && in_data && out_ready;
  assign out_first = !active || pos == '0;
  always_comb begin
    if (active && in_data)     out_bit = in_bit;
    else if (active && in_tsc) out_bit = TSC_TX[tsc_idx];
    else                       out_bit = 1'b0;
  end

  wire out_fire = out_valid && out_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      active <= 1'b0;
      pos    <= '0;
      guard  <= '0;
    end else if (!active && guard != '0) begin
      if (out_ready) guard <= guard - 1'b1;  // one bit period of guard
    end else if (out_fire) begin
      if (!active) begin
        active <= 1'b1;                  // bit 0 (a tail bit) sent now
        pos    <= 8'd1;
      end else if (pos == 8'(BURST_LEN-1)) begin
        active <= 1'b0;
        pos    <= '0;
        guard  <= 8'(GUARD_BITS);
      end else begin
        pos <= pos + 1'b1;
      end
    end
  end
endmodule

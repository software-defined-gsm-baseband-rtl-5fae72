// channel_decoder: turns a 456-bit coded frame back into the 260-bit speech
// frame and checks the class Ia parity.
//
// The first 378 bits go to the hard-decision Viterbi decoder, which returns
// the 189-bit block Ia | parity | Ib | tail; the last 78 bits are the
// uncoded class II bits and are stored as they come. While the decoded block
// streams back, its 50 Ia bits run through the same (53,50) cyclic encoder as
// in the transmitter and the 3 recomputed parity bits are compared with the
// 3 received ones: parity_ok says whether they agree. This mirrors the
// transmitter described in the document; the parity check and the
// parity_ok output are this design's own completion of the receive side.
//
// Interface: serial valid/ready in (456 bits) and out (260 bits, out_last on
// the last). parity_ok is valid while the frame is sent out.
module channel_decoder
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
  output logic out_last,
  output logic parity_ok
);
  typedef enum logic [1:0] {S_IN, S_DEC, S_OUT} state_t;
  state_t state;

  logic [N_SPEECH-1:0] frame;
  logic [2:0]          rx_parity;
  logic [8:0]          cnt;
  logic [7:0]          j;            // index of the decoded bit
  logic [2:0]          calc_parity;

  logic vd_in_ready, vd_valid, vd_bit, vd_last;
  wire  to_vd = (state == S_IN) && cnt < 9'(N_CODED);

  viterbi_decoder #(.N_INFO(N_INFO)) u_vd (
    .clk, .rst_n,
    .in_valid (in_valid && to_vd),
    .in_ready (vd_in_ready),
    .in_bit,
    .out_valid(vd_valid),
    .out_ready(state == S_DEC),
    .out_bit  (vd_bit),
    .out_last (vd_last)
  );

  wire vd_fire = vd_valid && state == S_DEC;

  cyclic_encoder u_crc (
    .clk, .rst_n,
    .clear (state == S_IN),
    .en    (vd_fire && j < 8'(N_IA)),
    .din   (vd_bit),
    .parity(calc_parity)
  );

  assign in_ready  = (state == S_IN) && (to_vd ? vd_in_ready : 1'b1);
  wire   in_fire   = in_valid && in_ready;
  wire   out_fire  = out_valid && out_ready;
  assign out_valid = (state == S_OUT);
  assign out_bit   = frame[cnt];
  assign out_last  = out_valid && cnt == 9'(N_SPEECH-1);
  assign parity_ok = (calc_parity == rx_parity);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IN;
      cnt       <= '0;
      j         <= '0;
      frame     <= '0;
      rx_parity <= '0;
    end else begin
      unique case (state)
        S_IN: if (in_fire) begin
          if (!to_vd) frame[cnt - 9'(N_CODED) + 9'(N_IA + N_IB)] <= in_bit;
          if (cnt == 9'(N_FRAME-1)) begin
            cnt   <= '0;
            j     <= '0;
            state <= S_DEC;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_DEC: if (vd_fire) begin
          if (j < 8'(N_IA))                          frame[9'(j)] <= vd_bit;
          else if (j < 8'(N_IA + N_PARITY))          rx_parity[2'(j - 8'(N_IA))] <= vd_bit;
          else if (j < 8'(N_IA + N_PARITY + N_IB))   frame[9'(j) - 9'(N_PARITY)] <= vd_bit;
          j <= j + 1'b1;
          if (vd_last) state <= S_OUT;
        end
        S_OUT: if (out_fire) begin
          if (cnt == 9'(N_SPEECH-1)) begin
            cnt   <= '0;
            state <= S_IN;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        default: state <= S_IN;
      endcase
    end
  end
endmodule

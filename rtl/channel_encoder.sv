// channel_encoder: turns one 260-bit speech frame into the 456-bit coded frame.
//
// Input bits arrive serially (class Ia bits 0..49, Ib 50..181, II 182..259)
// and are stored while the Ia bits also run through the (53,50) cyclic
// encoder. The 189-bit block Ia | parity(Reg1,Reg2,Reg3) | Ib | 0000 then goes
// through the rate-1/2 convolutional encoder, emitting G1 then G2 for each
// bit (378 bits), and the 78 class II bits follow uncoded: 456 bits in all.
// The sizes, the order of the parts and the codes are the document's; the
// serial valid/ready interface, the one-frame buffer and the G1-before-G2
// output order are this design's choices.
//
// Timing: in_ready is high while a frame is being taken in (one bit per
// accepted cycle); after bit 260 the frame is sent out at up to one bit per
// cycle (out_valid until out_ready). out_last marks bit 456. A new frame is
// taken only after the previous one has left.
module channel_encoder
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
  output logic out_last
);
  typedef enum logic [1:0] {S_IN, S_CODE, S_CLASS2} state_t;
  state_t state;

  logic [N_SPEECH-1:0] frame;        // frame[i] = input bit i
  logic [8:0]          cnt;          // input index, info index or class II index
  logic                half;         // 0: G1 output, 1: G2 output
  logic [2:0]          parity;
  logic                u, c1, c2;

  wire in_fire  = in_valid && in_ready;
  wire out_fire = out_valid && out_ready;

  cyclic_encoder u_crc (
    .clk, .rst_n,
    .clear (state == S_CLASS2 && out_fire && cnt == 9'(N_II-1)),
    .en    (in_fire && cnt < 9'(N_IA)),
    .din   (in_bit),
    .parity(parity)
  );

  // Bit j of the 189-bit block fed to the convolutional encoder.
  always_comb begin
    if (cnt < 9'(N_IA))                        u = frame[cnt];
    else if (cnt < 9'(N_IA + N_PARITY))        u = parity[2'(cnt - 9'(N_IA))];
    else if (cnt < 9'(N_IA + N_PARITY + N_IB)) u = frame[cnt - 9'(N_PARITY)];
    else                                       u = 1'b0;   // tail bits
  end

  conv_encoder u_conv (
    .clk, .rst_n,
    .clear (state == S_IN),
    .en    (state == S_CODE && out_fire && half),
    .din   (u),
    .c1, .c2
  );

  assign in_ready  = (state == S_IN);
  assign out_valid = (state != S_IN);
  assign out_bit   = (state == S_CODE) ? (half ? c2 : c1) : frame[cnt + 9'(N_IA + N_IB)];
  assign out_last  = (state == S_CLASS2) && cnt == 9'(N_II-1);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IN;
      cnt   <= '0;
      half  <= 1'b0;
      frame <= '0;
    end else begin
      unique case (state)
        S_IN: if (in_fire) begin
          frame[cnt] <= in_bit;
          if (cnt == 9'(N_SPEECH-1)) begin
            cnt   <= '0;
            half  <= 1'b0;
            state <= S_CODE;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_CODE: if (out_fire) begin
          half <= ~half;
          if (half) begin
            if (cnt == 9'(N_INFO-1)) begin
              cnt   <= '0;
              state <= S_CLASS2;
            end else begin
              cnt <= cnt + 1'b1;
            end
          end
        end
        S_CLASS2: if (out_fire) begin
          if (cnt == 9'(N_II-1)) begin
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

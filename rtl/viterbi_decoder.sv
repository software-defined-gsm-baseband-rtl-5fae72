// viterbi_decoder: hard-decision Viterbi decoder for the rate-1/2, 16-state
// convolutional code G1 = x^4 + x^3 + 1, G2 = x^4 + x^3 + x + 1.
//
// The three steps are the document's: branch metrics are the Hamming distance
// between a received bit pair and the pair a transition would send; add-
// compare-select keeps, for every state, the predecessor with the smaller
// path metric; a trace back through the stored decisions yields the bits.
// Everything else is this design's choice: the encoder starts in state 0 and
// the block ends with N_TAIL zero bits, so decoding starts with only state 0
// at metric 0 and the trace back starts from state 0; all 16 ACS units work
// in parallel, one trellis step per received pair; the 16 decision bits of
// every step are kept in a N_INFO x 16 memory.
//
// State s = {d3, d2, d1, d0}, d0 the newest bit in the encoder delay line.
// Input u moves state s to {s[2:0], u} and sends c1 = u^s2^s3,
// c2 = u^s0^s2^s3. The predecessors of state n are {0, n[3:1]} and
// {1, n[3:1]}; the decision bit is the leading bit of the survivor.
//
// Interface: 2*N_INFO code bits in (c1 then c2 of each step, valid/ready),
// then N_INFO cycles of trace back, then N_INFO decoded bits out (valid/ready,
// out_last on the last). Latency from the last code bit to the first decoded
// bit is N_INFO + 1 cycles.
module viterbi_decoder #(
  parameter int N_INFO = 189
) (
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
  localparam int NS  = 16;
  localparam int MW  = 11;                      // path metric width
  localparam int CW  = $clog2(N_INFO + 1);
  typedef logic [MW-1:0] metric_t;

  typedef enum logic [1:0] {S_ACS, S_TB, S_OUT} state_t;
  state_t state;

  metric_t       pm [NS];
  logic [NS-1:0] dec [N_INFO];
  logic          obuf [N_INFO];
  logic [CW-1:0] step;
  logic          have_first;
  logic          r1;                            // first bit of the pair
  logic [3:0]    tb_state;

  wire in_fire  = in_valid && in_ready;
  wire out_fire = out_valid && out_ready;
  wire do_acs   = in_fire && have_first;

  // Expected output pair of the transition from s with input u.
  function automatic logic [1:0] code_pair(input logic [3:0] s, input logic u);
    return {u ^ s[2] ^ s[3], u ^ s[0] ^ s[2] ^ s[3]};
  endfunction

  function automatic logic [1:0] hamming(input logic [1:0] a, input logic [1:0] b);
    logic [1:0] x;
    x = a ^ b;
    return {1'b0, x[1]} + {1'b0, x[0]};
  endfunction

  metric_t       pm_next [NS];
  logic [NS-1:0] dec_next;

  always_comb begin
    for (int n = 0; n < NS; n++) begin
      logic [3:0] p0, p1;
      metric_t    m0, m1;
      p0 = {1'b0, 3'(n >> 1)};
      p1 = {1'b1, 3'(n >> 1)};
      m0 = pm[p0] + MW'(hamming(code_pair(p0, n[0]), {r1, in_bit}));
      m1 = pm[p1] + MW'(hamming(code_pair(p1, n[0]), {r1, in_bit}));
      dec_next[n] = (m1 < m0);
      pm_next[n]  = (m1 < m0) ? m1 : m0;
    end
  end

  assign in_ready  = (state == S_ACS);
  assign out_valid = (state == S_OUT);
  assign out_bit   = obuf[step];
  assign out_last  = out_valid && step == CW'(N_INFO-1);

  always_ff @(posedge clk) begin
    if (do_acs) dec[step] <= dec_next;
    if (state == S_TB) obuf[step] <= tb_state[0];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= S_ACS;
      step       <= '0;
      have_first <= 1'b0;
      r1         <= 1'b0;
      tb_state   <= '0;
      for (int n = 0; n < NS; n++) pm[n] <= (n == 0) ? '0 : MW'(256);
    end else begin
      unique case (state)
        S_ACS: if (in_fire) begin
          have_first <= ~have_first;
          if (!have_first) begin
            r1 <= in_bit;
          end else begin
            for (int n = 0; n < NS; n++) pm[n] <= pm_next[n];
            if (step == CW'(N_INFO-1)) begin
              state    <= S_TB;
              tb_state <= '0;               // tail bits end the block in state 0
            end else begin
              step <= step + 1'b1;
            end
          end
        end
        S_TB: begin
          // tb_state is the state after step 'step'; its newest bit is u(step).
          tb_state <= {dec[step][tb_state], tb_state[3:1]};
          if (step == '0) state <= S_OUT;
          else            step  <= step - 1'b1;
        end
        S_OUT: if (out_fire) begin
          if (step == CW'(N_INFO-1)) begin
            step  <= '0;
            state <= S_ACS;
            for (int n = 0; n < NS; n++) pm[n] <= (n == 0) ? '0 : MW'(256);
          end else begin
            step <= step + 1'b1;
          end
        end
        default: state <= S_ACS;
      endcase
    end
  end
endmodule

// viterbi_equalizer: maximum-likelihood sequence equalizer for one burst of
// per-bit soft values from the GMSK demodulator.
//
// The parts are the document's: a matched filter whose coefficients come from
// cross-correlating the received training section with the known training
// sequence, a branch metric cell using the squared Euclidean distance, an
// add-compare-select unit, the accumulated path metric (APM) register, a
// decision cell and a trace back cell. Their sizes and arrangement are this
// design's choices:
//  * Channel model: r(n) = h0*a(n+1) + h1*a(n) + h2*a(n-1), a = +1 for symbol
//    0 and -1 for symbol 1 (TAPS = 3, one symbol of look-ahead). The
//    coefficients are estimated over the 16 middle training symbols:
//    h_k = (1/16) * sum_j r(TSC_START+4+j+k) * a_tsc(5+j), which is exact for
//    GSM training code 0 because its middle 16 symbols correlate to zero with
//    shifts of up to 5.
//  * Trellis: 4 states (a(m-1), a(m-2)); step m compares r(m-1) with the
//    hypothesis h0*a(m) + h1*a(m-1) + h2*a(m-2). It starts at the first data
//    symbol in the state given by the last two training symbols and runs to
//    the end of the burst; the trace back starts from the state with the
//    smallest APM.
//  * All four ACS units work in parallel, one trellis step per cycle; the
//    4-bit decisions of each step are kept in a memory for the trace back.
//
// Interface: soft values arrive with in_valid; in_first marks the first bit
// of a burst (BURST_LEN values). The block then estimates (16 cycles), runs
// the trellis (BURST_LEN-DATA_START cycles), traces back (same) and sends the
// BURST_DATA data symbols (valid/ready, out_first on the first), as symbol
// bits in the differentially encoded domain. Input is ignored while busy.
module viterbi_equalizer
  import gsm_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic              in_first,
  input  logic signed [7:0] in_soft,
  output logic              busy,
  output logic              out_valid,
  input  logic              out_ready,
  output logic              out_bit,
  output logic              out_first,
  output logic signed [8:0] h_est [3]       // channel estimate, for observation
);
  localparam int NSTEP = BURST_LEN - DATA_START;     // 117 trellis steps
  localparam int MW    = 28;                         // APM width
  typedef logic [MW-1:0] metric_t;
  typedef logic signed [8:0] coef_t;

  typedef enum logic [2:0] {S_IDLE, S_FILL, S_EST, S_VIT, S_TB, S_OUT} state_t;
  state_t state;

  logic signed [7:0]  r [BURST_LEN];
  logic [7:0]         cnt;
  logic signed [12:0] corr [3];
  coef_t              h [3];
  metric_t            apm [4];
  logic [3:0]         dec [NSTEP];
  logic               obuf [NSTEP];
  logic [1:0]         tb_s;

  assign busy = (state != S_IDLE) && (state != S_FILL);

  function automatic logic signed [10:0] lvl(input coef_t c, input logic sym);
    return sym ? -11'(c) : 11'(c);
  endfunction

  // ---- branch metrics, ACS
  logic signed [7:0] q;
  assign q = r[8'(DATA_START - 2) + cnt];   // r(m-1), m = DATA_START + cnt - 1
  metric_t apm_n [4];
  logic [3:0] dec_n;
  always_comb begin
    for (int n = 0; n < 4; n++) begin
      metric_t m [2];
      for (int x = 0; x < 2; x++) begin
        logic signed [10:0] y;
        logic signed [11:0] e;
        logic [1:0]         p;
        p = {n[0], x[0]};
        y = lvl(h[0], n[1]) + lvl(h[1], n[0]) + lvl(h[2], x[0]);
        e = 12'(q) - 12'(y);
        m[x] = apm[p] + MW'(unsigned'(24'(e * e)));
      end
      dec_n[n]  = (m[1] < m[0]);
      apm_n[n]  = (m[1] < m[0]) ? m[1] : m[0];
    end
  end

  // best final state
  logic [1:0] best;
  always_comb begin
    best = 2'd0;
    for (int n = 1; n < 4; n++) if (apm[n] < apm[best]) best = 2'(n);
  end

  assign out_valid = (state == S_OUT);
  assign out_bit   = obuf[cnt[6:0]];
  assign out_first = out_valid && cnt == '0;
  assign h_est     = h;

  wire out_fire = out_valid && out_ready;
  wire tsc_sym  = tsc_symbol(5 + int'(cnt[3:0]));

  always_ff @(posedge clk) begin
    if (state == S_FILL && in_valid) r[cnt] <= in_soft;
    else if (state == S_IDLE && in_valid && in_first) r[0] <= in_soft;
    if (state == S_VIT && cnt != '0 && cnt <= 8'(NSTEP)) dec[7'(cnt - 1'b1)] <= dec_n;
    if (state == S_TB)  obuf[cnt[6:0]] <= tb_s[1];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cnt   <= '0;
      tb_s  <= '0;
      for (int k = 0; k < 3; k++) begin corr[k] <= '0; h[k] <= '0; end
      for (int n = 0; n < 4; n++) apm[n] <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (in_valid && in_first) begin
          state <= S_FILL;
          cnt   <= 8'd1;
        end
        S_FILL: if (in_valid) begin
          if (cnt == 8'(BURST_LEN-1)) begin
            state <= S_EST;
            cnt   <= '0;
            for (int k = 0; k < 3; k++) corr[k] <= '0;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_EST: begin
          // matched filter: correlate with the middle 16 training symbols
          for (int k = 0; k < 3; k++) begin
            logic signed [7:0] rv;
            rv = r[8'(TSC_START + 4 + k) + cnt];
            corr[k] <= tsc_sym ? corr[k] - 13'(rv) : corr[k] + 13'(rv);
          end
          if (cnt == 8'd15) begin
            state <= S_VIT;
            cnt   <= '0;
            for (int n = 0; n < 4; n++)
              apm[n] <= (2'(n) == {tsc_symbol(TSC_LEN-1), tsc_symbol(TSC_LEN-2)}) ? '0 : MW'(1 << 24);
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_VIT: begin
          // cnt 0: load the coefficients; cnt 1..NSTEP: trellis step cnt-1
          if (cnt == '0)
            for (int k = 0; k < 3; k++) h[k] <= coef_t'(corr[k] >>> 4);
          else if (cnt <= 8'(NSTEP))
            for (int n = 0; n < 4; n++) apm[n] <= apm_n[n];
          if (cnt == 8'(NSTEP + 1)) begin
            state <= S_TB;
            cnt   <= 8'(NSTEP-1);
            tb_s  <= best;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_TB: begin
          tb_s <= {tb_s[0], dec[cnt[6:0]][tb_s]};
          if (cnt == '0) state <= S_OUT;
          else           cnt   <= cnt - 1'b1;
        end
        S_OUT: if (out_fire) begin
          if (cnt == 8'(BURST_DATA-1)) begin
            cnt   <= '0;
            state <= S_IDLE;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule

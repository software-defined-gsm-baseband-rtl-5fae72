// viterbi_decoder_tb: random 185-bit blocks plus 4 zero tail bits are
// encoded by the reference convolutional code, up to 4 well-separated code
// bits are flipped, and the decoder must return the block exactly (the code
// has free distance 7). The first decoded bit must appear N_INFO + 1 cycles
// after the last code bit when nothing stalls.
module viterbi_decoder_tb;
  import gsm_ref_pkg::*;
  localparam int N = 6;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic in_valid, in_ready, in_bit, out_valid, out_ready, out_bit, out_last;
  int checks = 0, failures = 0, cyc = 0, t_last_in = 0, n_flips = 0;
  info_t blocks [N];

  viterbi_decoder #(.N_INFO(N_INFO)) dut (.*);

  always @(negedge clk) cyc++;
  always @(posedge clk) if (in_valid && in_ready) t_last_in = cyc;

  initial begin
    logic [N_CODED-1:0] c;
    in_valid = 1'b0; in_bit = 1'b0;
    for (int f = 0; f < N; f++) begin
      for (int i = 0; i < N_INFO; i++) blocks[f][i] = (i < N_INFO-4) ? 1'($urandom) : 1'b0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < N; f++) begin
      c = conv(blocks[f]);
      for (int e = 0; e < f % 5; e++) begin       // 0..4 errors, 80 bits apart
        c[10 + 80 * e + f] = ~c[10 + 80 * e + f];
        n_flips++;
      end
      for (int i = 0; i < N_CODED; i++) begin
        @(negedge clk);
        while (f % 2 == 1 && $urandom % 4 == 0) begin in_valid = 1'b0; @(negedge clk); end
        in_valid = 1'b1; in_bit = c[i];
        while (!in_ready) @(negedge clk);
        @(posedge clk);
      end
      @(negedge clk); in_valid = 1'b0;
    end
  end

  int f_out = 0, i_out = 0;
  initial begin
    out_ready = 1'b0;
    forever begin @(negedge clk); out_ready = (f_out % 2 == 0) || ($urandom % 3 != 0); end
  end
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    if (i_out == 0 && f_out == 0) begin
      checks++;
      if (cyc - t_last_in != N_INFO + 1) begin
        failures++;
        $display("latency %0d, expected %0d", cyc - t_last_in, N_INFO + 1);
      end
    end
    checks++;
    if (out_bit !== blocks[f_out][i_out] || out_last !== (i_out == N_INFO-1)) begin
      failures++;
      if (failures < 6) $display("block %0d bit %0d wrong", f_out, i_out);
    end
    if (i_out == N_INFO-1) begin i_out = 0; f_out++; end else i_out++;
  end

  initial begin
    wait (f_out == N);
    checks++;
    if (n_flips == 0) failures++;                   // error correction exercised
    $display("%0d code bits flipped and corrected", n_flips);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

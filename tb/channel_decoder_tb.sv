// channel_decoder_tb: random frames are encoded by the reference model, a few
// code bits are flipped, and the channel decoder must return the 260-bit
// frame with parity_ok set. One frame is encoded with inverted parity bits:
// its data must still come back, with parity_ok clear.
module channel_decoder_tb;
  import gsm_ref_pkg::*;
  localparam int N = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic in_valid, in_ready, in_bit, out_valid, out_ready, out_bit, out_last, parity_ok;
  int checks = 0, failures = 0, n_bad_parity_seen = 0;
  frame_t frames [N];
  localparam int BAD = 2;                            // frame with wrong parity

  channel_decoder dut (.*);

  initial begin
    coded_t c;
    in_valid = 1'b0; in_bit = 1'b0;
    for (int f = 0; f < N; f++) frames[f] = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < N; f++) begin
      c = encode(frames[f], f == BAD);
      c[17 + f] = ~c[17 + f];                        // one error in the coded part
      c[250 + f] = ~c[250 + f];                      // and another
      for (int i = 0; i < N_FRAME; i++) begin
        @(negedge clk);
        while ($urandom % 5 == 0) begin in_valid = 1'b0; @(negedge clk); end
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
    forever begin @(negedge clk); out_ready = ($urandom % 3 != 0); end
  end
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    checks++;
    if (out_bit !== frames[f_out][i_out] || out_last !== (i_out == N_SPEECH-1)) begin
      failures++;
      if (failures < 6) $display("frame %0d bit %0d wrong", f_out, i_out);
    end
    if (i_out == N_SPEECH-1) begin
      checks++;
      if (parity_ok !== (f_out != BAD)) begin
        failures++;
        $display("frame %0d: parity_ok %b", f_out, parity_ok);
      end
      if (!parity_ok) n_bad_parity_seen++;
      i_out = 0; f_out++;
    end else i_out++;
  end

  initial begin
    wait (f_out == N);
    checks++;
    if (n_bad_parity_seen != 1) failures++;
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

// channel_encoder_tb: random speech frames through the channel encoder with
// random gaps on the input and random back-pressure on the output; each of
// the 456 output bits is compared with the reference encoding (parity by
// polynomial division, convolutional code from the input history, class II
// appended). Without gaps a frame must leave exactly 456 cycles after its
// last input bit was taken plus one.
module channel_encoder_tb;
  import gsm_ref_pkg::*;
  localparam int N = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic in_valid, in_ready, in_bit, out_valid, out_ready, out_bit, out_last;
  int checks = 0, failures = 0;
  frame_t frames [N];
  bit     gaps = 1'b1;
  int     t_in_done, t_out_first, cyc = 0;

  channel_encoder dut (.*);

  always @(negedge clk) cyc++;                 // stable when sampled at posedge
  always @(posedge clk) if (in_valid && in_ready) t_in_done = cyc;

  initial begin
    for (int f = 0; f < N; f++) frames[f] = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    in_valid = 1'b0; in_bit = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < N; f++) begin
      gaps = (f != N-1);
      for (int i = 0; i < N_SPEECH; i++) begin
        @(negedge clk);
        while (gaps && $urandom % 4 == 0) begin in_valid = 1'b0; @(negedge clk); end
        in_valid = 1'b1; in_bit = frames[f][i];
        while (!in_ready) @(negedge clk);
        @(posedge clk);
      end
      @(negedge clk); in_valid = 1'b0;
    end
  end

  int f_out = 0, pos = 0;
  coded_t exp_c;
  initial begin
    out_ready = 1'b0;
    forever begin
      @(negedge clk);
      out_ready = gaps ? ($urandom % 3 != 0) : 1'b1;
    end
  end
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    if (pos == 0) begin exp_c = encode(frames[f_out]); t_out_first = cyc; end
    checks++;
    if (out_bit !== exp_c[pos] || out_last !== (pos == N_FRAME-1)) begin
      failures++;
      if (failures < 6) $display("frame %0d bit %0d: got %b expected %b", f_out, pos, out_bit, exp_c[pos]);
    end
    if (pos == N_FRAME-1) begin
      if (f_out == N-1) begin
        checks++;
        if (cyc - t_in_done != N_FRAME) begin
          failures++;
          $display("frame took %0d cycles to leave, expected %0d", cyc - t_in_done, N_FRAME);
        end
      end
      pos = 0; f_out++;
    end else pos++;
  end

  initial begin
    wait (f_out == N);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired, %0d frames out", f_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// deinterleaver_tb: sends random frames in interleaved order (bit
// (b + 4*(p mod 2)) + 8*(p div 2) at position p of burst b) with random gaps
// and back-pressure, and checks that the deinterleaver returns bits 0..455 in
// order with out_last on the last.
module deinterleaver_tb;
  import gsm_ref_pkg::*;
  localparam int N = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic in_valid, in_ready, in_bit, out_valid, out_ready, out_bit, out_last;
  int checks = 0, failures = 0;
  coded_t frames [N];

  deinterleaver dut (.*);

  initial begin
    for (int f = 0; f < N; f++)
      for (int i = 0; i < N_FRAME; i++) frames[f][i] = 1'($urandom);
    in_valid = 1'b0; in_bit = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < N; f++)
      for (int b = 0; b < 4; b++)
        for (int p = 0; p < 114; p++) begin
          @(negedge clk);
          while ($urandom % 4 == 0) begin in_valid = 1'b0; @(negedge clk); end
          in_valid = 1'b1; in_bit = frames[f][il_index(b, p)];
          while (!in_ready) @(negedge clk);
          @(posedge clk);
        end
    @(negedge clk); in_valid = 1'b0;
  end

  initial begin
    out_ready = 1'b0;
    forever begin @(negedge clk); out_ready = ($urandom % 3 != 0); end
  end

  int f_out = 0, i = 0;
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    checks++;
    if (out_bit !== frames[f_out][i] || out_last !== (i == N_FRAME-1)) begin
      failures++;
      if (failures < 6) $display("frame %0d bit %0d wrong", f_out, i);
    end
    if (i == N_FRAME-1) begin i = 0; f_out++; end else i++;
  end

  initial begin
    wait (f_out == N);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// burst_formatter_tb: feeds 114-bit bursts and checks the framed output:
// 3 zero tail bits, 26 training bits, the data, 3 zero tail bits, then 64
// requests with nothing offered. The expected training bits are worked out
// here from GSM training code 0 by b(i) = b(i-1) xor tsc(i), b(-1) = 0.
// out_ready pulses once every 8 cycles, like the modulator's bit request.
module burst_formatter_tb;
  import gsm_ref_pkg::*;
  localparam int NB = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic in_valid, in_ready, in_bit, out_valid, out_ready, out_bit, out_first;
  int checks = 0, failures = 0, n_guard = 0;
  logic data [NB][114];
  logic expq [$];

  burst_formatter dut (.*);

  initial begin
    logic prev;
    for (int b = 0; b < NB; b++) begin
      for (int k = 0; k < 3; k++) expq.push_back(1'b0);
      prev = 1'b0;
      for (int k = 0; k < 26; k++) begin prev = prev ^ TSC[k]; expq.push_back(prev); end
      for (int k = 0; k < 114; k++) begin data[b][k] = 1'($urandom); expq.push_back(data[b][k]); end
      for (int k = 0; k < 3; k++) expq.push_back(1'b0);
    end
  end

  // source: always offers the next data bit
  int sb = 0, sk = 0;
  assign in_valid = (sb < NB);
  assign in_bit   = (sb < NB) ? data[sb][sk] : 1'b0;
  always @(posedge clk) if (rst_n && in_valid && in_ready) begin
    if (sk == 113) begin sk = 0; sb++; end else sk++;
  end

  int cnt8 = 0;
  always @(posedge clk) cnt8 <= (cnt8 + 1) % 8;
  assign out_ready = rst_n && (cnt8 == 0);

  int n_out = 0, since_burst = 0;
  always @(posedge clk) if (rst_n && out_ready) begin
    if (out_valid) begin
      checks++;
      if (out_bit !== expq[n_out] || out_first !== (n_out % 146 == 0)) begin
        failures++;
        if (failures < 6) $display("output %0d: got %b expected %b", n_out, out_bit, expq[n_out]);
      end
      if (n_out % 146 == 0 && n_out > 0) begin
        checks++;
        if (since_burst != 146 + 64) begin failures++; $display("burst spacing %0d", since_burst); end
      end
      if (n_out % 146 == 0) since_burst = 0;
      n_out++;
    end else if (n_out > 0 && n_out % 146 == 0) n_guard++;
    since_burst++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (n_out == NB * 146);
    repeat (8 * 70) @(posedge clk);
    checks++;
    if (n_guard < 64) begin failures++; $display("guard periods %0d", n_guard); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// gsm_uplink_tb: sends two random frames into the transmitter and checks the
// bits that enter the GMSK modulator against a burst sequence built here from
// the reference coder: per burst 3 zeros, the training bits (code 0 run
// through b(i) = b(i-1) xor tsc(i)), the 114 interleaved bits and 3 zeros.
// It also checks 4 burst_start pulses per frame, 210 bit periods (1680
// cycles) apart within a frame, and the constant envelope of i/q.
module gsm_uplink_tb;
  import gsm_ref_pkg::*;
  localparam int NF = 2;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic in_valid, in_ready, in_bit, burst_start;
  gsm_pkg::amp_t i_out, q_out;
  logic signed [12:0] rf_out;
  int checks = 0, failures = 0;
  frame_t frames [NF];
  logic expq [$];

  gsm_uplink dut (.*);

  int cyc = 0;
  always @(negedge clk) cyc++;

  initial begin
    coded_t c;
    logic prev;
    for (int f = 0; f < NF; f++) begin
      frames[f] = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      c = encode(frames[f]);
      for (int b = 0; b < 4; b++) begin
        for (int k = 0; k < 3; k++) expq.push_back(1'b0);
        prev = 1'b0;
        for (int k = 0; k < 26; k++) begin prev = prev ^ TSC[k]; expq.push_back(prev); end
        for (int p = 0; p < 114; p++) expq.push_back(c[il_index(b, p)]);
        for (int k = 0; k < 3; k++) expq.push_back(1'b0);
      end
    end
    in_valid = 1'b0; in_bit = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < NF; f++)
      for (int i = 0; i < N_SPEECH; i++) begin
        @(negedge clk);
        in_valid = 1'b1; in_bit = frames[f][i];
        while (!in_ready) @(negedge clk);
        @(posedge clk);
      end
    @(negedge clk); in_valid = 1'b0;
  end

  // bits taken by the modulator, counted from the first burst
  int n_bits = 0;
  always @(posedge clk) if (rst_n && dut.bf_ready && dut.bf_valid) begin
    if (n_bits < expq.size()) begin
      checks++;
      if (dut.bf_bit !== expq[n_bits]) begin
        failures++;
        if (failures < 6) $display("air bit %0d: got %b expected %b", n_bits, dut.bf_bit, expq[n_bits]);
      end
    end
    n_bits++;
  end

  int n_bs = 0, last_bs = 0;
  always @(posedge clk) if (burst_start) begin
    if (n_bs % 4 != 0) begin
      checks++;
      if (cyc - last_bs != 1680) begin failures++; $display("burst spacing %0d", cyc - last_bs); end
    end
    last_bs = cyc;
    n_bs++;
  end

  always @(posedge clk) if (rst_n && cyc > 10) begin
    automatic int e = int'(i_out) * int'(i_out) + int'(q_out) * int'(q_out);
    if (e < 2030 * 2030 || e > 2060 * 2060) begin
      failures++;
      if (failures < 6) $display("envelope %0d", e);
    end
  end

  initial begin
    wait (n_bits == expq.size());
    repeat (100) @(posedge clk);
    checks++;
    if (n_bs != 4 * NF) begin failures++; $display("%0d bursts", n_bs); end
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

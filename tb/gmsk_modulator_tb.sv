// gmsk_modulator_tb: checks the GMSK modulator against properties worked out
// here, not from its internals:
//  * rate: it asks for exactly one bit every OSR = 8 cycles;
//  * constant envelope: i^2 + q^2 stays at the table amplitude (2047);
//  * modulation index and differential encoding: bits go out in segments of
//    20 between idle stretches; between two instants in consecutive idle
//    stretches the phase (atan of q/i) turns by pi/2 times the sum of the NRZ
//    levels a = 1 - 2*(b xor b_prev) of the bits sent in between;
//  * mixing: rf_out = i*cos(w0 n) - q*sin(w0 n), w0 a quarter turn per sample;
//  * burst_start pulses once, when the bit flagged first is taken.
module gmsk_modulator_tb;
  import gsm_pkg::*;
  localparam int OSR = 8, NSEG = 6, SEG = 20, NIDLE = 16, P = NIDLE + SEG, NDATA = NSEG * SEG;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic bit_valid, bit_ready, bit_in, bit_first, burst_start;
  amp_t i_out, q_out;
  logic signed [AMP_W:0] rf_out;
  int checks = 0, failures = 0;

  gmsk_modulator #(.OSR(OSR)) dut (.*);

  int cyc = 0;                              // rising edges since reset release
  always @(negedge clk) if (rst_n) cyc++;

  // bit source: NSEG segments of SEG random bits, each after NIDLE idle periods
  logic data [NDATA];
  int   nd = 0, takes = 0, n_bs = 0;
  logic prev_b = 1'b0;
  int   take_cyc [$];
  int   take_a   [$];
  assign bit_valid = (takes % P >= NIDLE) && (takes / P < NSEG);
  assign bit_in    = bit_valid ? data[nd] : 1'b0;
  assign bit_first = bit_valid && nd == 0;
  always @(posedge clk) if (rst_n) begin
    if (bit_ready) begin
      automatic logic b = bit_valid ? bit_in : 1'b0;
      take_cyc.push_back(cyc);
      take_a.push_back((b ^ prev_b) ? -1 : 1);
      prev_b = b;
      takes <= takes + 1;
      if (bit_valid) nd <= nd + 1;
    end
    if (burst_start) n_bs++;
  end

  function automatic real phase_of(amp_t i, amp_t q);
    return $atan2(real'(q), real'(i));
  endfunction

  // envelope and mixing
  amp_t i_d, q_d;
  always @(posedge clk) if (rst_n && cyc > 8) begin
    automatic int    e = int'(i_out) * int'(i_out) + int'(q_out) * int'(q_out);
    automatic real   ang = 2.0 * PI * (cyc - 2) / 4.0;
    automatic int    c = $rtoi($floor(2047.0 * $cos(ang) + 0.5));
    automatic int    s = $rtoi($floor(2047.0 * $sin(ang) + 0.5));
    automatic int    rf_exp = (int'(i_d) * c - int'(q_d) * s) >>> 11;
    checks++;
    if (e < 2030 * 2030 || e > 2060 * 2060) begin
      failures++;
      if (failures < 6) $display("cycle %0d: envelope %0d", cyc, e);
    end
    checks++;
    if (rf_out - rf_exp > 2 || rf_exp - rf_out > 2) begin
      failures++;
      if (failures < 6) $display("cycle %0d: rf %0d expected %0d", cyc, rf_out, rf_exp);
    end
  end
  always @(posedge clk) begin i_d <= i_out; q_d <= q_out; end

  // phase turn over each segment: measured from i/q, compared modulo a turn
  real ph1, ph2;
  int  t1, t2;
  initial begin
    for (int k = 0; k < NDATA; k++) data[k] = 1'($urandom);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int sg = 0; sg < NSEG; sg++) begin
      int sum, m, cnt;
      real want, got;
      wait (takes == sg * P + NIDLE - 2);
      @(posedge clk); #1;
      t1 = cyc; ph1 = phase_of(i_out, q_out);
      wait (takes == (sg + 1) * P + NIDLE - 2);
      @(posedge clk); #1;
      while ((cyc - t1) % OSR != 0) begin @(posedge clk); #1; end
      t2 = cyc; ph2 = phase_of(i_out, q_out);
      // the (t2-t1)/OSR bits taken up to 40 cycles before t2 (pipeline lag)
      sum = 0; cnt = 0; m = (t2 - t1) / OSR;
      for (int j = take_cyc.size() - 1; j >= 0 && cnt < m; j--)
        if (take_cyc[j] <= t2 - 40) begin sum += take_a[j]; cnt++; end
      want = (PI / 2.0) * sum;
      got  = ph2 - ph1;
      while (want - got > PI)  got += 2.0 * PI;
      while (got - want > PI)  got -= 2.0 * PI;
      checks++;
      if (got - want > 0.05 || want - got > 0.05) begin
        failures++;
        $display("segment %0d: phase turn %f rad, expected %f (sum of levels %0d)", sg, got, want, sum);
      end
    end
    checks++;
    if (n_bs != 1) begin failures++; $display("burst_start pulses %0d", n_bs); end
    checks++;
    if (takes != (cyc + OSR - 1) / OSR && takes != cyc / OSR && takes != cyc / OSR + 1) begin
      failures++; $display("%0d bits in %0d cycles", takes, cyc);
    end
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

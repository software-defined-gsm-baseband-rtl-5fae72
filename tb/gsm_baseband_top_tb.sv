// gsm_baseband_top_tb: end-to-end test of the GSM baseband processor at its
// default parameters. Random 260-bit frames go into the transmitter; its IF
// output is looped back into the receiver, with white-ish noise added to some
// frames, and every received frame is compared bit by bit with the frame that
// was sent. The bench also counts the mechanisms of the design: bursts
// equalized, idle fill between frames, demodulator hard-decision errors that
// the equalizer and the Viterbi decoder removed, and the parity check.
module gsm_baseband_top_tb;
  import gsm_pkg::*;

  localparam int N_FRAMES  = 3;
  localparam int NOISE_AMP = 800;          // peak noise on noisy frames (signal 2047)

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic tx_valid, tx_ready, tx_bit, tx_bs;
  amp_t tx_i, tx_q;
  logic signed [AMP_W:0] tx_rf, rx_rf;
  logic rx_valid, rx_bit, rx_last, rx_pok, raw_valid, raw_bit;
  logic signed [8:0] h_est [3];

  gsm_baseband_top dut (
    .clk, .rst_n,
    .tx_valid, .tx_ready, .tx_bit, .tx_burst_start(tx_bs), .tx_i, .tx_q, .tx_rf,
    .rx_rf, .rx_burst_start(tx_bs),
    .rx_valid, .rx_ready(1'b1), .rx_bit, .rx_last, .rx_parity_ok(rx_pok),
    .rx_raw_valid(raw_valid), .rx_raw_bit(raw_bit), .rx_h_est(h_est)
  );

  int checks = 0, failures = 0;
  logic [N_SPEECH-1:0] frames [N_FRAMES];
  bit noisy = 1'b0;
  int tx_frame = 0, rx_frame = 0, rx_pos = 0, frame_err = 0;
  int n_bursts = 0, n_idle = 0, n_noisy_frames = 0, n_parity_ok = 0;

  // Noise: uniform, added to the loop-back on odd frames.
  int noise;
  always_comb begin
    rx_rf = tx_rf;
    if (noisy) rx_rf = (AMP_W+1)'(int'(tx_rf) + noise);
  end
  always @(posedge clk) noise <= int'($urandom_range(2*NOISE_AMP)) - NOISE_AMP;

  // Raw (unequalized) decision errors: the transmitted symbols of each burst
  // (bits after differential encoding, worked out here from the bits entering
  // the modulator) against the sign of the demodulator's soft values, over
  // the data positions of a burst.
  int raw_err = 0;
  logic tx_sym [N_FRAMES*N_BURSTS][BURST_LEN];
  logic tb_prev = 1'b0;
  int tx_b = -1, tx_k = 0;
  always @(posedge clk) if (rst_n && dut.u_tx.u_mod.bit_ready) begin
    automatic logic b = dut.u_tx.u_mod.bit_valid ? dut.u_tx.u_mod.bit_in : 1'b0;
    if (!dut.u_tx.u_mod.bit_valid) n_idle++;
    if (dut.u_tx.u_mod.bit_valid && dut.u_tx.u_mod.bit_first) begin tx_b++; tx_k = 0; end
    if (tx_b >= 0 && tx_b < N_FRAMES*N_BURSTS && tx_k < BURST_LEN) tx_sym[tx_b][tx_k] = b ^ tb_prev;
    tx_k++;
    tb_prev = b;
  end
  int rx_b = -1, rx_k = 0;
  always @(posedge clk) if (rst_n && raw_valid) begin
    if (dut.u_rx.u_demod.soft_first) begin rx_b++; rx_k = 0; n_bursts++; end
    if (rx_b >= 0 && rx_b < N_FRAMES*N_BURSTS && rx_k >= DATA_START && rx_k < DATA_START + BURST_DATA)
      if (dut.u_rx.u_demod.sym_out != tx_sym[rx_b][rx_k]) raw_err++;
    rx_k++;
  end

  // Send the frames.
  initial begin
    tx_valid = 1'b0; tx_bit = 1'b0;
    for (int f = 0; f < N_FRAMES; f++)
      for (int i = 0; i < N_SPEECH; i++) frames[f][i] = 1'($urandom);
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < N_FRAMES; f++) begin
      for (int i = 0; i < N_SPEECH; i++) begin
        @(negedge clk);
        tx_valid = 1'b1;
        tx_bit   = frames[f][i];
        while (!tx_ready) @(negedge clk);
        @(posedge clk);
      end
      @(negedge clk);
      tx_valid = 1'b0;
      tx_frame++;
    end
  end

  // Noise on frame 1 (bursts follow the frames in order).
  int bursts_sent = 0;
  always @(posedge clk) if (rst_n && tx_bs) begin
    noisy <= ((bursts_sent / N_BURSTS) % 2) == 1;
    if (((bursts_sent / N_BURSTS) % 2) == 1 && bursts_sent % N_BURSTS == 0) n_noisy_frames++;
    bursts_sent++;
  end

  // Compare received frames.
  always @(posedge clk) if (rst_n && rx_valid) begin
    checks++;
    if (rx_bit !== frames[rx_frame][rx_pos]) begin
      failures++; frame_err++;
      if (frame_err < 5) $display("frame %0d bit %0d: got %0b expected %0b", rx_frame, rx_pos, rx_bit, frames[rx_frame][rx_pos]);
    end
    if (rx_last) begin
      checks++;
      if (rx_pok) n_parity_ok++;
      else begin failures++; $display("frame %0d: parity check failed", rx_frame); end
      $display("frame %0d received, %0d bit errors, h = %0d %0d %0d, raw errors so far %0d",
               rx_frame, frame_err, h_est[0], h_est[1], h_est[2], raw_err);
      // the Gaussian filter leaves a main tap and two smaller, positive side taps
      checks++;
      if (h_est[1] <= 2 * h_est[0] || h_est[1] <= 2 * h_est[2] || h_est[0] <= 0 || h_est[2] <= 0) begin
        failures++; $display("frame %0d: implausible channel estimate", rx_frame);
      end
      checks++;
      if (rx_pos != N_SPEECH-1) failures++;
      rx_frame++; rx_pos = 0; frame_err = 0;
    end else rx_pos++;
  end

  initial begin
    wait (rx_frame == N_FRAMES);
    repeat (10) @(posedge clk);
    // every mechanism must have happened
    checks++; if (n_bursts != N_FRAMES * N_BURSTS) begin failures++; $display("bursts %0d", n_bursts); end
    checks++; if (n_idle == 0) begin failures++; $display("no idle fill"); end
    checks++; if (n_noisy_frames == 0) begin failures++; $display("no noisy frame"); end
    checks++; if (raw_err == 0) begin failures++; $display("noise caused no raw errors: corrections not exercised"); end
    checks++; if (n_parity_ok != N_FRAMES) failures++;
    $display("bursts %0d, idle bit periods %0d, noisy frames %0d, raw demodulator errors corrected %0d, parity ok %0d",
             n_bursts, n_idle, n_noisy_frames, raw_err, n_parity_ok);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog: %0d of %0d frames received", rx_frame, N_FRAMES);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

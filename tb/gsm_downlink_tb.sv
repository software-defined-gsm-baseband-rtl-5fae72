// gsm_downlink_tb: the bench builds the air bit sequence of three frames on
// its own (reference coder, interleaver map, 3 tail + training + data + 3
// tail, 64 idle periods) and turns it into an IF signal with a GMSK
// modulator instance. The receiver must return each 260-bit frame; the second
// frame is coded with inverted parity bits, so its parity_ok must be clear
// while the others' is set.
module gsm_downlink_tb;
  import gsm_ref_pkg::*;
  localparam int NF = 3, BAD = 1;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  frame_t frames [NF];
  logic air [$];
  logic firstq [$];

  logic bit_valid, bit_ready, bit_in, bit_first, bs;
  gsm_pkg::amp_t i_m, q_m;
  logic signed [12:0] rf;

  gmsk_modulator src (
    .clk, .rst_n, .bit_valid, .bit_ready, .bit_in, .bit_first,
    .burst_start(bs), .i_out(i_m), .q_out(q_m), .rf_out(rf)
  );

  logic out_valid, out_bit, out_last, parity_ok, raw_valid, raw_bit;
  logic signed [8:0] h_est [3];
  gsm_downlink dut (
    .clk, .rst_n, .rf_in(rf), .burst_start(bs),
    .out_valid, .out_ready(1'b1), .out_bit, .out_last, .parity_ok,
    .raw_valid, .raw_bit, .h_est
  );

  initial begin
    coded_t c;
    logic prev;
    for (int f = 0; f < NF; f++) begin
      frames[f] = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      c = encode(frames[f], f == BAD);
      for (int b = 0; b < 4; b++) begin
        for (int k = 0; k < 146 + 64; k++) firstq.push_back(k == 0);
        for (int k = 0; k < 3; k++) air.push_back(1'b0);
        prev = 1'b0;
        for (int k = 0; k < 26; k++) begin prev = prev ^ TSC[k]; air.push_back(prev); end
        for (int p = 0; p < 114; p++) air.push_back(c[il_index(b, p)]);
        for (int k = 0; k < 3 + 64; k++) air.push_back(1'b0);
      end
    end
  end

  // feed the air bits, one per modulator request, after 10 idle periods
  int n_req = 0;
  assign bit_valid = n_req >= 10 && n_req - 10 < air.size() && !(air.size() == 0);
  assign bit_in    = bit_valid ? air[n_req - 10] : 1'b0;
  assign bit_first = bit_valid ? firstq[n_req - 10] : 1'b0;
  always @(posedge clk) if (rst_n && bit_ready) n_req <= n_req + 1;

  int f_out = 0, i_out = 0;
  always @(posedge clk) if (out_valid) begin
    checks++;
    if (out_bit !== frames[f_out][i_out] || out_last !== (i_out == N_SPEECH-1)) begin
      failures++;
      if (failures < 6) $display("frame %0d bit %0d wrong", f_out, i_out);
    end
    if (out_last) begin
      checks++;
      if (parity_ok !== (f_out != BAD)) begin failures++; $display("frame %0d parity_ok %b", f_out, parity_ok); end
      $display("frame %0d received, parity_ok %b, channel estimate %0d %0d %0d", f_out, parity_ok, h_est[0], h_est[1], h_est[2]);
      i_out = 0; f_out++;
    end else i_out++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (f_out == NF);
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

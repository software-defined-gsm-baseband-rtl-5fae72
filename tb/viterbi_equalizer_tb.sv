// viterbi_equalizer_tb: builds bursts of soft values from a known 3-tap
// channel, r(n) = h0*a(n+1) + h1*a(n) + h2*a(n-1) + noise, with training code
// 0 in positions 3..28 and random data. The channels have so much
// intersymbol interference that slicing r alone gives errors; the equalizer
// must return every data symbol and estimate the taps to within 3.
module viterbi_equalizer_tb;
  import gsm_ref_pkg::*;
  localparam int BL = 146, DS = 29, ND = 114, NBURST = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic in_valid, in_first, busy, out_valid, out_ready, out_bit, out_first;
  logic signed [7:0] in_soft;
  logic signed [8:0] h_est [3];
  int checks = 0, failures = 0, slice_err = 0;

  viterbi_equalizer dut (.*);

  int hs [NBURST][3] = '{'{30, 50, 30}, '{10, 60, 40}, '{35, 45, 25}, '{0, 70, 0}};
  logic sym [NBURST][BL + 2];

  int bo = 0, ko = 0, cyc = 0, t_end = 0;
  always @(negedge clk) cyc++;
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    checks++;
    if (out_bit !== sym[bo][DS + ko] || out_first !== (ko == 0)) begin
      failures++;
      if (failures < 8) $display("burst %0d symbol %0d: got %b expected %b", bo, ko, out_bit, sym[bo][DS + ko]);
    end
    if (ko == ND - 1) begin
      for (int k = 0; k < 3; k++) begin
        checks++;
        if (h_est[k] - hs[bo][k] > 3 || hs[bo][k] - h_est[k] > 3) begin
          failures++;
          $display("burst %0d tap %0d: estimate %0d, true %0d", bo, k, h_est[k], hs[bo][k]);
        end
      end
      ko = 0; bo++;
    end else ko++;
  end
  initial begin
    out_ready = 1'b0;
    forever begin @(negedge clk); out_ready = ($urandom % 4 != 0); end
  end

  initial begin
    in_valid = 1'b0; in_first = 1'b0; in_soft = '0;
    for (int b = 0; b < NBURST; b++)
      for (int n = 0; n < BL + 2; n++)
        sym[b][n] = (n >= 3 && n < DS) ? TSC[n - 3] : ((n < 3 || n >= DS + ND + 3) ? 1'b0 : 1'($urandom));
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int b = 0; b < NBURST; b++) begin
      for (int n = 0; n < BL; n++) begin
        int r, am1, a0, ap1;
        ap1 = sym[b][n + 1] ? -1 : 1;
        a0  = sym[b][n] ? -1 : 1;
        am1 = (n > 0) ? (sym[b][n - 1] ? -1 : 1) : 1;
        r = hs[b][0] * ap1 + hs[b][1] * a0 + hs[b][2] * am1 + int'($urandom_range(8)) - 4;
        if (r > 127) r = 127;
        if (r < -127) r = -127;
        if (n >= DS && n < DS + ND && ((r < 0) != sym[b][n])) slice_err++;
        @(negedge clk);
        in_valid = 1'b1; in_first = (n == 0); in_soft = 8'(r);
        @(negedge clk);
        in_valid = 1'b0;
        repeat (6) @(negedge clk);          // one value per 8 cycles, as from the demodulator
      end
      wait (!busy && !out_valid);
    end
    wait (bo == NBURST);
    checks++;
    if (slice_err == 0) begin failures++; $display("channels caused no slicing errors"); end
    $display("%0d symbols a plain slicer would get wrong", slice_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// gmsk_demodulator_tb: the bench synthesises a GMSK IF signal on its own
// (real arithmetic: NRZ levels of the differentially encoded bits, Gaussian
// filter with BT = 0.3, integration to pi/2 per bit, carrier at a quarter of
// the sample rate, amplitude 2047) and checks that the demodulator's
// per-bit sign equals the encoded symbol and its bit_out equals the data bit,
// one decision every 8 cycles. The synthetic filter is centred (no delay),
// so the integration windows are aligned 4 samples after the first sample,
// which covers the demodulator's own pipeline.
module gmsk_demodulator_tb;
  import gsm_pkg::*;
  localparam int OSR = 8, NB = 200;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic signed [AMP_W:0] rf_in;
  logic burst_start, soft_valid, soft_first, sym_out, bit_out;
  logic signed [7:0] soft_out;
  int checks = 0, failures = 0;

  gmsk_demodulator #(.OSR(OSR), .DUMP_DELAY(4)) dut (.*);

  logic b [NB];
  logic d [NB];
  real  phi [NB*OSR + 64];

  initial begin
    real sigma, g, fr, p, tsum;
    logic prev;
    prev = 1'b0;
    for (int j = 0; j < NB; j++) begin
      b[j] = (j < 4) ? 1'b0 : 1'($urandom);
      d[j] = b[j] ^ prev;
      prev = b[j];
    end
    // Gaussian-filtered NRZ, integrated: phase per sample
    sigma = $sqrt($ln(2.0)) / (2.0 * PI * 0.3);
    p = 0.0;
    for (int n = 0; n < NB*OSR + 64; n++) begin
      fr = 0.0; tsum = 0.0;
      for (int k = -12; k <= 12; k++) begin
        real x, a;
        int  m, j;
        x = k / real'(OSR);
        g = $exp(-(x * x) / (2.0 * sigma * sigma));
        m = n - k;
        j = (m < 0) ? -1 : m / OSR;
        a = (j < 0 || j >= NB) ? 1.0 : (d[j] ? -1.0 : 1.0);
        fr += g * a;
        tsum += g;
      end
      p += (PI / 2.0) / OSR * fr / tsum;
      phi[n] = p;
    end
  end

  int n = -1;
  always @(posedge clk) begin
    if (rst_n) n <= n + 1;
  end
  always_comb begin
    rf_in = '0;
    if (n >= 0 && n < NB*OSR + 64)
      rf_in = (AMP_W+1)'($rtoi($floor(2047.0 * $cos(PI / 2.0 * n + phi[n]) + 0.5)));
  end
  assign burst_start = (n == 0);

  int k = -1, last_cyc = 0, cyc = 0, n_first = 0;
  always @(negedge clk) cyc++;
  always @(posedge clk) if (soft_valid) begin
    if (soft_first) begin k = 0; n_first++; end
    if (k >= 0 && k < NB - 2) begin
      checks++;
      if (sym_out !== d[k] || (k > 0 && bit_out !== b[k])) begin
        failures++;
        if (failures < 6) $display("bit %0d: soft %0d sym %b/%b bit %b/%b", k, soft_out, sym_out, d[k], bit_out, b[k]);
      end
      if (k > 0) begin
        checks++;
        if (cyc - last_cyc != OSR) begin failures++; $display("decision spacing %0d", cyc - last_cyc); end
      end
    end
    last_cyc = cyc;
    if (k >= 0) k++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (k == NB - 2);
    checks++;
    if (n_first != 1) failures++;
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

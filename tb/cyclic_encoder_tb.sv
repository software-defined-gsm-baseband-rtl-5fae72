// cyclic_encoder_tb: shifts random 50-bit messages through the (53,50)
// cyclic encoder and compares its 3 registers with the remainder of the
// message polynomial divided by x^3 + x + 1, found by long division.
module cyclic_encoder_tb;
  import gsm_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic clear, en, din;
  logic [2:0] parity;
  int checks = 0, failures = 0;

  cyclic_encoder dut (.clk, .rst_n, .clear, .en, .din, .parity);

  initial begin
    logic [N_IA-1:0] m;
    clear = 1'b0; en = 1'b0; din = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 40; t++) begin
      m = {$urandom, $urandom};
      if (t == 0) m = '0;
      if (t == 1) m = 1;                     // remainder of 1 is 1
      @(negedge clk); clear = 1'b1;
      @(negedge clk); clear = 1'b0;
      for (int i = 0; i < N_IA; i++) begin
        en = 1'b1; din = m[i];
        @(negedge clk);
        // hold a cycle with en low now and then: the registers must not move
        if (i % 7 == 3) begin en = 1'b0; din = ~din; @(negedge clk); end
      end
      en = 1'b0;
      checks++;
      if (parity !== crc3(m)) begin
        failures++;
        $display("message %0d: parity %b, expected %b", t, parity, crc3(m));
      end
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

// diff_decoder_tb: differentially encodes random bits (d = b xor previous b)
// and checks that the decoder returns them, both for a stream that follows on
// from the register and for sections whose first bit refers to ref_bit.
module diff_decoder_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic first, ref_bit, en, in_bit, out_bit;
  int checks = 0, failures = 0;

  diff_decoder dut (.clk, .rst_n, .first, .ref_bit, .en, .in_bit, .out_bit);

  initial begin
    logic prev, b;
    first = 1'b0; ref_bit = 1'b0; en = 1'b0; in_bit = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int sec = 0; sec < 20; sec++) begin
      @(negedge clk);
      prev = 1'($urandom);                  // the known bit before the section
      for (int k = 0; k < 30; k++) begin
        b       = 1'($urandom);
        first   = (k == 0);
        ref_bit = prev;
        in_bit  = b ^ prev;
        en      = 1'b1;
        #1;
        checks++;
        if (out_bit !== b) begin
          failures++;
          if (failures < 5) $display("section %0d bit %0d: got %b expected %b", sec, k, out_bit, b);
        end
        prev = b;
        @(negedge clk);
        // an idle cycle must not disturb the register
        en = 1'b0; first = 1'b0; in_bit = 1'($urandom); ref_bit = 1'($urandom);
        @(negedge clk);
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

// conv_encoder_tb: random bit streams through the convolutional encoder;
// every output pair is compared with G1 = u(k)+u(k-3)+u(k-4) and
// G2 = u(k)+u(k-1)+u(k-3)+u(k-4) computed from the stream's history.
module conv_encoder_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic clear, en, din, c1, c2;
  int checks = 0, failures = 0;
  logic hist [$];

  conv_encoder dut (.clk, .rst_n, .clear, .en, .din, .c1, .c2);

  function automatic logic h(int back);
    return (hist.size() > back) ? hist[hist.size()-1-back] : 1'b0;
  endfunction

  initial begin
    clear = 1'b0; en = 1'b0; din = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int blk = 0; blk < 5; blk++) begin
      @(negedge clk); clear = 1'b1; hist.delete();
      @(negedge clk); clear = 1'b0;
      for (int k = 0; k < 100; k++) begin
        din = 1'($urandom);
        en  = ($urandom % 5) != 0;
        #1;
        checks++;
        if (c1 !== (din ^ h(2) ^ h(3)) || c2 !== (din ^ h(0) ^ h(2) ^ h(3))) begin
          failures++;
          if (failures < 5) $display("block %0d step %0d: got %b%b", blk, k, c1, c2);
        end
        if (en) hist.push_back(din);
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

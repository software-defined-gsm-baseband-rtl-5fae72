// conv_encoder: the rate-1/2, constraint-length-5 convolutional encoder of
// the full-rate speech channel, G1(x) = x^4 + x^3 + 1, G2(x) = x^4 + x^3 + x + 1.
//
// Four delay stages hold the last four input bits, d[0] the newest. For the
// present input u the outputs are c1 = u ^ d[2] ^ d[3] and
// c2 = u ^ d[0] ^ d[2] ^ d[3], combinational from din and the state; 'en'
// shifts din into the delay line at the clock edge. The taps are the
// document's (polynomials and delay-line drawing). 'clear' returns the line to
// the all-zero state at the start of a block.
module conv_encoder (
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  logic en,
  input  logic din,
  output logic c1,
  output logic c2
);
  logic [3:0] d;   // d[k] = input bit delayed by k+1 steps

  always_ff @(posedge clk) begin
    if (!rst_n || clear) d <= '0;
    else if (en)         d <= {d[2:0], din};
  end

  assign c1 = din ^ d[2] ^ d[3];
  assign c2 = din ^ d[0] ^ d[2] ^ d[3];
endmodule

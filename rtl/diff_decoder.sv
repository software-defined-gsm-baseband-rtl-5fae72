// diff_decoder: undoes the transmitter's differential encoding with a
// register and a modulo-2 adder: b(i) = d(i) xor b(i-1).
//
// The register holds the last decoded bit. With 'first' high the bit before
// in_bit is taken from ref_bit instead (the known bit that precedes a section,
// e.g. the last training bit of a burst). The register-plus-adder structure
// is the document's; the 'first' input is this design's. out_bit is
// combinational from in_bit and the register; the register takes out_bit
// when 'en' is high.
module diff_decoder (
  input  logic clk,
  input  logic rst_n,
  input  logic first,
  input  logic ref_bit,
  input  logic en,
  input  logic in_bit,
  output logic out_bit
);
  logic prev;

  assign out_bit = in_bit ^ (first ? ref_bit : prev);

  always_ff @(posedge clk) begin
    if (!rst_n)  prev <= 1'b0;
    else if (en) prev <= out_bit;
  end
endmodule

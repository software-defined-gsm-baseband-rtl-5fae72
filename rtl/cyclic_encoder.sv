// cyclic_encoder: the (53,50) cyclic encoder that protects the 50 class Ia
// bits with 3 parity bits, generator polynomial g(x) = x^3 + x + 1.
//
// Three registers form a feedback shift register. Each enabled cycle shifts
// one data bit in, first bit first: Reg1 <= din ^ Reg3, Reg2 <= Reg1 ^ Reg3,
// Reg3 <= Reg2. After the 50 bits the registers hold the remainder of the
// data polynomial (first bit as the highest power) divided by g(x):
// parity[0] = Reg1 (x^0), parity[1] = Reg2 (x^1), parity[2] = Reg3 (x^2).
// The register chain and the two feedback taps are the document's; it does
// not say in which order the registers are appended, and this design appends
// Reg1, Reg2, Reg3. 'clear' empties the registers for a new frame; parity is
// valid the cycle after the last enabled shift.
module cyclic_encoder (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,
  input  logic       en,
  input  logic       din,
  output logic [2:0] parity
);
  logic [2:0] r;   // r[0] = Reg1, r[1] = Reg2, r[2] = Reg3

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      r <= '0;
    end else if (en) begin
      r[0] <= din ^ r[2];
      r[1] <= r[0] ^ r[2];
      r[2] <= r[1];
    end
  end

  assign parity = r;
endmodule

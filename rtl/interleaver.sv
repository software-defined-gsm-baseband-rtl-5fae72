// interleaver: spreads one 456-bit coded frame over 8 blocks of 57 bits and
// reads them out as 4 bursts of 114 bits.
//
// Write: coded bit k goes to row k mod 8, column k div 8 of an 8 x 57 bit
// memory, so row r (block r+1) holds bits r, r+8, ..., r+448.
// Read: burst b (0..3) takes block b on its even positions and block b+4 on
// its odd positions: position 2i is row b column i, position 2i+1 is row b+4
// column i. This reproduces the document's table, where the first four blocks
// give the even and the last four the odd bits of the 456-bit read-out; the
// pairing of block b with block b+4 in one burst is this design's choice.
//
// Interface: serial valid/ready in and out. The block takes 456 bits, then
// sends 456 (out_last marks the last bit of each 114-bit burst), then takes
// the next frame.
module interleaver
  import gsm_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  logic in_bit,
  output logic out_valid,
  input  logic out_ready,
  output logic out_bit,
  output logic out_last
);
  logic mem [N_BLOCKS][BLOCK_LEN];

  logic       reading;
  logic [2:0] wrow;          // write row (k mod 8)
  logic [5:0] wcol;          // write column (k div 8)
  logic [1:0] burst;         // read burst
  logic [6:0] pos;           // read position in burst, 0..113

  logic [2:0] rrow;
  logic [5:0] rcol;
  assign rrow = {pos[0], burst};     // b + 4*(pos mod 2)
  assign rcol = pos[6:1];

  wire in_fire  = in_valid && in_ready;
  wire out_fire = out_valid && out_ready;

  assign in_ready  = !reading;
  assign out_valid = reading;
  assign out_bit   = mem[rrow][rcol];
  assign out_last  = reading && pos == 7'(BURST_DATA-1);

  always_ff @(posedge clk) begin
    if (in_fire) mem[wrow][wcol] <= in_bit;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      reading <= 1'b0;
      wrow    <= '0;
      wcol    <= '0;
      burst   <= '0;
      pos     <= '0;
    end else if (!reading) begin
      if (in_fire) begin
        wrow <= wrow + 1'b1;
        if (wrow == 3'(N_BLOCKS-1)) begin
          if (wcol == 6'(BLOCK_LEN-1)) begin
            wcol    <= '0;
            reading <= 1'b1;
          end else begin
            wcol <= wcol + 1'b1;
          end
        end
      end
    end else if (out_fire) begin
      if (pos == 7'(BURST_DATA-1)) begin
        pos   <= '0;
        burst <= burst + 1'b1;
        if (burst == 2'(N_BURSTS-1)) reading <= 1'b0;
      end else begin
        pos <= pos + 1'b1;
      end
    end
  end
endmodule

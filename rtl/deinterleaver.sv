// deinterleaver: undoes the interleaver, returning the 456 coded bits of a
// frame in their original order.
//
// The memory has 57 rows and 8 columns; column c holds block c (bits c, c+8,
// ..., c+448), row j holds bits 8j..8j+7. Incoming bursts are written column
// by column: position 2i of burst b goes to row i of column b, position 2i+1
// to row i of column b+4 (the inverse of the interleaver's even/odd pairing).
// Reading goes row by row, left to right, which yields bits 0, 1, 2, ..., 455.
// The 57 x 8 organisation, column-wise write and row-wise read are the
// document's; the even/odd column pairing matches this design's interleaver.
//
// Interface: serial valid/ready in and out; takes 4 x 114 bits, then sends
// 456 bits (out_last on the last), then takes the next frame.
module deinterleaver
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
  logic mem [BLOCK_LEN][N_BLOCKS];

  logic       reading;
  logic [1:0] burst;         // write burst
  logic [6:0] pos;           // write position in burst
  logic [5:0] rrow;          // read row
  logic [2:0] rcol;          // read column

  logic [5:0] wrow;
  logic [2:0] wcol;
  assign wrow = pos[6:1];
  assign wcol = {pos[0], burst};

  wire in_fire  = in_valid && in_ready;
  wire out_fire = out_valid && out_ready;

  assign in_ready  = !reading;
  assign out_valid = reading;
  assign out_bit   = mem[rrow][rcol];
  assign out_last  = reading && rrow == 6'(BLOCK_LEN-1) && rcol == 3'(N_BLOCKS-1);

  always_ff @(posedge clk) begin
    if (in_fire) mem[wrow][wcol] <= in_bit;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      reading <= 1'b0;
      burst   <= '0;
      pos     <= '0;
      rrow    <= '0;
      rcol    <= '0;
    end else if (!reading) begin
      if (in_fire) begin
        if (pos == 7'(BURST_DATA-1)) begin
          pos   <= '0;
          burst <= burst + 1'b1;
          if (burst == 2'(N_BURSTS-1)) reading <= 1'b1;
        end else begin
          pos <= pos + 1'b1;
        end
      end
    end else if (out_fire) begin
      rcol <= rcol + 1'b1;
      if (rcol == 3'(N_BLOCKS-1)) begin
        if (rrow == 6'(BLOCK_LEN-1)) begin
          rrow    <= '0;
          reading <= 1'b0;
        end else begin
          rrow <= rrow + 1'b1;
        end
      end
    end
  end
endmodule

// input_buffer - 256-bit register that assembles 16-bit input words.
//
// Word k of a block or key holds bytes 2k (bits 15:8) and 2k+1 (bits 7:0) of
// the byte stream, so byte i lands in byte i of the state layout.  The
// controller supplies the word index; the buffer is a plain write-addressed
// register.  Holds the cipher key while it is being read and afterwards the
// next data block, which the core copies on its load edge.
// Timing: a word written with we is visible on data from the next clock.
module input_buffer
  import rijndael_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        we,
  input  logic [3:0]  widx,
  input  logic [15:0] din,
  output state_t      data
);
  always_ff @(posedge clk)
    if (rst) data <= '0;
    else if (we) begin
      data[2*widx]     <= din[15:8];
      data[2*widx + 1] <= din[7:0];
    end
endmodule

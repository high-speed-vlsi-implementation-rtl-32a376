// output_buffer - 256-bit register that sends a result 16 bits at a time.
//
// load captures a whole processed block in one clock; word ridx (bytes 2k
// and 2k+1, the first byte in bits 15:8) is driven on dout from the register,
// so the core can already work on the next block while this one drains.
// Timing: dout reflects the block loaded on the previous edge.
module output_buffer
  import rijndael_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        load,
  input  state_t      din,
  input  logic [3:0]  ridx,
  output logic [15:0] dout
);
  state_t buf_q;

  always_ff @(posedge clk)
    if (rst)       buf_q <= '0;
    else if (load) buf_q <= din;

  always_comb dout = {buf_q[2*ridx], buf_q[2*ridx + 1]};
endmodule

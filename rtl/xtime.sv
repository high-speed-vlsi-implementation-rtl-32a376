// xtime - multiplication of one GF(2^8) element by x.
//
// The byte is shifted one place to the left; when the bit shifted out (a[7])
// is 1, the result is reduced by XOR with 1B, the low byte of
// m(x) = x^8+x^4+x^3+x+1.  This is the design's xtime unit, four of which
// make up one MixColumn column.  Purely combinational.
module xtime (
  input  logic [7:0] a,
  output logic [7:0] y
);
  always_comb y = {a[6:0], 1'b0} ^ {3'b000, a[7], a[7], 1'b0, a[7], a[7]};
endmodule

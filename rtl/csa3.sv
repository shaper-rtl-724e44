// csa3: 3:2 carry-save compressor.
//
// Reduces three W-bit addends to a sum vector and a carry vector without
// propagating any carry: for every bit, s = x ^ y ^ z and c = majority(x,y,z).
// The identity x + y + z = s + 2*c (modulo 2^(W+1)) lets the MM engine merge
// an accumulator with the two halves of a block product before a single
// wide carry-propagate addition.  Combinational; c is returned unshifted
// (its weight is 2^(i+1) for bit i).
module csa3 #(
  parameter int unsigned W = 3152
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  output logic [W-1:0] s,
  output logic [W-1:0] c
);
  assign s = x ^ y ^ z;
  assign c = (x & y) | (x & z) | (y & z);
endmodule

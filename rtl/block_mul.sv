// block_mul: block multiplication of a short operand by a long one.
//
// The long operand b (BW bits) is cut into NP = ceil(BW/AW) pieces of AW bits
// and each piece is multiplied by the short operand a (AW bits) in its own
// AW x AW multiplier, the unit that maps onto a group of DSP slices.  Every
// sub-product is 2*AW bits wide and sits at offset j*AW, so sub-products
// with even j never overlap one another, nor do those with odd j.  They are
// therefore concatenated, not added, into two large integers pe and po with
// a*b = pe + po.  The final addition is left to the carry-save stage that
// follows, as in the MM engine of the design description.
// Combinational.  The bits of pe and po above and below the reach of their
// sub-products (the low AW bits of po and the tail past the last piece) are
// constant zero.
module block_mul #(
  parameter int unsigned AW = 72,
  parameter int unsigned BW = 3072
) (
  input  logic [AW-1:0]    a,
  input  logic [BW-1:0]    b,
  output logic [AW+BW-1:0] pe,   // sum of even-indexed sub-products
  output logic [AW+BW-1:0] po    // sum of odd-indexed sub-products
);
  localparam int unsigned NP = (BW + AW - 1) / AW;
  localparam int unsigned PW = (NP + 1) * AW;      // room for the top sub-product

  logic [NP*AW-1:0] bp;
  logic [PW-1:0]    ev, od;

  assign bp = (NP*AW)'(b);

  always_comb begin
    ev = '0;
    od = '0;
    for (int j = 0; j < int'(NP); j++) begin
      if (j % 2 == 0) ev[j*AW +: 2*AW] = (2*AW)'(a) * (2*AW)'(bp[j*AW +: AW]);
      else            od[j*AW +: 2*AW] = (2*AW)'(a) * (2*AW)'(bp[j*AW +: AW]);
    end
  end

  assign pe = ev[AW+BW-1:0];
  assign po = od[AW+BW-1:0];
endmodule

// carry_select_adder: wide adder built from fixed-size chunks.
//
// Each CHUNK-bit slice of the two addends is summed twice, once assuming
// a carry-in of 0 (x + y) and once assuming 1 (x + y + 1), by two ripple
// adders working in parallel.  The carry coming out of the slice below then
// only drives a multiplexer that picks one of the two pre-computed sums and
// its carry-out, so the long carry chain of a 3000-bit addition is replaced
// by a chain of muxes.  Because x + y + 1 <= 2^(CHUNK+1) - 1, a slice never
// produces more than one carry bit, so the selection is always exact.
//
// The 128-bit chunk size follows the design description; the width W and
// the handling of a last, shorter chunk are this implementation's choice.
// Purely combinational: sum = x + y + cin, cout = carry out of bit W-1.
module carry_select_adder #(
  parameter int unsigned W     = 3152,
  parameter int unsigned CHUNK = 128
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  localparam int unsigned NCH = (W + CHUNK - 1) / CHUNK;
  localparam int unsigned WP  = NCH * CHUNK;

  logic [WP-1:0] xp, yp, sp;
  logic [NCH:0]  carry;

  assign xp = WP'(x);
  assign yp = WP'(y);
  assign carry[0] = cin;

  for (genvar g = 0; g < NCH; g++) begin : g_chunk
    logic [CHUNK:0] s0, s1;   // candidate sums with carry-out in the top bit
    assign s0 = {1'b0, xp[g*CHUNK +: CHUNK]} + {1'b0, yp[g*CHUNK +: CHUNK]};
    assign s1 = {1'b0, xp[g*CHUNK +: CHUNK]} + {1'b0, yp[g*CHUNK +: CHUNK]} + (CHUNK+1)'(1);
    assign sp[g*CHUNK +: CHUNK] = carry[g] ? s1[CHUNK-1:0] : s0[CHUNK-1:0];
    assign carry[g+1]           = carry[g] ? s1[CHUNK]     : s0[CHUNK];
  end

  assign sum = sp[W-1:0];
  // Carry out of bit W-1: the chunk carry when W fills the last chunk,
  // otherwise the sum bit just above W.
  if (WP == W) begin : g_full
    assign cout = carry[NCH];
  end else begin : g_part
    assign cout = sp[W];
  end
endmodule

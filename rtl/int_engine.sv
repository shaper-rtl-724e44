// int_engine: 64-bit integer processing engine of the secret-sharing unit.
//
// Additive secret shares live in the ring Z_(2^64), so addition and
// multiplication of shares (Int.add / Int.mul) are plain 64-bit operations
// that wrap around.  The engine takes one operation per cycle when en is
// high and registers the result (one cycle latency, vld marks it).  The
// 64-bit width and the two operations follow the design description; the
// single-cycle multiplier (on FPGA, a group of DSP slices) is this
// implementation's choice.
module int_engine #(
  parameter int unsigned W = 64
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         is_mul,   // 0: a + b, 1: a * b (both mod 2^W)
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y,
  output logic         vld
);
  logic [W-1:0] sum, prod;
  assign sum  = a + b;
  assign prod = a * b;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= 1'b0;
    else        vld <= en;
  end
  always_ff @(posedge clk) begin
    if (en) y <= is_mul ? prod : sum;
  end
endmodule

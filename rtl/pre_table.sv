// pre_table: fixed-base pre-computed table for Paillier encryption.
//
// Holds, for each of the two CRT bases (hs mod p^2 and hs mod q^2), every
// window power base^(d * 2^(w*j)) for window j = 0 .. NWIN-1 and digit
// d = 1 .. 2^w - 1 (the all-zero digit needs no entry).  A fixed-base
// exponentiation then becomes one modular multiplication per non-zero
// window of the exponent.  Line address = (sel*NWIN + j)*(2^w - 1) + d - 1.
// With |n| = 3072, exponents of |n|/2 = 1536 bits and w = 4 this is
// 2 x 384 x 15 = 11520 lines of 3072 bits (35.4 Mbit), which on the FPGA
// occupies URAM.  One write port (filled by AHE.init from device memory) and
// one read port with a registered output (one cycle latency).
// Organisation and sizes follow the design description; the port layout is
// this implementation's.
module pre_table #(
  parameter int unsigned L        = 3072,
  parameter int unsigned EXP_BITS = 1536,
  parameter int unsigned WIN      = 4,
  parameter int unsigned NWIN     = EXP_BITS / WIN,
  parameter int unsigned NLINE    = 2 * NWIN * ((1 << WIN) - 1),
  parameter int unsigned AW       = shaper_pkg::clog2i(NLINE)
) (
  input  logic                                    clk,
  // write port (linear line address)
  input  logic                                    we,
  input  logic [AW-1:0]                           waddr,
  input  logic [L-1:0]                            wdata,
  // read port (base, window, digit)
  input  logic                                    re,
  input  logic                                    sel,     // 0: p^2 base, 1: q^2 base
  input  logic [shaper_pkg::clog2i(NWIN)-1:0]     win,
  input  logic [WIN-1:0]                          digit,   // 1 .. 2^WIN-1
  output logic [L-1:0]                            rdata
);
  localparam int unsigned NDIG = (1 << WIN) - 1;

  logic [L-1:0]  mem [NLINE];
  logic [AW-1:0] raddr;

  assign raddr = AW'((32'(sel) * NWIN + 32'(win)) * NDIG + 32'(digit) - 32'd1);

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule

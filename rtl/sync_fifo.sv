// sync_fifo: single-clock first-in first-out buffer.
//
// Caches the random words produced by the Keccak engine until the secret-
// sharing unit consumes them.  DEPTH entries of W bits in a memory array,
// read and write pointers one bit wider than the address so that full and
// empty are told apart.  Show-ahead: dout presents the oldest word whenever
// empty is low, and pop removes it.  push while full and pop while empty
// are ignored (and flagged by assertions in simulation).  The buffer itself
// is named by the design description; depth, width and interface are this
// implementation's choices.  Lint reports rst_n as used both asynchronously
// and synchronously: the synchronous use is only the assertions' disable.
module sync_fifo #(
  parameter int unsigned W     = 64,
  parameter int unsigned DEPTH = 512
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         push,
  input  logic [W-1:0] din,
  input  logic         pop,
  output logic [W-1:0] dout,
  output logic         full,
  output logic         empty,
  output logic [shaper_pkg::clog2i(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = shaper_pkg::clog2i(DEPTH);

  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  wp, rp;
  logic         do_push, do_pop;

  assign full    = (wp[AW-1:0] == rp[AW-1:0]) && (wp[AW] != rp[AW]);
  assign empty   = (wp == rp);
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign dout    = mem[rp[AW-1:0]];
  assign count   = $bits(count)'(wp - rp);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0;
      rp <= '0;
    end else begin
      if (do_push) wp <= wp + 1'b1;
      if (do_pop)  rp <= rp + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wp[AW-1:0]] <= din;
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) push |-> !full);
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop  |-> !empty);
endmodule

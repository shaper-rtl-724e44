// csprng: SHA-3 (Keccak-f[1600]) based cryptographically secure random
// number generator.
//
// The 1600-bit Keccak state is cleared and the seed block (RATE bits, given
// already padded by the host) is absorbed when seed_valid is pulsed.  The
// permutation then runs one of its 24 rounds per clock.  When it finishes,
// the RATE bits of the state are copied to an output buffer and, while the
// buffer drains one 64-bit word per clock into the random-number FIFO, the
// next permutation (squeeze) already runs.  Words are only offered while the
// FIFO has room (out_valid/out_ready), so the engine fills the buffer and
// then waits, as the design description asks: the Keccak engine "pushes
// random numbers into the buffer when it is not full".
//
// Keccak-f[1600] is the standard FIPS 202 permutation.  The SHA3-256 rate of
// 1088 bits (17 words), the seeding through a padded block and the output
// order (lane 0 first) are this implementation's choices.  Throughput is 17
// words per 24 cycles when the FIFO keeps up.
module csprng #(
  parameter int unsigned RATE = 1088
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            seed_valid,
  input  logic [RATE-1:0] seed_block,
  output logic            out_valid,
  input  logic            out_ready,
  output logic [63:0]     out_word,
  output logic            seeded
);
  localparam int unsigned NW = RATE / 64;

  typedef logic [24:0][63:0] kstate_t;

  localparam logic [63:0] RC [24] = '{
    64'h0000000000000001, 64'h0000000000008082, 64'h800000000000808A, 64'h8000000080008000,
    64'h000000000000808B, 64'h0000000080000001, 64'h8000000080008081, 64'h8000000000008009,
    64'h000000000000008A, 64'h0000000000000088, 64'h0000000080008009, 64'h000000008000000A,
    64'h000000008000808B, 64'h800000000000008B, 64'h8000000000008089, 64'h8000000000008003,
    64'h8000000000008002, 64'h8000000000000080, 64'h000000000000800A, 64'h800000008000000A,
    64'h8000000080008081, 64'h8000000000008080, 64'h0000000080000001, 64'h8000000080008008};

  // rotation offsets, lane index x + 5*y
  localparam int ROT [25] = '{
     0,  1, 62, 28, 27,
    36, 44,  6, 55, 20,
     3, 10, 43, 25, 39,
    41, 45, 15, 21,  8,
    18,  2, 61, 56, 14};

  function automatic logic [63:0] rotl(logic [63:0] v, int n);
    return (n == 0) ? v : ((v << n) | (v >> (64 - n)));
  endfunction

  function automatic kstate_t kround(kstate_t a, logic [63:0] rc);
    logic [4:0][63:0] c, d;
    kstate_t b, r;
    for (int x = 0; x < 5; x++) c[x] = a[x] ^ a[x+5] ^ a[x+10] ^ a[x+15] ^ a[x+20];
    for (int x = 0; x < 5; x++) d[x] = c[(x+4)%5] ^ rotl(c[(x+1)%5], 1);
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        b[y + 5*((2*x + 3*y) % 5)] = rotl(a[x + 5*y] ^ d[x], ROT[x + 5*y]);
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        r[x + 5*y] = b[x + 5*y] ^ (~b[(x+1)%5 + 5*y] & b[(x+2)%5 + 5*y]);
    r[0] = r[0] ^ rc;
    return r;
  endfunction

  kstate_t          st;
  logic [4:0]       rnd;
  logic             perm;          // permutation running
  logic             have;          // state holds an unread output block
  logic [NW-1:0][63:0] obuf;
  logic [$clog2(NW+1)-1:0] ocnt;   // words left in the output buffer
  logic [$clog2(NW)-1:0]   optr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      perm   <= 1'b0;
      have   <= 1'b0;
      rnd    <= '0;
      ocnt   <= '0;
      optr   <= '0;
      seeded <= 1'b0;
      st     <= '0;
      obuf   <= '0;
    end else if (seed_valid) begin
      st     <= kstate_t'(1600'(seed_block));
      perm   <= 1'b1;
      have   <= 1'b0;
      rnd    <= '0;
      ocnt   <= '0;
      optr   <= '0;
      seeded <= 1'b1;
    end else begin
      if (perm) begin
        st  <= kround(st, RC[rnd]);
        rnd <= rnd + 5'd1;
        if (rnd == 5'd23) begin
          perm <= 1'b0;
          have <= 1'b1;
        end
      end
      // drain the output buffer
      if (out_valid && out_ready) begin
        ocnt <= ocnt - 1'b1;
        optr <= optr + 1'b1;
      end
      // refill the buffer and start the next squeeze permutation
      if (have && !perm && (ocnt == '0 || (ocnt == 1 && out_valid && out_ready))) begin
        for (int i = 0; i < int'(NW); i++) obuf[i] <= st[i];
        ocnt <= ($clog2(NW+1))'(NW);
        optr <= '0;
        have <= 1'b0;
        perm <= 1'b1;
        rnd  <= '0;
      end
    end
  end

  assign out_valid = (ocnt != '0);
  assign out_word  = obuf[optr];
endmodule

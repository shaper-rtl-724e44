// ss_unit: secret-sharing function unit.
//
// Holds the Keccak CSPRNG, the random-number FIFO behind it and N_INT
// 64-bit integer engines, and executes
//   SS.gen  len, o_ptr        : len lines of fresh random 64-bit shares
//   Int.add len, a, b, o_ptr  : lane-wise a + b mod 2^64 over len lines
//   Int.mul len, a, b, o_ptr  : lane-wise a * b mod 2^64 over len lines
// A scratchpad line carries N_INT 64-bit values in its low N_INT*64 bits
// (lane i in bits 64i+63 .. 64i); the rest of a written line is zero.
// Int.add/mul take three cycles per line: read a and b (two scratchpad
// ports), compute in all engines at once, write the result.  SS.gen pops
// one random word per cycle from the FIFO and writes a line when N_INT
// words are collected; it waits whenever the FIFO is empty.  The Keccak
// engine refills the FIFO whenever it has room.
//
// The engine count, the 64-bit width, the CSPRNG with its FIFO and the
// instructions follow the design description; the line layout, the FIFO
// depth and the timing are this implementation's choices.  Lint reports the
// unused upper bits of the read data (lines are wider than 32 x 64 bits)
// and the engines' valid outputs, which the fixed three-cycle schedule
// makes redundant.
module ss_unit #(
  parameter int unsigned L      = 3072,
  parameter int unsigned N_INT  = 32,
  parameter int unsigned FIFO_D = 512,
  parameter int unsigned SAW    = 13,
  parameter int unsigned RATE   = 1088
) (
  input  logic                clk,
  input  logic                rst_n,
  // CSPRNG seeding
  input  logic                seed_valid,
  input  logic [RATE-1:0]     seed_block,
  // instructions
  input  logic                in_valid,
  output logic                in_ready,
  input  shaper_pkg::opcode_e in_op,
  input  logic [shaper_pkg::LEN_W-1:0] in_len,
  input  logic [SAW-1:0]      in_pa,
  input  logic [SAW-1:0]      in_pb,
  input  logic [SAW-1:0]      in_po,
  // scratchpad: port A reads a / writes results, port B reads b
  output logic                spa_en,
  output logic                spa_we,
  output logic [SAW-1:0]      spa_addr,
  output logic [L-1:0]        spa_wdata,
  input  logic [L-1:0]        spa_rdata,
  output logic                spb_en,
  output logic [SAW-1:0]      spb_addr,
  input  logic [L-1:0]        spb_rdata,
  // status
  output logic                idle,
  output logic                rng_seeded,
  output logic [shaper_pkg::clog2i(FIFO_D+1)-1:0] rng_level,
  output logic                ev_rng_stall
);
  import shaper_pkg::*;

  // ---------------- CSPRNG and FIFO ----------------
  logic        r_valid, r_ready, f_full, f_empty, f_pop;
  logic [63:0] r_word, f_dout;

  csprng #(.RATE(RATE)) u_rng (
    .clk, .rst_n, .seed_valid, .seed_block,
    .out_valid(r_valid), .out_ready(r_ready), .out_word(r_word), .seeded(rng_seeded));
  assign r_ready = !f_full;

  sync_fifo #(.W(64), .DEPTH(FIFO_D)) u_fifo (
    .clk, .rst_n, .push(r_valid && r_ready), .din(r_word),
    .pop(f_pop), .dout(f_dout), .full(f_full), .empty(f_empty), .count(rng_level));

  // ---------------- integer engines ----------------
  logic                   e_en, e_mul;
  logic [N_INT-1:0][63:0] e_y;
  logic [N_INT-1:0]       e_vld;
  for (genvar g = 0; g < N_INT; g++) begin : g_int
    int_engine #(.W(64)) u_int (
      .clk, .rst_n, .en(e_en), .is_mul(e_mul),
      .a(spa_rdata[g*64 +: 64]), .b(spb_rdata[g*64 +: 64]), .y(e_y[g]), .vld(e_vld[g]));
  end

  // ---------------- sequencer ----------------
  typedef enum logic [2:0] {S_IDLE, S_RD, S_EX, S_WR, S_GEN, S_GWR} st_e;
  st_e              st;
  opcode_e          op_r;
  logic [LEN_W-1:0] left;
  logic [SAW-1:0]   pa, pb, po;
  logic [N_INT-1:0][63:0] gbuf;
  logic [clog2i(N_INT+1)-1:0] gcnt;

  assign in_ready = (st == S_IDLE);
  assign f_pop    = (st == S_GEN) && !f_empty;
  assign ev_rng_stall = (st == S_GEN) && f_empty;
  assign e_en     = (st == S_EX);
  assign e_mul    = (op_r == OP_INT_MUL);

  always_comb begin
    spa_en = 1'b0; spa_we = 1'b0; spa_addr = pa; spa_wdata = '0;
    spb_en = 1'b0; spb_addr = pb;
    unique case (st)
      S_RD:  begin spa_en = 1'b1; spb_en = 1'b1; end
      S_WR:  begin spa_en = 1'b1; spa_we = 1'b1; spa_addr = po; spa_wdata = L'(e_y); end
      S_GWR: begin spa_en = 1'b1; spa_we = 1'b1; spa_addr = po; spa_wdata = L'(gbuf); end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st   <= S_IDLE;
      op_r <= OP_NOP;
      left <= '0;
      gcnt <= '0;
    end else begin
      unique case (st)
        S_IDLE: if (in_valid) begin
          op_r <= in_op;
          left <= in_len;
          gcnt <= '0;
          if (in_len == '0) st <= S_IDLE;
          else if (in_op == OP_SS_GEN) st <= S_GEN;
          else if (in_op == OP_INT_ADD || in_op == OP_INT_MUL) st <= S_RD;
        end
        S_RD: st <= S_EX;
        S_EX: st <= S_WR;
        S_WR: begin
          left <= left - LEN_W'(1);
          st   <= (left == LEN_W'(1)) ? S_IDLE : S_RD;
        end
        S_GEN: if (!f_empty) begin
          gcnt <= gcnt + 1'b1;
          if (gcnt == ($bits(gcnt))'(N_INT - 1)) st <= S_GWR;
        end
        S_GWR: begin
          gcnt <= '0;
          left <= left - LEN_W'(1);
          st   <= (left == LEN_W'(1)) ? S_IDLE : S_GEN;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (st == S_IDLE && in_valid) begin
      pa <= in_pa; pb <= in_pb; po <= in_po;
    end
    if (st == S_WR || st == S_GWR) begin
      pa <= pa + SAW'(1); pb <= pb + SAW'(1); po <= po + SAW'(1);
    end
    if (f_pop) gbuf[gcnt[clog2i(N_INT)-1:0]] <= f_dout;
  end

  assign idle = (st == S_IDLE);
endmodule

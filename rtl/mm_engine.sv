// mm_engine: pipelined high-radix shift-sub modular multiplier.
//
// Computes c = a*b mod m for odd moduli m of up to L bits.  b is consumed
// K bits per round (TAU = ceil(L/K) rounds).  In each of the first TAU-1
// rounds two independent phases run side by side:
//   Phase_c  c <- c + b_i * a                 (multiply-accumulate)
//   Phase_a  a <- QR(a << K, m, K)             (shift and quick reduction)
// and the last round adds b_{TAU-1}*a into c and reduces the sum with
// QR(., m, K + ceil(log2 TAU)).  QR is a quick Barrett reduction on the most
// significant bits: a' = x >> (l-D-2), gamma = (a' * m') >> (2D+2), then
// b = x - (gamma+1)*m lands in [-m, 2m) and one conditional add or subtract
// of m finishes it (l is the bit length of m, m' = floor(2^(2D+2)/(m_hat+1))
// with m_hat = m >> (l-D-2)).
//
// Pipeline.  A round passes through five stages, each given STAGE_CYC clock
// cycles (a multicycle stage; the stage registers load once per "tick"):
//   Div  gamma of the Barrett quotient
//   RC   (gamma+1)*m and b_i*a, both in block multipliers (two-integer form)
//   CSA  carry-save merge of x - (gamma+1)*m and of c + b_i*a
//   Add  128-bit-chunk carry-select addition of both
//   CS   conditional +m / -m correction of the reduced value
// A multiplication circulates through the ring of stages once per round,
// and up to five independent multiplications occupy the five stages at the
// same time, so the engine delivers one product every (TAU+1)*STAGE_CYC
// cycles when kept full.  The final round takes two passes (accumulate,
// then reduce), so the latency of one product is (TAU+1)*5*STAGE_CYC cycles.
//
// The algorithm, the five stages, K = 72, the 128-bit adder chunks and the
// 4-cycle stages follow the design description.  This implementation adds:
// the modulus length l found by a leading-one detector, m' computed by two
// serial dividers when a modulus is loaded, the handshake below, and the
// two-pass final round.
//
// Interface.  Load a modulus with m_load (only while idle, i.e. no operation
// in flight); m_busy stays high until its constants are ready.  Operations
// enter with in_valid/in_ready (a, b < m; ready only on a tick with a free
// slot).  Each result appears for one cycle on out_valid with the operation's
// tag; there is no back-pressure.  Moduli need at least K+ceil(log2 TAU)+2 bits.
//
// Lint notes: the top quotient bits and the done flags of the two reciprocal
// dividers are left unused on purpose; the divider widths follow the bounds
// of the reduction and the engine waits on the dividers' busy flags instead.
module mm_engine #(
  parameter int unsigned L         = 3072,
  parameter int unsigned K         = 72,
  parameter int unsigned STAGE_CYC = 4,
  parameter int unsigned TAG_W     = 4,
  parameter int unsigned CHUNK     = 128
) (
  input  logic             clk,
  input  logic             rst_n,
  // modulus load
  input  logic             m_load,
  input  logic [L-1:0]     m_in,
  output logic             m_busy,
  // operation input
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [L-1:0]     in_a,
  input  logic [L-1:0]     in_b,
  input  logic [TAG_W-1:0] in_tag,
  // result
  output logic             out_valid,
  output logic [L-1:0]     out_c,
  output logic [TAG_W-1:0] out_tag,
  output logic             idle
);
  import shaper_pkg::*;

  localparam int unsigned TAU  = (L + K - 1) / K;
  localparam int unsigned LOGT = clog2i(TAU);
  localparam int unsigned DF   = K + LOGT;            // final-round length bound
  localparam int unsigned GW   = DF + 2;              // width of gamma + 1
  localparam int unsigned AW_  = 2*DF + 2;            // width of a'
  localparam int unsigned MPW  = DF + 1;              // width of m'
  localparam int unsigned WA   = L + DF + 3;          // Phase_a working width
  localparam int unsigned WC   = L + DF + 1;          // accumulator width
  localparam int unsigned RW   = clog2i(TAU + 1);
  localparam int unsigned LW   = clog2i(L + 1);
  localparam int unsigned SCW  = clog2i(STAGE_CYC + 1);

  // ------------------------------------------------------------------
  // Modulus registers and Barrett constants
  // ------------------------------------------------------------------
  logic [L-1:0]   m_r;
  logic [LW-1:0]  l_r;            // bit length of m
  logic [MPW-1:0] mp_k, mp_f;     // m' for D = K and D = DF
  logic [LW-1:0]  l_det;
  logic           dk_busy, df_busy, dk_done, df_done, div_start;
  logic [DF+2:0]  dk_d, df_d;
  logic           ld_pend;

  always_comb begin
    l_det = '0;
    for (int i = 0; i < int'(L); i++) if (m_in[i]) l_det = LW'(i + 1);
  end

  // m_hat + 1 for both reduction lengths (m_hat has D+2 bits)
  assign dk_d = (DF+3)'(m_r >> (l_r - LW'(K)  - LW'(2))) + (DF+3)'(1);
  assign df_d = (DF+3)'(m_r >> (l_r - LW'(DF) - LW'(2))) + (DF+3)'(1);

  recip_div #(.E(2*K+2),  .DW(DF+3), .QW(MPW)) u_div_k (
    .clk, .rst_n, .start(div_start), .d(dk_d), .q(mp_k), .busy(dk_busy), .done(dk_done));
  recip_div #(.E(2*DF+2), .DW(DF+3), .QW(MPW)) u_div_f (
    .clk, .rst_n, .start(div_start), .d(df_d), .q(mp_f), .busy(df_busy), .done(df_done));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_r       <= '0;
      l_r       <= '0;
      ld_pend   <= 1'b0;
      div_start <= 1'b0;
    end else begin
      div_start <= 1'b0;
      if (m_load && !m_busy) begin
        m_r       <= m_in;
        l_r       <= l_det;
        ld_pend   <= 1'b1;
        div_start <= 1'b1;
      end else if (ld_pend && !div_start && !dk_busy && !df_busy) begin
        ld_pend <= 1'b0;
      end
    end
  end
  assign m_busy = ld_pend | div_start | dk_busy | df_busy;

  // ------------------------------------------------------------------
  // Stage timing: the ring advances once every STAGE_CYC cycles
  // ------------------------------------------------------------------
  logic [SCW-1:0] scnt;
  logic           tick;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                        scnt <= '0;
    else if (scnt == SCW'(STAGE_CYC-1)) scnt <= '0;
    else                               scnt <= scnt + SCW'(1);
  end
  assign tick = (scnt == SCW'(STAGE_CYC-1));

  // ------------------------------------------------------------------
  // Per-operation context carried around the ring
  // ------------------------------------------------------------------
  typedef enum logic [1:0] {P_ROUND = 2'd0, P_FACC = 2'd1, P_FRED = 2'd2} pass_e;
  typedef struct packed {
    logic [TAG_W-1:0] tag;
    pass_e            pass;
    logic [RW-1:0]    rnd;
    logic [L-1:0]     a;
    logic [WC-1:0]    c;
    logic [L-1:0]     b;    // remaining digits of b, current digit in [K-1:0]
  } ctx_t;

  ctx_t         c0, c1, c2, c3, c4;     // contexts held in Div, RC, CSA, Add, CS
  logic         v0, v1, v2, v3, v4;     // stage holds a live context
  logic [WA-1:0] x1, x2;                 // Phase_a dividend
  logic [GW-1:0] g1;                     // gamma + 1
  logic [GW+L-1:0] re2, ro2;             // (gamma+1)*m in two integers
  logic [K+L-1:0]  pe2, po2;             // b_i*a in two integers
  logic [WA-1:0] sa3, ca3;               // carry-save Phase_a
  logic [WC-1:0] sc3, cc3;               // carry-save Phase_c
  logic [WA-1:0] ya4;                    // x - (gamma+1)*m
  logic [WC-1:0] yc4;                    // c + b_i*a

  // ---- Div stage ---------------------------------------------------
  logic [WA-1:0]      x0;
  logic               fin0;
  logic [LW-1:0]      sh0;
  logic [AW_-1:0]     ap0;
  logic [AW_+MPW-1:0] prod0;
  logic [GW-1:0]      gam0;
  always_comb begin
    fin0  = (c0.pass == P_FRED);
    x0    = fin0 ? WA'(c0.c) : (WA'(c0.a) << K);
    sh0   = fin0 ? (l_r - LW'(DF) - LW'(2)) : (l_r - LW'(K) - LW'(2));
    ap0   = AW_'(x0 >> sh0);
    prod0 = (AW_+MPW)'(ap0) * (AW_+MPW)'(fin0 ? mp_f : mp_k);
    gam0  = fin0 ? GW'(prod0 >> (2*DF+2)) : GW'(prod0 >> (2*K+2));
  end

  // ---- RC / BM stage -----------------------------------------------
  logic [GW+L-1:0] re1, ro1;
  logic [K+L-1:0]  pe1, po1;
  logic [GW-1:0]   g1_eff;
  logic [K-1:0]    bi1;
  assign g1_eff = (c1.pass == P_FACC) ? '0 : g1;
  assign bi1    = (c1.pass == P_FRED) ? '0 : c1.b[K-1:0];
  block_mul #(.AW(GW), .BW(L)) u_rc (.a(g1_eff), .b(m_r),  .pe(re1), .po(ro1));
  block_mul #(.AW(K),  .BW(L)) u_bm (.a(bi1),    .b(c1.a), .pe(pe1), .po(po1));

  // ---- CSA stage ---------------------------------------------------
  logic [WA-1:0] sa2, ca2;
  logic [WC-1:0] sc2, cc2;
  csa3 #(.W(WA)) u_csa_a (.x(x2), .y(~WA'(re2)), .z(~WA'(ro2)), .s(sa2), .c(ca2));
  csa3 #(.W(WC)) u_csa_c (.x(c2.c), .y(WC'(pe2)), .z(WC'(po2)), .s(sc2), .c(cc2));

  // ---- Add stage ---------------------------------------------------
  // x - Re - Ro = x + ~Re + ~Ro + 2: one +1 enters the free carry LSB,
  // the other the adder's carry-in.
  logic [WA-1:0] ya3;
  logic [WC-1:0] yc3;
  logic          coa_unused, coc_unused;
  carry_select_adder #(.W(WA), .CHUNK(CHUNK)) u_add_a (
    .x(sa3), .y({ca3[WA-2:0], 1'b1}), .cin(1'b1), .sum(ya3), .cout(coa_unused));
  carry_select_adder #(.W(WC), .CHUNK(CHUNK)) u_add_c (
    .x(sc3), .y({cc3[WC-2:0], 1'b0}), .cin(1'b0), .sum(yc3), .cout(coc_unused));

  // ---- CS stage ----------------------------------------------------
  // b = ya4 as an (L+2)-bit signed number in [-m, 2m).
  logic [L+1:0] bv, madd, bs;
  logic         bneg, coadd_unused;
  logic [L-1:0] red4;
  assign bv   = ya4[L+1:0];
  assign bneg = bv[L+1];
  assign madd = bneg ? {2'b00, m_r} : ~{2'b00, m_r};
  carry_select_adder #(.W(L+2), .CHUNK(CHUNK)) u_cs (
    .x(bv), .y(madd), .cin(~bneg), .sum(bs), .cout(coadd_unused));
  assign red4 = bneg ? bs[L-1:0] : (bs[L+1] ? bv[L-1:0] : bs[L-1:0]);

  // ---- ring advance ------------------------------------------------
  logic finishing;       // context in CS completes on this tick
  ctx_t nxt4;            // context after CS update
  assign finishing = v4 && (c4.pass == P_FRED);

  always_comb begin
    nxt4 = c4;
    unique case (c4.pass)
      P_ROUND: begin
        nxt4.a   = red4;
        nxt4.c   = yc4;
        nxt4.b   = c4.b >> K;
        nxt4.rnd = c4.rnd + RW'(1);
        if (c4.rnd == RW'(TAU-2)) nxt4.pass = P_FACC;
      end
      P_FACC: begin
        nxt4.c    = yc4;
        nxt4.pass = P_FRED;
      end
      default: ;
    endcase
  end

  assign in_ready = tick && !m_busy && !(v4 && !finishing);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v0 <= 1'b0; v1 <= 1'b0; v2 <= 1'b0; v3 <= 1'b0; v4 <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (tick) begin
        v0 <= (v4 && !finishing) || (in_valid && in_ready);
        v1 <= v0;  v2 <= v1;  v3 <= v2;  v4 <= v3;
        if (finishing) out_valid <= 1'b1;
      end
    end
  end

  // contexts and datapath registers (qualified by the valid bits)
  always_ff @(posedge clk) begin
    if (tick) begin
      // entry into Div: recirculated context or a new operation
      if (v4 && !finishing) begin
        c0 <= nxt4;
      end else begin
        c0.tag  <= in_tag;
        c0.pass <= (TAU == 1) ? P_FACC : P_ROUND;
        c0.rnd  <= '0;
        c0.a    <= in_a;
        c0.c    <= '0;
        c0.b    <= in_b;
      end
      c1 <= c0;  c2 <= c1;  c3 <= c2;  c4 <= c3;
    end
  end

  // datapath registers (qualified by the context valid bits)
  always_ff @(posedge clk) begin
    if (tick) begin
      x1 <= x0;   g1 <= gam0 + GW'(1);
      x2 <= x1;   re2 <= re1; ro2 <= ro1; pe2 <= pe1; po2 <= po1;
      sa3 <= sa2; ca3 <= ca2; sc3 <= sc2; cc3 <= cc2;
      ya4 <= ya3; yc4 <= yc3;
      if (finishing) begin
        out_c   <= red4;
        out_tag <= c4.tag;
      end
    end
  end

  assign idle = !(v0 || v1 || v2 || v3 || v4);

  // A modulus may only be replaced while no multiplication is in flight.
  a_load_idle: assert property (@(posedge clk) disable iff (!rst_n) m_load |-> idle);
endmodule

// paillier_ctrl: one Paillier controller lane with its MM engine.
//
// Runs the CRT form of DJN-Paillier encryption c = (m*n + 1) * hs^a mod n^2
// as the micro-program
//     ME_P  hsp_table, a      -> t1      (fixed-base exponentiation mod p^2)
//     MM    m, n mod p^2      -> t2 ;  ADDI t2, 1
//     MM    t1, t2            -> cp      (mod p^2)
//     ME_P  hsq_table, a      -> t1      (mod q^2)
//     MM    m, n mod q^2      -> t2 ;  ADDI t2, 1
//     MM    t1, t2            -> cq      (mod q^2)
//     SUB   cq - cp (mod q^2) -> d
//     MM    d, p^-2 mod q^2   -> tc      (mod q^2)
// and returns cp and tc; the host forms c = cp + tc*p^2, the one step that
// needs 6144-bit arithmetic.  The micro-program follows the design
// description; it is hard-wired here as a state machine.
//
// ME_P: the exponent a (EXP_BITS bits) is cut into w-bit windows; every
// non-zero window digit selects one table entry (requested from the shared
// pre-computed table through tbl_req/tbl_gnt, data one cycle after the grant)
// that is multiplied into one of five partial products.  Five independent
// partial products keep the five pipeline stages of the MM engine busy;
// they are multiplied together at the end.  Splitting the windows over five
// accumulators is this implementation's way of scheduling the engine.
//
// The MM engine holds one modulus at a time and is reloaded with q^2 between
// the two halves.  Key values (p^2, q^2, n mod p^2, n mod q^2, p^-2 mod q^2)
// are inputs shared by all lanes; n mod p^2 and n mod q^2 are precomputed
// because the multiplier needs operands below the modulus.  The plaintext m
// must be below p^2 and q^2.
// Interface: start (when busy is low) with m and a; done pulses with cp and
// tc valid, which hold until the next start.
module paillier_ctrl #(
  parameter int unsigned L         = 3072,
  parameter int unsigned K         = 72,
  parameter int unsigned STAGE_CYC = 4,
  parameter int unsigned EXP_BITS  = L / 2,
  parameter int unsigned WIN       = 4,
  parameter int unsigned NWIN      = EXP_BITS / WIN
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // key values
  input  logic [L-1:0]          key_p2,
  input  logic [L-1:0]          key_q2,
  input  logic [L-1:0]          key_nmp,   // n mod p^2
  input  logic [L-1:0]          key_nmq,   // n mod q^2
  input  logic [L-1:0]          key_pq2,   // p^-2 mod q^2
  // command
  input  logic                  start,
  input  logic [L-1:0]          msg,
  input  logic [EXP_BITS-1:0]   rexp,
  output logic                  busy,
  output logic                  done,
  output logic [L-1:0]          cp,
  output logic [L-1:0]          tc,
  // pre-computed table access
  output logic                  tbl_req,
  output logic                  tbl_sel,
  output logic [shaper_pkg::clog2i(NWIN)-1:0] tbl_win,
  output logic [WIN-1:0]        tbl_digit,
  input  logic                  tbl_gnt,
  input  logic [L-1:0]          tbl_rdata,
  // activity counters' events
  output logic                  ev_mm_issue
);
  import shaper_pkg::*;

  localparam int unsigned NACC = 5;
  localparam int unsigned JW   = clog2i(NWIN + 1);
  localparam logic [2:0] TAG_AUX  = 3'd5;
  localparam logic [2:0] TAG_MAIN = 3'd6;

  typedef enum logic [3:0] {
    S_IDLE, S_LOAD, S_LWAIT, S_AUX, S_WIN, S_COMB, S_ADDI, S_FMM, S_FWAIT,
    S_SUB, S_SUBFIX, S_TCMM, S_TCWAIT, S_DONE
  } state_e;

  state_e state;
  logic   phase;                       // 0: mod p^2 half, 1: mod q^2 half

  // engine
  logic             e_load, e_busy, e_iv, e_ir, e_ov, e_idle;
  logic [L-1:0]     e_a, e_b, e_c;
  logic [2:0]       e_itag, e_otag;
  logic [L-1:0]     modv;

  assign modv = phase ? key_q2 : key_p2;

  mm_engine #(.L(L), .K(K), .STAGE_CYC(STAGE_CYC), .TAG_W(3)) u_mm (
    .clk, .rst_n,
    .m_load(e_load), .m_in(modv), .m_busy(e_busy),
    .in_valid(e_iv), .in_ready(e_ir), .in_a(e_a), .in_b(e_b), .in_tag(e_itag),
    .out_valid(e_ov), .out_c(e_c), .out_tag(e_otag), .idle(e_idle));

  // working registers
  logic [L-1:0]        m_r, aux, t1, t2, mres, tval;
  logic [EXP_BITS-1:0] a_r;
  logic [L:0]          dsub;              // signed difference for SUB
  logic                aux_done, mres_done, tval_ok, tpend;
  logic [JW-1:0]       j;
  logic [L-1:0]        acc  [NACC];
  logic [NACC-1:0]     aset, abusy;

  logic [WIN-1:0] digit;
  assign digit = a_r[j[JW-1:0]*WIN +: WIN];

  // accumulator selection
  logic       have_new, have_set, have_pair;
  logic [2:0] k_new, k_set, k_p1, k_p2;
  always_comb begin
    have_new = 1'b0; have_set = 1'b0; have_pair = 1'b0;
    k_new = '0; k_set = '0; k_p1 = '0; k_p2 = '0;
    for (int k = NACC - 1; k >= 0; k--) begin
      if (!aset[k] && !abusy[k]) begin have_new = 1'b1; k_new = 3'(k); end
      if ( aset[k] && !abusy[k]) begin have_set = 1'b1; k_set = 3'(k); end
    end
    // two idle partial products for the final combination
    for (int k = 0; k < int'(NACC); k++) begin
      for (int k2 = k + 1; k2 < int'(NACC); k2++) begin
        if (!have_pair && aset[k] && !abusy[k] && aset[k2] && !abusy[k2]) begin
          have_pair = 1'b1; k_p1 = 3'(k); k_p2 = 3'(k2);
        end
      end
    end
  end

  // engine request mux
  always_comb begin
    e_iv = 1'b0; e_a = '0; e_b = '0; e_itag = '0;
    unique case (state)
      S_AUX:  begin e_iv = 1'b1; e_a = m_r; e_b = phase ? key_nmq : key_nmp; e_itag = TAG_AUX; end
      S_WIN:  if (j != JW'(NWIN) && digit != '0 && tval_ok && !have_new && have_set) begin
                e_iv = 1'b1; e_a = acc[k_set]; e_b = tval; e_itag = k_set;
              end
      S_COMB: if (have_pair) begin
                e_iv = 1'b1; e_a = acc[k_p1]; e_b = acc[k_p2]; e_itag = k_p1;
              end
      S_FMM:  begin e_iv = 1'b1; e_a = t1; e_b = t2; e_itag = TAG_MAIN; end
      S_TCMM: begin e_iv = 1'b1; e_a = dsub[L-1:0]; e_b = key_pq2; e_itag = TAG_MAIN; end
      default: ;
    endcase
  end
  assign e_load      = (state == S_LOAD) && e_idle && !e_busy;
  assign ev_mm_issue = e_iv && e_ir;

  // table request
  assign tbl_req   = (state == S_WIN) && (j != JW'(NWIN)) && (digit != '0) && !tval_ok && !tpend;
  assign tbl_sel   = phase;
  assign tbl_win   = ($bits(tbl_win))'(j);
  assign tbl_digit = digit;

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      phase <= 1'b0;
      done  <= 1'b0;
      aset  <= '0;
      abusy <= '0;
      aux_done  <= 1'b0;
      mres_done <= 1'b0;
      tval_ok   <= 1'b0;
      tpend     <= 1'b0;
      j     <= '0;
    end else begin
      done <= 1'b0;
      // results returning from the engine (any state)
      if (e_ov) begin
        if (e_otag == TAG_AUX)       aux_done  <= 1'b1;
        else if (e_otag == TAG_MAIN) mres_done <= 1'b1;
        else                         abusy[e_otag] <= 1'b0;
      end
      // table data arrives the cycle after the grant
      if (tbl_req && tbl_gnt) tpend <= 1'b1;
      if (tpend) begin
        tpend   <= 1'b0;
        tval_ok <= 1'b1;
      end

      unique case (state)
        S_IDLE: if (start) begin
          phase <= 1'b0;
          state <= S_LOAD;
        end
        S_LOAD:  if (e_load) state <= S_LWAIT;
        S_LWAIT: if (!e_busy) begin
          state     <= S_AUX;
          aux_done  <= 1'b0;
          mres_done <= 1'b0;
          aset      <= '0;
          abusy     <= '0;
          j         <= '0;
          tval_ok   <= 1'b0;
        end
        S_AUX: if (e_ir) state <= S_WIN;
        S_WIN: begin
          if (j == JW'(NWIN)) begin
            state <= S_COMB;
          end else if (digit == '0) begin
            j <= j + JW'(1);
          end else if (tval_ok) begin
            if (have_new) begin
              // first factor of a partial product: copied, no multiplication
              aset[k_new] <= 1'b1;
              tval_ok     <= 1'b0;
              j           <= j + JW'(1);
            end else if (have_set && e_ir) begin
              abusy[k_set] <= 1'b1;
              tval_ok      <= 1'b0;
              j            <= j + JW'(1);
            end
          end
        end
        S_COMB: begin
          if (have_pair) begin
            if (e_ir) begin
              abusy[k_p1] <= 1'b1;
              aset[k_p2]  <= 1'b0;
            end
          end else if (abusy == '0) begin
            state <= S_ADDI;
          end
        end
        S_ADDI: if (aux_done) state <= S_FMM;
        S_FMM:  if (e_ir) begin
          state     <= S_FWAIT;
          mres_done <= 1'b0;
        end
        S_FWAIT: if (mres_done || (e_ov && e_otag == TAG_MAIN)) begin
          if (!phase) begin
            phase <= 1'b1;
            state <= S_LOAD;
          end else begin
            state <= S_SUB;
          end
        end
        S_SUB:    state <= S_SUBFIX;
        S_SUBFIX: if (!dsub[L]) state <= S_TCMM;
        S_TCMM:   if (e_ir) begin
          state     <= S_TCWAIT;
          mres_done <= 1'b0;
        end
        S_TCWAIT: if (mres_done || (e_ov && e_otag == TAG_MAIN)) state <= S_DONE;
        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // datapath registers
  logic [L:0] t2p1;
  assign t2p1 = {1'b0, aux} + (L+1)'(1);

  always_ff @(posedge clk) begin
    if (state == S_IDLE && start) begin
      m_r <= msg;
      a_r <= rexp;
    end
    if (e_ov) begin
      if (e_otag == TAG_AUX)       aux  <= e_c;
      else if (e_otag == TAG_MAIN) mres <= e_c;
      else                         acc[e_otag] <= e_c;
    end
    if (tpend) tval <= tbl_rdata;
    if (state == S_WIN && j != JW'(NWIN) && digit != '0 && tval_ok && have_new)
      acc[k_new] <= tval;
    if (state == S_COMB && !have_pair && abusy == '0) begin
      // the one remaining partial product, or 1 for an all-zero exponent
      t1 <= '0;
      t1[0] <= 1'b1;
      for (int k = 0; k < int'(NACC); k++) if (aset[k]) t1 <= acc[k];
    end
    if (state == S_ADDI && aux_done)
      t2 <= (t2p1 == {1'b0, modv}) ? '0 : t2p1[L-1:0];   // (m*n mod x) + 1 mod x
    if (state == S_FWAIT && (mres_done || (e_ov && e_otag == TAG_MAIN))) begin
      if (!phase) cp <= (e_ov && e_otag == TAG_MAIN) ? e_c : mres;
      else        t1 <= (e_ov && e_otag == TAG_MAIN) ? e_c : mres;   // cq
    end
    if (state == S_SUB)                 dsub <= {1'b0, t1} - {1'b0, cp};
    if (state == S_SUBFIX && dsub[L])   dsub <= dsub + {1'b0, key_q2};
    if (state == S_TCWAIT && (mres_done || (e_ov && e_otag == TAG_MAIN)))
      tc <= (e_ov && e_otag == TAG_MAIN) ? e_c : mres;
  end
endmodule

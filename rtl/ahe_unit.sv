// ahe_unit: additively-homomorphic-encryption function unit.
//
// N_ENG Paillier controller lanes, each with its own pipelined MM engine,
// share one pre-computed table and the key registers.  Independent AHE
// instructions (vectorised work: many encryptions without data dependency)
// are spread over the lanes, so up to N_ENG encryptions run at once.
//
// A small front end owns the unit's scratchpad port.  An accepted AHE.enc
// reads the plaintext line (i_pt_ptr, value in the low bits) and the line
// holding its random exponent (i_pk_ptr, low EXP_BITS bits), starts a free
// lane, and later writes the lane's two results to o_ct_ptr (cp) and
// o_ct_ptr+1 (tc).  Result write-back has priority over new instructions.
// Table reads from the lanes go through a round-robin arbiter, one per
// cycle, data one cycle after the grant.  Key registers and the table are
// written by the AHE.init data stream (key_we / tbl_we).
//
// The lanes, engines and shared table follow the design description; taking
// the random exponent from the scratchpad line i_pk_ptr, the front end and
// the arbiter are this implementation's choices.  AHE.dec, ccadd, pcadd and
// pcmul are accepted but not executed: they raise the sticky illegal flag.
module ahe_unit #(
  parameter int unsigned L         = 3072,
  parameter int unsigned K         = 72,
  parameter int unsigned STAGE_CYC = 4,
  parameter int unsigned N_ENG     = 14,
  parameter int unsigned WIN       = 4,
  parameter int unsigned EXP_BITS  = L / 2,
  parameter int unsigned SAW       = 13,
  parameter int unsigned NWIN      = EXP_BITS / WIN,
  parameter int unsigned TAW       = shaper_pkg::clog2i(2 * NWIN * ((1 << WIN) - 1))
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // AHE.init data
  input  logic                  key_we,
  input  logic [2:0]            key_idx,
  input  logic [L-1:0]          key_wdata,
  input  logic                  tbl_we,
  input  logic [TAW-1:0]        tbl_waddr,
  input  logic [L-1:0]          tbl_wdata,
  // instructions
  input  logic                  in_valid,
  output logic                  in_ready,
  input  shaper_pkg::opcode_e   in_op,
  input  logic [SAW-1:0]        in_pt,
  input  logic [SAW-1:0]        in_pk,
  input  logic [SAW-1:0]        in_ct,
  // scratchpad port
  output logic                  spm_en,
  output logic                  spm_we,
  output logic [SAW-1:0]        spm_addr,
  output logic [L-1:0]          spm_wdata,
  input  logic [L-1:0]          spm_rdata,
  // status
  output logic                  idle,
  output logic                  illegal,
  output logic [N_ENG-1:0]      lane_busy,
  output logic                  ev_mm_issue
);
  import shaper_pkg::*;

  localparam int unsigned LW  = clog2i(N_ENG);
  localparam int unsigned NWW = clog2i(NWIN);

  // ---------------- key registers ----------------
  logic [L-1:0] k_p2, k_q2, k_nmp, k_nmq, k_pq2;
  always_ff @(posedge clk) begin
    if (key_we) begin
      unique case (key_idx)
        3'd0:    k_p2  <= key_wdata;
        3'd1:    k_q2  <= key_wdata;
        3'd2:    k_nmp <= key_wdata;
        3'd3:    k_nmq <= key_wdata;
        default: k_pq2 <= key_wdata;
      endcase
    end
  end

  // ---------------- lanes ----------------
  logic [N_ENG-1:0]           l_start, l_busy, l_done, l_req, l_sel, l_gnt, l_ev;
  logic [N_ENG-1:0][NWW-1:0]  l_win;
  logic [N_ENG-1:0][WIN-1:0]  l_dig;
  logic [N_ENG-1:0][L-1:0]    l_cp, l_tc;
  logic [L-1:0]               t_rdata;
  logic [L-1:0]               m_r;
  logic [EXP_BITS-1:0]        a_r;

  for (genvar g = 0; g < N_ENG; g++) begin : g_lane
    paillier_ctrl #(.L(L), .K(K), .STAGE_CYC(STAGE_CYC), .EXP_BITS(EXP_BITS), .WIN(WIN)) u_lane (
      .clk, .rst_n,
      .key_p2(k_p2), .key_q2(k_q2), .key_nmp(k_nmp), .key_nmq(k_nmq), .key_pq2(k_pq2),
      .start(l_start[g]), .msg(m_r), .rexp(a_r),
      .busy(l_busy[g]), .done(l_done[g]), .cp(l_cp[g]), .tc(l_tc[g]),
      .tbl_req(l_req[g]), .tbl_sel(l_sel[g]), .tbl_win(l_win[g]), .tbl_digit(l_dig[g]),
      .tbl_gnt(l_gnt[g]), .tbl_rdata(t_rdata), .ev_mm_issue(l_ev[g]));
  end
  assign lane_busy   = l_busy;
  assign ev_mm_issue = |l_ev;

  // ---------------- table and round-robin arbiter ----------------
  logic [LW-1:0] rr, gsel;
  logic          gany;
  always_comb begin
    gany = 1'b0; gsel = '0; l_gnt = '0;
    for (int i = 0; i < int'(N_ENG); i++) begin
      int c;
      c = (int'(rr) + i) % int'(N_ENG);
      if (!gany && l_req[c]) begin
        gany = 1'b1; gsel = LW'(c);
      end
    end
    if (gany) l_gnt[gsel] = 1'b1;
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rr <= '0;
    else if (gany) rr <= (gsel == LW'(N_ENG - 1)) ? '0 : gsel + LW'(1);
  end

  pre_table #(.L(L), .EXP_BITS(EXP_BITS), .WIN(WIN), .AW(TAW)) u_tbl (
    .clk, .we(tbl_we), .waddr(tbl_waddr), .wdata(tbl_wdata),
    .re(gany), .sel(l_sel[gsel]), .win(l_win[gsel]), .digit(l_dig[gsel]), .rdata(t_rdata));

  // ---------------- front end ----------------
  typedef enum logic [2:0] {F_IDLE, F_RD0, F_RD1, F_RD2, F_WB0, F_WB1} fe_e;
  fe_e                      fe;
  logic [N_ENG-1:0]         wb_pend;
  logic [N_ENG-1:0][SAW-1:0] ct_ptr;
  logic [SAW-1:0]           pk_r;
  logic [LW-1:0]            lane_r, free_l, wb_l;
  logic                     have_free, have_wb;

  always_comb begin
    have_free = 1'b0; free_l = '0; have_wb = 1'b0; wb_l = '0;
    for (int i = N_ENG - 1; i >= 0; i--) begin
      if (!l_busy[i] && !wb_pend[i] && !l_start[i] && !l_done[i]) begin have_free = 1'b1; free_l = LW'(i); end
      if (wb_pend[i]) begin have_wb = 1'b1; wb_l = LW'(i); end
    end
  end

  assign in_ready = (fe == F_IDLE) && !have_wb && (have_free || in_op != OP_AHE_ENC);

  always_comb begin
    spm_en = 1'b0; spm_we = 1'b0; spm_addr = '0; spm_wdata = '0;
    unique case (fe)
      F_RD0: begin spm_en = 1'b1; spm_addr = ct_ptr[lane_r]; end   // holds i_pt_ptr here
      F_RD1: begin spm_en = 1'b1; spm_addr = pk_r; end
      F_WB0: begin spm_en = 1'b1; spm_we = 1'b1; spm_addr = ct_ptr[lane_r];          spm_wdata = l_cp[lane_r]; end
      F_WB1: begin spm_en = 1'b1; spm_we = 1'b1; spm_addr = ct_ptr[lane_r] + SAW'(1); spm_wdata = l_tc[lane_r]; end
      default: ;
    endcase
  end

  logic [SAW-1:0] ct_hold;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fe      <= F_IDLE;
      wb_pend <= '0;
      l_start <= '0;
      illegal <= 1'b0;
      lane_r  <= '0;
    end else begin
      l_start <= '0;
      wb_pend <= wb_pend | l_done;
      unique case (fe)
        F_IDLE: begin
          if (have_wb) begin
            lane_r <= wb_l;
            fe     <= F_WB0;
          end else if (in_valid && in_ready) begin
            if (in_op == OP_AHE_ENC) begin
              lane_r <= free_l;
              fe     <= F_RD0;
            end else begin
              illegal <= 1'b1;
            end
          end
        end
        F_RD0: fe <= F_RD1;
        F_RD1: fe <= F_RD2;
        F_RD2: begin
          l_start[lane_r] <= 1'b1;
          fe <= F_IDLE;
        end
        F_WB0: fe <= F_WB1;
        F_WB1: begin
          wb_pend[lane_r] <= 1'b0;
          fe <= F_IDLE;
        end
        default: fe <= F_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (fe == F_IDLE && !have_wb && in_valid && in_ready && in_op == OP_AHE_ENC) begin
      ct_ptr[free_l] <= in_pt;       // pointer register first carries i_pt_ptr
      ct_hold        <= in_ct;
      pk_r           <= in_pk;
    end
    if (fe == F_RD1) m_r <= spm_rdata;
    if (fe == F_RD2) begin
      a_r            <= spm_rdata[EXP_BITS-1:0];
      ct_ptr[lane_r] <= ct_hold;
    end
  end

  assign idle = (fe == F_IDLE) && !(|l_busy) && !(|wb_pend) && !(|l_start) && !(|l_done);

  a_one_grant: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(l_gnt));
  a_gnt_req:   assert property (@(posedge clk) disable iff (!rst_n) (l_gnt & ~l_req) == '0);
endmodule

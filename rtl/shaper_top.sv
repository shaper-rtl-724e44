// shaper_top: the SHAPER accelerator, a co-processor for two-party
// privacy-preserving machine learning that mixes additive secret sharing
// (SS) with additively homomorphic Paillier encryption (AHE).
//
// The host streams VLIW bundles of instructions (bundle port) and programs
// the control/status registers (CSR port).  The parser hands each
// instruction to one of three units:
//   AHE unit   N_ENG Paillier lanes with pipelined 3072-bit MM engines,
//              key registers and the fixed-base pre-computed table
//   SS unit    CSPRNG (Keccak) + FIFO + N_INT 64-bit integer engines
//   mover      device memory <-> scratchpad, AHE.init stream, and the
//              host-side DM.ld/DM.st requests
// All units work on one multi-ported scratchpad (port 0: AHE, ports 1-2:
// SS, port 3: mover).  Device memory (on-board DRAM) and the host's PCIe
// DMA engine are outside this design; their ports are brought out.  The
// interrupt tells the host that a batch of work has finished.
//
// Instruction fields (shaper_pkg::instr_t): AHE.enc p0 = i_pt_ptr,
// p1 = i_pk_ptr (line holding the random exponent), p2 = o_ct_ptr;
// SS.gen len, p2 = o_ptr; Int.add/mul len, p0, p1, p2; SPM.ld/st len,
// p0 = spm_ptr, p1 = dm_ptr; AHE.init len, p0 = dm_ptr; DM.ld/st len,
// p0 = dm_ptr, p1 = host_ptr.  Pointers address whole L-bit lines.
// The block structure follows the design description; the bus protocols
// and the field assignment are this implementation's.
module shaper_top #(
  parameter int unsigned L         = 3072,
  parameter int unsigned K         = 72,
  parameter int unsigned STAGE_CYC = 4,
  parameter int unsigned N_ENG     = 14,
  parameter int unsigned N_INT     = 32,
  parameter int unsigned WIN       = 4,
  parameter int unsigned EXP_BITS  = L / 2,
  parameter int unsigned SPM_DEPTH = 6144,
  parameter int unsigned FIFO_D    = 512,
  parameter int unsigned NSLOT     = 3,
  parameter int unsigned DAW       = 32,
  parameter int unsigned RATE      = 1088
) (
  input  logic                           clk,
  input  logic                           rst_n,
  // CSR port and interrupt
  input  logic                           csr_we,
  input  logic                           csr_re,
  input  logic [7:0]                     csr_addr,
  input  logic [63:0]                    csr_wdata,
  output logic [63:0]                    csr_rdata,
  output logic                           irq,
  // instruction bundles
  input  logic                           b_valid,
  output logic                           b_ready,
  input  shaper_pkg::instr_t [NSLOT-1:0] b_slots,
  input  logic                           b_fence,
  // device memory
  output logic                           dm_req_valid,
  input  logic                           dm_req_ready,
  output logic                           dm_req_we,
  output logic [DAW-1:0]                 dm_req_addr,
  output logic [L-1:0]                   dm_req_wdata,
  input  logic                           dm_rsp_valid,
  input  logic [L-1:0]                   dm_rsp_rdata,
  // host-side DMA requests (DM.ld / DM.st)
  output logic                           host_valid,
  output logic                           host_to_dm,
  output logic [shaper_pkg::LEN_W-1:0]   host_len,
  output logic [DAW-1:0]                 host_dm_addr,
  output logic [DAW-1:0]                 host_addr,
  input  logic                           host_done,
  // activity signals for performance counters outside the core
  output logic [N_ENG-1:0]               ev_lane_busy,   // Paillier lanes at work
  output logic                           ev_mm_issue,    // an MM entered an engine
  output logic                           ev_rng_stall,   // SS.gen waiting for random words
  output logic                           ev_slot_wait,   // an instruction waiting for its unit
  output logic                           ev_fence_wait,  // a fenced bundle waiting for idle
  output logic [shaper_pkg::clog2i(FIFO_D+1)-1:0] rng_level // random words buffered
);
  import shaper_pkg::*;

  localparam int unsigned SAW  = clog2i(SPM_DEPTH);
  localparam int unsigned NWIN = EXP_BITS / WIN;
  localparam int unsigned TAW  = clog2i(2 * NWIN * ((1 << WIN) - 1));

  // ---------------- CSRs ----------------
  logic            seed_valid, all_idle, rng_seeded, illegal, ev_bundle;
  logic [RATE-1:0] seed_block;

  shaper_csr #(.RATE(RATE)) u_csr (
    .clk, .rst_n, .csr_we, .csr_re, .csr_addr, .csr_wdata, .csr_rdata,
    .seed_valid, .seed_block, .all_idle, .rng_seeded, .illegal, .ev_bundle, .irq);

  // ---------------- parser ----------------
  logic [2:0]   u_valid, u_ready, u_idle;
  instr_t [2:0] u_instr;
  logic         p_idle;

  vliw_parser #(.NSLOT(NSLOT)) u_parser (
    .clk, .rst_n, .b_valid, .b_ready, .b_slots, .b_fence,
    .u_valid, .u_ready, .u_idle, .u_instr,
    .idle(p_idle), .ev_bundle, .ev_slot_wait, .ev_fence_wait);

  assign all_idle = p_idle && (&u_idle);

  // ---------------- scratchpad ----------------
  logic [3:0]          sp_en, sp_we;
  logic [3:0][SAW-1:0] sp_addr;
  logic [3:0][L-1:0]   sp_wdata, sp_rdata;

  scratchpad #(.W(L), .DEPTH(SPM_DEPTH), .NPORT(4), .AW(SAW)) u_spm (
    .clk, .en(sp_en), .we(sp_we), .addr(sp_addr), .wdata(sp_wdata), .rdata(sp_rdata));

  // ---------------- AHE unit ----------------
  logic           key_we, tbl_we, ahe_illegal;
  logic [2:0]     key_idx;
  logic [L-1:0]   key_wdata, tbl_wdata;
  logic [TAW-1:0] tbl_waddr;

  ahe_unit #(.L(L), .K(K), .STAGE_CYC(STAGE_CYC), .N_ENG(N_ENG), .WIN(WIN),
             .EXP_BITS(EXP_BITS), .SAW(SAW), .TAW(TAW)) u_ahe (
    .clk, .rst_n,
    .key_we, .key_idx, .key_wdata, .tbl_we, .tbl_waddr, .tbl_wdata,
    .in_valid(u_valid[0]), .in_ready(u_ready[0]), .in_op(u_instr[0].op),
    .in_pt(SAW'(u_instr[0].p0)), .in_pk(SAW'(u_instr[0].p1)), .in_ct(SAW'(u_instr[0].p2)),
    .spm_en(sp_en[0]), .spm_we(sp_we[0]), .spm_addr(sp_addr[0]), .spm_wdata(sp_wdata[0]),
    .spm_rdata(sp_rdata[0]),
    .idle(u_idle[0]), .illegal(ahe_illegal), .lane_busy(ev_lane_busy), .ev_mm_issue);

  assign illegal = ahe_illegal;

  // ---------------- SS unit ----------------

  ss_unit #(.L(L), .N_INT(N_INT), .FIFO_D(FIFO_D), .SAW(SAW), .RATE(RATE)) u_ss (
    .clk, .rst_n, .seed_valid, .seed_block,
    .in_valid(u_valid[1]), .in_ready(u_ready[1]), .in_op(u_instr[1].op), .in_len(u_instr[1].len),
    .in_pa(SAW'(u_instr[1].p0)), .in_pb(SAW'(u_instr[1].p1)), .in_po(SAW'(u_instr[1].p2)),
    .spa_en(sp_en[1]), .spa_we(sp_we[1]), .spa_addr(sp_addr[1]), .spa_wdata(sp_wdata[1]),
    .spa_rdata(sp_rdata[1]),
    .spb_en(sp_en[2]), .spb_addr(sp_addr[2]), .spb_rdata(sp_rdata[2]),
    .idle(u_idle[1]), .rng_seeded, .rng_level, .ev_rng_stall);


  assign sp_we[2]    = 1'b0;
  assign sp_wdata[2] = '0;

  // ---------------- data mover ----------------
  logic           m_spm_op;
  assign m_spm_op = (u_instr[2].op == OP_SPM_LD) || (u_instr[2].op == OP_SPM_ST);

  spm_mover #(.L(L), .SAW(SAW), .DAW(DAW), .TAW(TAW)) u_mov (
    .clk, .rst_n,
    .in_valid(u_valid[2]), .in_ready(u_ready[2]), .in_op(u_instr[2].op), .in_len(u_instr[2].len),
    .in_dm(DAW'(m_spm_op ? u_instr[2].p1 : u_instr[2].p0)),
    .in_host(DAW'(u_instr[2].p1)), .in_spm(SAW'(u_instr[2].p0)),
    .dm_req_valid, .dm_req_ready, .dm_req_we, .dm_req_addr, .dm_req_wdata,
    .dm_rsp_valid, .dm_rsp_rdata,
    .host_valid, .host_to_dm, .host_len, .host_dm_addr, .host_addr, .host_done,
    .spm_en(sp_en[3]), .spm_we(sp_we[3]), .spm_addr(sp_addr[3]), .spm_wdata(sp_wdata[3]),
    .spm_rdata(sp_rdata[3]),
    .key_we, .key_idx, .key_wdata, .tbl_we, .tbl_waddr, .tbl_wdata,
    .idle(u_idle[2]));

  if (N_INT * 64 > L) begin : g_bad_nint
    $error("N_INT 64-bit lanes must fit in one scratchpad line");
  end
endmodule

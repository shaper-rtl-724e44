// spm_mover: data movement between device memory, scratchpad and the AHE
// unit's key registers and pre-computed table.
//
// Executes
//   SPM.ld   len, spm_ptr, dm_ptr : len lines device memory -> scratchpad
//   SPM.st   len, spm_ptr, dm_ptr : len lines scratchpad -> device memory
//   AHE.init len, dm_ptr          : len lines device memory -> the first
//                                   KEY_LINES lines to the key registers,
//                                   the rest to the table in line order
//   DM.ld/st len, dm_ptr, host_ptr: handed to the host-side DMA engine over
//                                   the host_* port; finished on host_done
// The device-memory port takes one request per cycle (dm_req_valid/ready)
// and returns read data in order (dm_rsp_valid); loads keep issuing reads
// while earlier responses are still coming back.  Stores read one
// scratchpad line (one cycle) and then write it to device memory.
// The instructions come from the design description; the port protocols
// and the ordering of the AHE.init stream are this implementation's.
// Write data is not re-registered: key, table and scratchpad write data are
// the device-memory read data, and the device-memory write data is the
// scratchpad read data, each qualified by its own enable.
module spm_mover #(
  parameter int unsigned L   = 3072,
  parameter int unsigned SAW = 13,
  parameter int unsigned DAW = 32,
  parameter int unsigned TAW = 14
) (
  input  logic                clk,
  input  logic                rst_n,
  // instructions
  input  logic                in_valid,
  output logic                in_ready,
  input  shaper_pkg::opcode_e in_op,
  input  logic [shaper_pkg::LEN_W-1:0] in_len,
  input  logic [DAW-1:0]      in_dm,
  input  logic [DAW-1:0]      in_host,
  input  logic [SAW-1:0]      in_spm,
  // device memory
  output logic                dm_req_valid,
  input  logic                dm_req_ready,
  output logic                dm_req_we,
  output logic [DAW-1:0]      dm_req_addr,
  output logic [L-1:0]        dm_req_wdata,
  input  logic                dm_rsp_valid,
  input  logic [L-1:0]        dm_rsp_rdata,
  // host DMA (DM.ld / DM.st)
  output logic                host_valid,
  output logic                host_to_dm,   // 1: DM.ld (host -> device memory)
  output logic [shaper_pkg::LEN_W-1:0] host_len,
  output logic [DAW-1:0]      host_dm_addr,
  output logic [DAW-1:0]      host_addr,
  input  logic                host_done,
  // scratchpad port
  output logic                spm_en,
  output logic                spm_we,
  output logic [SAW-1:0]      spm_addr,
  output logic [L-1:0]        spm_wdata,
  input  logic [L-1:0]        spm_rdata,
  // AHE.init targets
  output logic                key_we,
  output logic [2:0]          key_idx,
  output logic [L-1:0]        key_wdata,
  output logic                tbl_we,
  output logic [TAW-1:0]      tbl_waddr,
  output logic [L-1:0]        tbl_wdata,
  output logic                idle
);
  import shaper_pkg::*;

  typedef enum logic [2:0] {M_IDLE, M_LOAD, M_SRD, M_SWR, M_HOST} st_e;
  st_e              st;
  logic             to_ahe;            // load goes to key registers / table
  logic [LEN_W-1:0] len_r, nreq, nrsp;
  logic [DAW-1:0]   dm_r;
  logic [SAW-1:0]   spm_r;

  assign in_ready = (st == M_IDLE);
  assign idle     = (st == M_IDLE);

  // device-memory requests
  assign dm_req_valid = (st == M_LOAD && nreq != len_r) || (st == M_SWR);
  assign dm_req_we    = (st == M_SWR);
  assign dm_req_addr  = dm_r + DAW'(nreq);
  assign dm_req_wdata = spm_rdata;

  // scratchpad: write responses of SPM.ld, read lines for SPM.st
  always_comb begin
    spm_en = 1'b0; spm_we = 1'b0; spm_addr = spm_r + SAW'(nrsp); spm_wdata = dm_rsp_rdata;
    if (st == M_LOAD && !to_ahe && dm_rsp_valid) begin
      spm_en = 1'b1; spm_we = 1'b1;
    end
    if (st == M_SRD) begin
      spm_en = 1'b1; spm_addr = spm_r + SAW'(nreq);
    end
  end

  // AHE.init stream
  assign key_we    = (st == M_LOAD) && to_ahe && dm_rsp_valid && (nrsp < LEN_W'(KEY_LINES));
  assign key_idx   = 3'(nrsp);
  assign key_wdata = dm_rsp_rdata;
  assign tbl_we    = (st == M_LOAD) && to_ahe && dm_rsp_valid && (nrsp >= LEN_W'(KEY_LINES));
  assign tbl_waddr = TAW'(nrsp - LEN_W'(KEY_LINES));
  assign tbl_wdata = dm_rsp_rdata;

  assign host_valid = (st == M_HOST);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st     <= M_IDLE;
      nreq   <= '0;
      nrsp   <= '0;
      len_r  <= '0;
      to_ahe <= 1'b0;
    end else begin
      unique case (st)
        M_IDLE: if (in_valid) begin
          len_r  <= in_len;
          nreq   <= '0;
          nrsp   <= '0;
          to_ahe <= (in_op == OP_AHE_INIT);
          unique case (in_op)
            OP_SPM_LD, OP_AHE_INIT: st <= (in_len == '0) ? M_IDLE : M_LOAD;
            OP_SPM_ST:              st <= (in_len == '0) ? M_IDLE : M_SRD;
            OP_DM_LD, OP_DM_ST:     st <= M_HOST;
            default:                st <= M_IDLE;
          endcase
        end
        M_LOAD: begin
          if (dm_req_valid && dm_req_ready) nreq <= nreq + LEN_W'(1);
          if (dm_rsp_valid) begin
            nrsp <= nrsp + LEN_W'(1);
            if (nrsp == len_r - LEN_W'(1)) st <= M_IDLE;
          end
        end
        M_SRD: st <= M_SWR;
        M_SWR: if (dm_req_ready) begin
          nreq <= nreq + LEN_W'(1);
          st   <= (nreq == len_r - LEN_W'(1)) ? M_IDLE : M_SRD;
        end
        M_HOST: if (host_done) st <= M_IDLE;
        default: st <= M_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (st == M_IDLE && in_valid) begin
      dm_r         <= in_dm;
      spm_r        <= in_spm;
      host_to_dm   <= (in_op == OP_DM_LD);
      host_len     <= in_len;
      host_dm_addr <= in_dm;
      host_addr    <= in_host;
    end
  end

  // the memory may only answer requests that were made
  a_rsp_expected: assert property (@(posedge clk) disable iff (!rst_n)
    dm_rsp_valid |-> (st == M_LOAD && nrsp < nreq));
endmodule

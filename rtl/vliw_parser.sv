// vliw_parser: unpacks VLIW bundles and dispatches their instructions.
//
// A bundle holds NSLOT instructions that the host software has already
// checked to be free of dependencies, plus a fence bit.  Each instruction
// goes to the function unit its opcode belongs to (AHE unit, SS unit or the
// data mover); NOPs are dropped.  All instructions of a bundle whose units
// are ready leave in the same cycle; an instruction whose unit is busy, or
// that shares its unit with an earlier slot of the bundle, waits and leaves
// as soon as the unit takes it.  The next bundle is taken when every slot
// of the current one has left.  With fence set, an instruction of the
// bundle leaves only while all units are idle, so software can order a
// bundle after the results of earlier long-running instructions.
// Dispatch uses valid/ready per unit.  Static, in-order issue follows the
// design description; the slot count, the fence bit and the per-unit
// handshake are this implementation's choices.
module vliw_parser #(
  parameter int unsigned NSLOT = 3
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // bundle input
  input  logic                        b_valid,
  output logic                        b_ready,
  input  shaper_pkg::instr_t [NSLOT-1:0] b_slots,
  input  logic                        b_fence,
  // dispatch to the three units (index FU_AHE-1, FU_SS-1, FU_MEM-1)
  output logic [2:0]                  u_valid,
  input  logic [2:0]                  u_ready,
  input  logic [2:0]                  u_idle,
  output shaper_pkg::instr_t [2:0]    u_instr,
  // status
  output logic                        idle,
  output logic                        ev_bundle,
  output logic                        ev_slot_wait,
  output logic                        ev_fence_wait
);
  import shaper_pkg::*;

  instr_t [NSLOT-1:0] slots;
  logic   [NSLOT-1:0] pend;
  logic               fence_r, have;

  // take the earliest pending slot of each unit
  logic [2:0]                              u_has;
  logic [2:0][shaper_pkg::clog2i(NSLOT)-1:0] u_slot;
  logic                                    fence_ok;
  assign fence_ok = !fence_r || (&u_idle);

  always_comb begin
    u_has = '0; u_slot = '0; u_valid = '0; u_instr = '0;
    for (int s = NSLOT - 1; s >= 0; s--) begin
      if (pend[s] && fu_of(slots[s].op) != FU_NONE) begin
        u_has[int'(fu_of(slots[s].op)) - 1]  = 1'b1;
        u_slot[int'(fu_of(slots[s].op)) - 1] = ($bits(u_slot[0]))'(s);
      end
    end
    for (int u = 0; u < 3; u++) begin
      u_valid[u] = have && fence_ok && u_has[u];
      u_instr[u] = slots[u_slot[u]];
    end
  end

  // slots that leave this cycle
  logic [NSLOT-1:0] leave;
  always_comb begin
    leave = '0;
    for (int s = 0; s < int'(NSLOT); s++) begin
      if (pend[s] && fu_of(slots[s].op) == FU_NONE) leave[s] = 1'b1;
    end
    for (int u = 0; u < 3; u++) begin
      if (u_valid[u] && u_ready[u]) leave[u_slot[u]] = 1'b1;
    end
  end

  assign b_ready = !have || ((pend & ~leave) == '0 && fence_ok);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have    <= 1'b0;
      pend    <= '0;
      fence_r <= 1'b0;
    end else begin
      if (b_valid && b_ready) begin
        have    <= 1'b1;
        pend    <= '1;
        fence_r <= b_fence;
      end else begin
        pend <= have && fence_ok ? (pend & ~leave) : pend;
        if (have && fence_ok && (pend & ~leave) == '0) have <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (b_valid && b_ready) slots <= b_slots;
  end

  assign idle          = !have;
  assign ev_bundle     = b_valid && b_ready;
  assign ev_slot_wait  = have && fence_ok && |(u_valid & ~u_ready);
  assign ev_fence_wait = have && !fence_ok;
endmodule

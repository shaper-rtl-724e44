// tb_shaper_top: end-to-end run of the accelerator at reduced size
// (256-bit moduli, three Paillier lanes, four integer engines, 256-line
// scratchpad, 16-entry random FIFO).
//
// Behavioural models of device memory (random request backpressure, reads
// answered in order after random delays) and of the host DMA engine
// (copies between a host memory array and device memory) sit around the
// top.  The program, sent as VLIW bundles:
//   DM.ld the AHE.init stream (keys + fixed-base table) and the operands
//   AHE.init, SPM.ld                  (fenced, same unit -> slot wait)
//   SS.gen + AHE.enc                  (fenced, both units start together)
//   AHE.enc x5, Int.add, Int.mul      (more encryptions than lanes)
//   SPM.st, DM.st of all results      (fenced)
//   AHE.dec                           (not executed: sets the illegal flag)
// All results are checked in host memory against values computed here.
// Each mechanism is counted and a failure is counted for any that never
// happened: fence wait, slot wait, lane-full stall, random-FIFO stall,
// lanes in parallel, AHE and SS busy at once, device-memory backpressure,
// host DMA in both directions, the illegal flag and the done interrupt.
module tb_shaper_top;
  import shaper_pkg::*;
  localparam int L = 256, EB = 128, WIN = 4, NWIN = EB / WIN, NE = 3, NI = 4;
  localparam int DEPTH = 256, FD = 16, NSLOT = 3, DAW = 32, RATE = 1088;
  localparam int NINIT = KEY_LINES + 2 * NWIN * 15;
  localparam int NENC = 6;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic csr_we = 0, csr_re = 0;
  logic [7:0] csr_addr = '0;
  logic [63:0] csr_wdata = '0, csr_rdata;
  logic irq;
  logic b_valid = 0, b_ready, b_fence = 0;
  instr_t [NSLOT-1:0] b_slots;
  logic dm_req_valid, dm_req_ready, dm_req_we, dm_rsp_valid;
  logic [DAW-1:0] dm_req_addr, host_dm_addr, host_addr;
  logic [L-1:0] dm_req_wdata, dm_rsp_rdata;
  logic host_valid, host_to_dm, host_done;
  logic [LEN_W-1:0] host_len;
  logic [NE-1:0] ev_lane_busy;
  logic ev_mm_issue, ev_rng_stall, ev_slot_wait, ev_fence_wait;
  logic [clog2i(FD+1)-1:0] rng_level;

  shaper_top #(.L(L), .N_ENG(NE), .N_INT(NI), .SPM_DEPTH(DEPTH), .FIFO_D(FD)) dut (.*);

  int checks = 0, failures = 0;

  // ---------------- device memory model ----------------
  logic [L-1:0] dm [4096];
  logic [L-1:0] rq [$];
  int n_dm_bp = 0;
  always @(negedge clk) dm_req_ready = ($urandom % 4) != 0;
  always @(posedge clk) begin
    dm_rsp_valid <= 1'b0;
    if (dm_req_valid && !dm_req_ready) n_dm_bp++;
    if (dm_req_valid && dm_req_ready) begin
      if (dm_req_we) dm[dm_req_addr[11:0]] <= dm_req_wdata;
      else rq.push_back(dm[dm_req_addr[11:0]]);
    end
    if (rq.size() > 0 && ($urandom % 3) != 0) begin
      dm_rsp_valid <= 1'b1;
      dm_rsp_rdata <= rq.pop_front();
    end
  end

  // ---------------- host memory and DMA model ----------------
  logic [L-1:0] hmem [2048];
  int n_h2d = 0, n_d2h = 0;
  initial begin
    host_done = 0;
    forever begin
      @(posedge clk);
      if (host_valid) begin
        repeat ($urandom_range(3, 20)) @(posedge clk);
        for (int i = 0; i < int'(host_len); i++) begin
          if (host_to_dm) dm[12'(host_dm_addr + DAW'(i))] = hmem[11'(host_addr + DAW'(i))];
          else hmem[11'(host_addr + DAW'(i))] = dm[12'(host_dm_addr + DAW'(i))];
        end
        if (host_to_dm) n_h2d++; else n_d2h++;
        @(negedge clk); host_done = 1;
        @(negedge clk); host_done = 0;
      end
    end
  end

  // ---------------- mechanism counters ----------------
  int n_fence = 0, n_slot = 0, n_lane_stall = 0, n_rng = 0, max_par = 0, n_both = 0, n_mm = 0;
  always @(posedge clk) if (rst_n) begin
    if (ev_fence_wait) n_fence++;
    if (ev_slot_wait)  n_slot++;
    if (ev_rng_stall)  n_rng++;
    if (ev_mm_issue)   n_mm++;
    if (dut.u_valid[0] && !dut.u_ready[0] && $countones(ev_lane_busy) == NE) n_lane_stall++;
    if ($countones(ev_lane_busy) > max_par) max_par = $countones(ev_lane_busy);
    if (!dut.u_idle[0] && !dut.u_idle[1]) n_both++;
  end

  // ---------------- reference arithmetic ----------------
  function automatic logic [L-1:0] mulmod(logic [L-1:0] a, logic [L-1:0] b, logic [L-1:0] m);
    logic [L+1:0] r;
    r = '0;
    for (int i = L - 1; i >= 0; i--) begin
      r = r << 1;
      if (r >= (L+2)'(m)) r = r - (L+2)'(m);
      if (b[i]) begin
        r = r + (L+2)'(a);
        if (r >= (L+2)'(m)) r = r - (L+2)'(m);
      end
    end
    return L'(r);
  endfunction
  function automatic logic [L-1:0] powmod(logic [L-1:0] b, logic [EB-1:0] e, logic [L-1:0] m);
    logic [L-1:0] r;
    r = L'(1);
    for (int i = EB - 1; i >= 0; i--) begin
      r = mulmod(r, r, m);
      if (e[i]) r = mulmod(r, b, m);
    end
    return r;
  endfunction
  function automatic logic [L-1:0] rnd(int nb);
    logic [L-1:0] r;
    for (int i = 0; i < L / 32; i++) r[i*32 +: 32] = $urandom;
    return r & ((L'(1) << nb) - 1);
  endfunction

  // ---------------- host program helpers ----------------
  task automatic csr_write(int a, logic [63:0] d);
    @(negedge clk); csr_we = 1; csr_addr = 8'(a); csr_wdata = d;
    @(negedge clk); csr_we = 0;
  endtask
  task automatic csr_read(int a, output logic [63:0] d);
    @(negedge clk); csr_re = 1; csr_addr = 8'(a);
    @(negedge clk); csr_re = 0; d = csr_rdata;
  endtask
  function automatic instr_t ins(opcode_e op, int len, int p0, int p1, int p2);
    instr_t r;
    r.op = op; r.len = LEN_W'(len); r.p0 = ADDR_W'(p0); r.p1 = ADDR_W'(p1); r.p2 = ADDR_W'(p2);
    return r;
  endfunction
  function automatic instr_t nop();
    return ins(OP_NOP, 0, 0, 0, 0);
  endfunction
  task automatic bundle(bit fence, instr_t s0, instr_t s1, instr_t s2);
    @(negedge clk);
    b_valid = 1; b_fence = fence; b_slots[0] = s0; b_slots[1] = s1; b_slots[2] = s2;
    @(posedge clk);
    while (!b_ready) @(posedge clk);
    @(negedge clk); b_valid = 0;
  endtask

  // host memory layout
  localparam int H_PT = 0, H_EXP = 6, H_IA = 12, H_IB = 16, H_INIT = 100, H_OUT = 1200;
  // scratchpad layout
  localparam int S_CT = 40, S_GEN = 60, N_GEN = 100, S_ADD = 160, S_MUL = 164, N_OUT = 128;

  logic [L-1:0] kp2, kq2, knmp, knmq, kpq2;
  logic [L-1:0] hb [2];

  task automatic build_init();
    logic [L-1:0] b, v, m;
    hmem[H_INIT + 0] = kp2; hmem[H_INIT + 1] = kq2; hmem[H_INIT + 2] = knmp;
    hmem[H_INIT + 3] = knmq; hmem[H_INIT + 4] = kpq2;
    for (int s = 0; s < 2; s++) begin
      b = hb[s]; m = (s == 0) ? kp2 : kq2;
      for (int j = 0; j < NWIN; j++) begin
        v = b;
        for (int d = 1; d < 16; d++) begin
          hmem[H_INIT + KEY_LINES + (s * NWIN + j) * 15 + d - 1] = v;
          v = mulmod(v, b, m);
        end
        for (int t = 0; t < WIN; t++) b = mulmod(b, b, m);
      end
    end
  endtask

  function automatic void check_ct(int i);
    logic [L-1:0] m, ecp, ecq, d;
    logic [EB-1:0] a;
    logic [L+1:0] x, y;
    m = hmem[H_PT + i]; a = hmem[H_EXP + i][EB-1:0];
    ecp = mulmod(mulmod(m, knmp, kp2) + 1, powmod(hb[0], a, kp2), kp2);
    ecq = mulmod(mulmod(m, knmq, kq2) + 1, powmod(hb[1], a, kq2), kq2);
    y = (L+2)'(ecp);
    while (y >= (L+2)'(kq2)) y = y - (L+2)'(kq2);
    x = (L+2)'(ecq) + (L+2)'(kq2) - y;
    if (x >= (L+2)'(kq2)) x = x - (L+2)'(kq2);
    d = L'(x);
    checks += 2;
    if (hmem[H_OUT + 2*i] !== ecp) begin failures++; $display("FAIL enc %0d cp", i); end
    if (hmem[H_OUT + 2*i + 1] !== mulmod(d, kpq2, kq2)) begin failures++; $display("FAIL enc %0d tc", i); end
  endfunction

  task automatic mech(string name, int n);
    checks++;
    $display("mechanism %-22s %0d", name, n);
    if (n == 0) begin failures++; $display("FAIL: mechanism %s never happened", name); end
  endtask

  initial begin
    logic [63:0] st, nb;
    logic [63:0] w [$];
    b_slots = '0;
    kp2 = rnd(L); kp2[L-1] = 1; kp2[0] = 1;
    kq2 = rnd(L); kq2[L-1] = 1; kq2[0] = 1;
    knmp = rnd(L - 1); knmq = rnd(L - 1); kpq2 = rnd(L - 1);
    hb[0] = rnd(L - 1); hb[1] = rnd(L - 1);
    for (int i = 0; i < NENC; i++) begin
      hmem[H_PT + i] = rnd(64);
      hmem[H_EXP + i] = rnd(EB);
    end
    for (int i = 0; i < 4; i++) begin
      hmem[H_IA + i] = rnd(L); hmem[H_IB + i] = rnd(L);
    end
    build_init();
    repeat (3) @(negedge clk);
    rst_n = 1;

    // seed the CSPRNG
    for (int i = 0; i < RATE / 64; i++) csr_write(i, {$urandom, $urandom});
    csr_write(RATE / 64, 64'h1);

    bundle(0, ins(OP_DM_LD, NINIT, 0, H_INIT, 0), nop(), nop());
    bundle(0, ins(OP_DM_LD, 20, 2000, H_PT, 0), nop(), nop());
    bundle(1, ins(OP_AHE_INIT, NINIT, 0, 0, 0), ins(OP_SPM_LD, 20, 0, 2000, 0), nop());
    bundle(1, ins(OP_SS_GEN, N_GEN, 0, 0, S_GEN), ins(OP_AHE_ENC, 0, 0, H_EXP, S_CT), nop());
    bundle(0, ins(OP_AHE_ENC, 0, 1, H_EXP + 1, S_CT + 2), ins(OP_AHE_ENC, 0, 2, H_EXP + 2, S_CT + 4),
              ins(OP_INT_ADD, 4, H_IA, H_IB, S_ADD));
    bundle(0, ins(OP_AHE_ENC, 0, 3, H_EXP + 3, S_CT + 6), ins(OP_INT_MUL, 4, H_IA, H_IB, S_MUL),
              ins(OP_AHE_ENC, 0, 4, H_EXP + 4, S_CT + 8));
    bundle(0, ins(OP_AHE_ENC, 0, 5, H_EXP + 5, S_CT + 10), nop(), nop());
    bundle(1, ins(OP_SPM_ST, N_OUT, S_CT, 3000, 0), nop(), nop());
    bundle(1, ins(OP_DM_ST, N_OUT, 3000, H_OUT, 0), nop(), nop());
    bundle(1, ins(OP_AHE_DEC, 0, 0, 0, 0), nop(), nop());

    // wait for the done interrupt with everything idle
    @(negedge clk);
    while (!(irq && dut.all_idle)) @(negedge clk);
    csr_read(RATE / 64 + 1, st);
    csr_read(RATE / 64 + 2, nb);
    checks += 4;
    if (!st[0]) begin failures++; $display("FAIL status irq"); end
    if (!st[1]) begin failures++; $display("FAIL status idle"); end
    if (!st[2]) begin failures++; $display("FAIL status rng seeded"); end
    if (nb != 10) begin failures++; $display("FAIL bundle count %0d", nb); end

    // encryptions
    for (int i = 0; i < NENC; i++) check_ct(i);
    // integer results
    for (int i = 0; i < 4; i++)
      for (int k = 0; k < NI; k++) begin
        logic [63:0] a, b;
        a = hmem[H_IA + i][64*k +: 64]; b = hmem[H_IB + i][64*k +: 64];
        checks += 2;
        if (hmem[H_OUT + S_ADD - S_CT + i][64*k +: 64] !== a + b) begin failures++; $display("FAIL add %0d.%0d", i, k); end
        if (hmem[H_OUT + S_MUL - S_CT + i][64*k +: 64] !== a * b) begin failures++; $display("FAIL mul %0d.%0d", i, k); end
      end
    // random shares: non-zero and pairwise distinct
    for (int i = 0; i < N_GEN; i++)
      for (int k = 0; k < NI; k++) w.push_back(hmem[H_OUT + S_GEN - S_CT + i][64*k +: 64]);
    foreach (w[i]) begin
      checks++;
      if (w[i] == 0) begin failures++; $display("FAIL zero random word"); end
      for (int j = 0; j < i; j++) if (w[j] == w[i]) begin failures++; $display("FAIL repeated random word"); end
    end
    // the illegal instruction
    checks++;
    if (!st[3]) begin failures++; $display("FAIL illegal flag"); end

    mech("fence wait", n_fence);
    mech("slot wait", n_slot);
    mech("lane-full stall", n_lane_stall);
    mech("random FIFO stall", n_rng);
    mech("lanes in parallel>1", max_par > 1 ? max_par : 0);
    mech("AHE+SS concurrent", n_both);
    mech("MM issues", n_mm);
    mech("DM backpressure", n_dm_bp);
    mech("host DMA to DM", n_h2d);
    mech("host DMA from DM", n_d2h);
    checks++;
    if (max_par != NE) begin failures++; $display("FAIL max lanes %0d", max_par); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

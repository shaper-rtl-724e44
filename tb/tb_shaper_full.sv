// tb_shaper_full: one Paillier encryption through the whole accelerator
// with every parameter at its default: 3072-bit moduli p^2 and q^2,
// 1536-bit random exponent, 14 lanes, the full 11,525-line AHE.init stream
// (five key lines and the 2 x 384 x 15-entry fixed-base table, computed
// here), a 6144-line scratchpad and 32 integer engines.
// Program: DM.ld (init stream and operands), AHE.init, SPM.ld, AHE.enc
// together with SS.gen and Int.add, SPM.st, DM.st.  The ciphertext halves
// cp and tc, the integer sums and the random shares are checked in host
// memory; the encryption latency is printed.  Device memory and the host
// DMA engine are the same behavioural models as in the reduced test.
module tb_shaper_full;
  import shaper_pkg::*;
  localparam int L = 3072, EB = 1536, WIN = 4, NWIN = EB / WIN, NE = 14, NI = 32;
  localparam int DEPTH = 6144, FD = 512, NSLOT = 3, DAW = 32, RATE = 1088;
  localparam int NINIT = KEY_LINES + 2 * NWIN * 15;
  localparam int NENC = 1;

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

  shaper_top dut (.*);

  int checks = 0, failures = 0;

  // ---------------- device memory model ----------------
  logic [L-1:0] dm [16384];
  logic [L-1:0] rq [$];
  always @(negedge clk) dm_req_ready = ($urandom % 4) != 0;
  always @(posedge clk) begin
    dm_rsp_valid <= 1'b0;
    if (dm_req_valid && dm_req_ready) begin
      if (dm_req_we) dm[dm_req_addr[13:0]] <= dm_req_wdata;
      else rq.push_back(dm[dm_req_addr[13:0]]);
    end
    if (rq.size() > 0 && ($urandom % 3) != 0) begin
      dm_rsp_valid <= 1'b1;
      dm_rsp_rdata <= rq.pop_front();
    end
  end

  // ---------------- host memory and DMA model ----------------
  logic [L-1:0] hmem [16384];
  initial begin
    host_done = 0;
    forever begin
      @(posedge clk);
      if (host_valid) begin
        repeat ($urandom_range(3, 20)) @(posedge clk);
        for (int i = 0; i < int'(host_len); i++) begin
          if (host_to_dm) dm[14'(host_dm_addr + DAW'(i))] = hmem[14'(host_addr + DAW'(i))];
          else hmem[14'(host_addr + DAW'(i))] = dm[14'(host_dm_addr + DAW'(i))];
        end
        @(negedge clk); host_done = 1;
        @(negedge clk); host_done = 0;
      end
    end
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
  localparam int H_PT = 0, H_EXP = 6, H_IA = 12, H_IB = 16, H_INIT = 100, H_OUT = 12000;
  // scratchpad layout
  localparam int S_CT = 40, S_GEN = 60, N_GEN = 2, S_ADD = 62, S_MUL = 66, N_OUT = 30;

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

  initial begin
    logic [63:0] st, nb;
    time t_enc;
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
    t_enc = $time;
    bundle(1, ins(OP_SS_GEN, N_GEN, 0, 0, S_GEN), ins(OP_AHE_ENC, 0, 0, H_EXP, S_CT),
              ins(OP_INT_ADD, 4, H_IA, H_IB, S_ADD));
    bundle(0, ins(OP_INT_MUL, 4, H_IA, H_IB, S_MUL), nop(), nop());
    bundle(1, ins(OP_SPM_ST, N_OUT, S_CT, 3000, 0), nop(), nop());
    bundle(1, ins(OP_DM_ST, N_OUT, 3000, H_OUT, 0), nop(), nop());

    // wait for the done interrupt with everything idle
    @(negedge clk);
    while (!(irq && dut.all_idle)) @(negedge clk);
    $display("program done after %0d cycles from the encryption bundle", ($time - t_enc) / 10);
    csr_read(RATE / 64 + 1, st);
    csr_read(RATE / 64 + 2, nb);
    checks += 4;
    if (!st[0]) begin failures++; $display("FAIL status irq"); end
    if (!st[1]) begin failures++; $display("FAIL status idle"); end
    if (!st[2]) begin failures++; $display("FAIL status rng seeded"); end
    if (nb != 7) begin failures++; $display("FAIL bundle count %0d", nb); end

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
    checks++;
    if (st[3]) begin failures++; $display("FAIL illegal flag set"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

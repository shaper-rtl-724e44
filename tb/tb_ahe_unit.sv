// tb_ahe_unit: the AHE unit with three lanes and 256-bit moduli.  Keys and
// the fixed-base table are written through the AHE.init ports, plaintexts
// and random exponents are placed in a scratchpad model, and six
// encryptions are issued back to back (more than there are lanes, so one
// waits for a free lane).  Every cp/tc pair written back is compared with
// values computed here; lanes running at the same time, the busy stall and
// the illegal-instruction flag are checked too.
module tb_ahe_unit;
  import shaper_pkg::*;
  localparam int L = 256, EB = 128, WIN = 4, NWIN = EB / WIN, NE = 3, SAW = 8;
  localparam int TAW = clog2i(2 * NWIN * 15);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic key_we, tbl_we, in_valid, in_ready, spm_en, spm_we, idle, illegal, ev_mm_issue;
  logic [2:0] key_idx;
  logic [L-1:0] key_wdata, tbl_wdata, spm_wdata, spm_rdata;
  logic [TAW-1:0] tbl_waddr;
  opcode_e in_op;
  logic [SAW-1:0] in_pt, in_pk, in_ct, spm_addr;
  logic [NE-1:0] lane_busy;

  ahe_unit #(.L(L), .N_ENG(NE), .EXP_BITS(EB), .SAW(SAW)) dut (.*);

  int checks = 0, failures = 0, maxpar = 0, nstall = 0;
  logic [L-1:0] spm [256];
  logic [L-1:0] kp2, kq2, knmp, knmq, kpq2;
  logic [L-1:0] hb [2];

  always @(posedge clk) begin
    if (spm_en && spm_we) spm[spm_addr] <= spm_wdata;
    if (spm_en && !spm_we) spm_rdata <= spm[spm_addr];
    if ($countones(lane_busy) > maxpar) maxpar = $countones(lane_busy);
    if (in_valid && !in_ready) nstall++;
  end

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

  task automatic wr_key(int idx, logic [L-1:0] v);
    @(negedge clk); key_we = 1; key_idx = 3'(idx); key_wdata = v;
    @(negedge clk); key_we = 0;
  endtask

  task automatic load_table(int s, logic [L-1:0] m);
    logic [L-1:0] b, v;
    b = hb[s];
    for (int j = 0; j < NWIN; j++) begin
      v = b;
      for (int d = 1; d < 16; d++) begin
        @(negedge clk);
        tbl_we = 1; tbl_waddr = TAW'((s * NWIN + j) * 15 + d - 1); tbl_wdata = v;
        v = mulmod(v, b, m);
      end
      for (int t = 0; t < 4; t++) b = mulmod(b, b, m);
    end
    @(negedge clk); tbl_we = 0;
  endtask

  task automatic issue(opcode_e op, int pt, int pk, int ct);
    @(negedge clk);
    in_valid = 1; in_op = op; in_pt = SAW'(pt); in_pk = SAW'(pk); in_ct = SAW'(ct);
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    @(negedge clk); in_valid = 0;
  endtask

  function automatic void check_ct(int i);
    logic [L-1:0] m, ecp, ecq, d;
    logic [EB-1:0] a;
    logic [L+1:0] x, y;
    m = spm[i]; a = spm[16 + i][EB-1:0];
    ecp = mulmod(mulmod(m, knmp, kp2) + 1, powmod(hb[0], a, kp2), kp2);
    ecq = mulmod(mulmod(m, knmq, kq2) + 1, powmod(hb[1], a, kq2), kq2);
    y = (L+2)'(ecp);
    while (y >= (L+2)'(kq2)) y = y - (L+2)'(kq2);
    x = (L+2)'(ecq) + (L+2)'(kq2) - y;
    if (x >= (L+2)'(kq2)) x = x - (L+2)'(kq2);
    d = L'(x);
    checks += 2;
    if (spm[32 + 2*i] !== ecp) begin failures++; $display("FAIL cp %0d: %h vs %h", i, spm[32+2*i][31:0], ecp[31:0]); end
    if (spm[33 + 2*i] !== mulmod(d, kpq2, kq2)) begin failures++; $display("FAIL tc %0d", i); end
  endfunction

  initial begin
    key_we = 0; tbl_we = 0; in_valid = 0; key_idx = '0; key_wdata = '0; tbl_waddr = '0;
    tbl_wdata = '0; in_op = OP_NOP; in_pt = '0; in_pk = '0; in_ct = '0;
    kp2 = rnd(L); kp2[L-1] = 1; kp2[0] = 1;
    kq2 = rnd(L); kq2[L-1] = 1; kq2[0] = 1;
    knmp = rnd(L - 1); knmq = rnd(L - 1); kpq2 = rnd(L - 1);
    hb[0] = rnd(L - 1); hb[1] = rnd(L - 1);
    for (int i = 0; i < 6; i++) begin
      spm[i] = rnd(64);            // plaintexts
      spm[16 + i] = rnd(EB);       // random exponents
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    wr_key(0, kp2); wr_key(1, kq2); wr_key(2, knmp); wr_key(3, knmq); wr_key(4, kpq2);
    load_table(0, kp2); load_table(1, kq2);
    for (int i = 0; i < 6; i++) issue(OP_AHE_ENC, i, 16 + i, 32 + 2*i);
    issue(OP_AHE_DEC, 0, 0, 0);
    @(negedge clk);
    while (!idle) @(negedge clk);
    for (int i = 0; i < 6; i++) check_ct(i);
    checks += 3;
    if (maxpar < NE) begin failures++; $display("FAIL only %0d lanes ran together", maxpar); end
    if (nstall == 0) begin failures++; $display("FAIL no stall on busy lanes"); end
    if (!illegal)    begin failures++; $display("FAIL illegal flag not set"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

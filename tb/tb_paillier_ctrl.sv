// tb_paillier_ctrl: one controller lane encrypting with 256-bit moduli
// (128-bit exponents, 32 windows of 4 bits).  The table is modelled here
// from two random bases; grants come after random delays.  cp and tc are
// compared with (m*n+1)*h^a computed independently with modular
// double-and-add and square-and-multiply, including an all-zero exponent,
// an exponent with a single non-zero window and all-ones.
module tb_paillier_ctrl;
  localparam int L = 256, EB = 128, WIN = 4, NWIN = EB / WIN;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [L-1:0] key_p2, key_q2, key_nmp, key_nmq, key_pq2, msg, cp, tc, tbl_rdata;
  logic [EB-1:0] rexp;
  logic start, busy, done, tbl_req, tbl_sel, tbl_gnt, ev_mm_issue;
  logic [4:0] tbl_win;
  logic [3:0] tbl_digit;

  paillier_ctrl #(.L(L), .EXP_BITS(EB)) dut (.*);

  int checks = 0, failures = 0, nissue = 0;
  logic [L-1:0] hb [2];
  logic [L-1:0] tbl [2][NWIN][16];

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

  // table port model: random grant, data one cycle later
  always @(posedge clk) begin
    if (tbl_req && tbl_gnt) tbl_rdata <= tbl[tbl_sel][tbl_win][tbl_digit];
    if (ev_mm_issue) nissue++;
  end
  always @(negedge clk) tbl_gnt = ($urandom % 3) == 0;

  task automatic build_table(int s, logic [L-1:0] m);
    logic [L-1:0] b;
    b = hb[s];                               // b = h^(2^(4j))
    for (int jj = 0; jj < NWIN; jj++) begin
      tbl[s][jj][0] = L'(1);
      for (int d = 1; d < 16; d++) tbl[s][jj][d] = mulmod(tbl[s][jj][d-1], b, m);
      for (int t = 0; t < 4; t++) b = mulmod(b, b, m);
    end
  endtask

  task automatic one_enc(logic [EB-1:0] a, logic [L-1:0] m);
    logic [L-1:0] ecp, ecq, et, d;
    int t0;
    ecp = mulmod(mulmod(m, key_nmp, key_p2) + 1, powmod(hb[0], a, key_p2), key_p2);
    ecq = mulmod(mulmod(m, key_nmq, key_q2) + 1, powmod(hb[1], a, key_q2), key_q2);
    begin
      logic [L+1:0] x, y;
      y = (L+2)'(ecp);
      while (y >= (L+2)'(key_q2)) y = y - (L+2)'(key_q2);     // cp mod q^2
      x = (L+2)'(ecq) + (L+2)'(key_q2) - y;
      if (x >= (L+2)'(key_q2)) x = x - (L+2)'(key_q2);
      d = L'(x);
    end
    et = mulmod(d, key_pq2, key_q2);
    @(negedge clk);
    msg = m; rexp = a; start = 1;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    checks += 2;
    if (cp !== ecp) begin failures++; $display("FAIL cp"); end
    if (tc !== et)  begin failures++; $display("FAIL tc"); end
  endtask

  initial begin
    start = 0; msg = '0; rexp = '0; tbl_rdata = '0;
    key_p2 = rnd(L);       key_p2[L-1] = 1; key_p2[0] = 1;
    key_q2 = rnd(L - 3);   key_q2[L-4] = 1; key_q2[0] = 1;   // q^2 < p^2: SUB needs two corrections
    key_nmp = rnd(L - 1);
    key_nmq = rnd(L - 5);
    key_pq2 = rnd(L - 5);
    hb[0] = rnd(L - 1);
    hb[1] = rnd(L - 5);
    build_table(0, key_p2);
    build_table(1, key_q2);
    repeat (3) @(posedge clk);
    rst_n = 1;
    one_enc(rnd(EB), rnd(64));
    one_enc('0, rnd(64));
    one_enc(EB'(4'h9) << 40, rnd(64));
    one_enc('1, rnd(64));
    one_enc(rnd(EB), rnd(L - 6));
    checks++;
    if (nissue == 0) begin failures++; $display("FAIL no MM issued"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

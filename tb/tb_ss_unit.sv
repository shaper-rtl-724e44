// tb_ss_unit: the secret-sharing unit with four 64-bit engines on 256-bit
// lines.  SS.gen output is compared word by word with a reference Keccak
// squeeze of the same seed (the generator starts with the SHA3-256 test
// vector of the empty message); Int.add and Int.mul results are compared
// with 64-bit wrap-around arithmetic done here.  Also checks that SS.gen
// waited on an empty FIFO at least once and the three-cycle line rate of
// the integer instructions.
module tb_ss_unit;
  import shaper_pkg::*;
  localparam int L = 256, NI = 4, SAW = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic seed_valid, in_valid, in_ready, spa_en, spa_we, spb_en, idle, rng_seeded, ev_rng_stall;
  logic [1087:0] seed_block;
  opcode_e in_op;
  logic [LEN_W-1:0] in_len;
  logic [SAW-1:0] in_pa, in_pb, in_po, spa_addr, spb_addr;
  logic [L-1:0] spa_wdata, spa_rdata, spb_rdata;
  logic [4:0] rng_level;

  ss_unit #(.L(L), .N_INT(NI), .FIFO_D(16), .SAW(SAW)) dut (.*);

  int checks = 0, failures = 0, nstall = 0;
  logic [L-1:0] spm [256];
  logic [63:0] ref_st [5][5];
  logic [63:0] exp_w [$];

  always @(posedge clk) begin
    if (spa_en && spa_we) spm[spa_addr] <= spa_wdata;
    if (spa_en && !spa_we) spa_rdata <= spm[spa_addr];
    if (spb_en) spb_rdata <= spm[spb_addr];
    if (ev_rng_stall) nstall++;
  end

  function automatic bit rc_bit(int t);
    logic [8:0] r;
    r = 9'h1;
    if (t % 255 == 0) return 1'b1;
    for (int i = 1; i <= t % 255; i++) begin
      r = r << 1;
      r[0] ^= r[8]; r[4] ^= r[8]; r[5] ^= r[8]; r[6] ^= r[8];
      r[8] = 1'b0;
    end
    return r[0];
  endfunction

  task automatic ref_block();
    logic [63:0] c [5], d [5], b [5][5], v, rc;
    int rot [5][5];
    int x, y, tx;
    rot[0][0] = 0; x = 1; y = 0;
    for (int t = 0; t < 24; t++) begin
      rot[x][y] = ((t + 1) * (t + 2) / 2) % 64;
      tx = x; x = y; y = (2 * tx + 3 * y) % 5;
    end
    for (int ir = 0; ir < 24; ir++) begin
      for (int i = 0; i < 5; i++) c[i] = ref_st[i][0] ^ ref_st[i][1] ^ ref_st[i][2] ^ ref_st[i][3] ^ ref_st[i][4];
      for (int i = 0; i < 5; i++) d[i] = c[(i + 4) % 5] ^ {c[(i + 1) % 5][62:0], c[(i + 1) % 5][63]};
      for (int i = 0; i < 5; i++)
        for (int j = 0; j < 5; j++) begin
          v = ref_st[i][j] ^ d[i];
          b[j][(2 * i + 3 * j) % 5] = (v << rot[i][j]) | (rot[i][j] == 0 ? 64'h0 : v >> (64 - rot[i][j]));
        end
      for (int i = 0; i < 5; i++)
        for (int j = 0; j < 5; j++)
          ref_st[i][j] = b[i][j] ^ (~b[(i + 1) % 5][j] & b[(i + 2) % 5][j]);
      rc = '0;
      for (int j = 0; j < 7; j++) rc[(1 << j) - 1] = rc_bit(j + 7 * ir);
      ref_st[0][0] ^= rc;
    end
    for (int i = 0; i < 17; i++) exp_w.push_back(ref_st[i % 5][i / 5]);
  endtask

  task automatic run(opcode_e op, int len, int pa, int pb, int po, output int cyc);
    int t0;
    @(negedge clk);
    in_valid = 1; in_op = op; in_len = LEN_W'(len);
    in_pa = SAW'(pa); in_pb = SAW'(pb); in_po = SAW'(po);
    t0 = $time / 10;
    @(negedge clk); in_valid = 0;
    while (!idle) @(negedge clk);
    cyc = $time / 10 - t0;
  endtask

  initial begin
    int cyc;
    logic [63:0] x, y;
    seed_valid = 0; in_valid = 0; in_op = OP_NOP; in_len = '0;
    in_pa = '0; in_pb = '0; in_po = '0;
    seed_block = '0; seed_block[7:0] = 8'h06; seed_block[1087] = 1'b1;
    for (int i = 0; i < 5; i++) for (int j = 0; j < 5; j++) ref_st[i][j] = '0;
    ref_st[0][0] = 64'h06; ref_st[1][3] = 64'h8000000000000000;
    for (int i = 0; i < 6; i++) ref_block();
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); seed_valid = 1;
    @(negedge clk); seed_valid = 0;
    // SS.gen: 20 lines = 80 random words
    run(OP_SS_GEN, 20, 0, 0, 100, cyc);
    for (int i = 0; i < 20; i++)
      for (int k = 0; k < NI; k++) begin
        checks++;
        if (spm[100 + i][k*64 +: 64] !== exp_w[i*NI + k]) begin
          failures++; $display("FAIL gen line %0d lane %0d", i, k);
        end
      end
    checks++;
    if (exp_w[0] != 64'h66d71ebff8c6ffa7) begin failures++; $display("FAIL reference"); end
    // Int.add / Int.mul on the generated shares and on corner values
    for (int i = 0; i < 8; i++) spm[i] = {{$urandom, $urandom}, {$urandom, $urandom}, {64{1'b1}}, {$urandom, $urandom}};
    run(OP_INT_ADD, 8, 0, 100, 150, cyc);
    checks++;
    if (cyc > 8 * 3 + 3) begin failures++; $display("FAIL add took %0d cycles", cyc); end
    run(OP_INT_MUL, 8, 0, 100, 160, cyc);
    for (int i = 0; i < 8; i++)
      for (int k = 0; k < NI; k++) begin
        x = spm[i][k*64 +: 64]; y = spm[100 + i][k*64 +: 64];
        checks += 2;
        if (spm[150 + i][k*64 +: 64] !== x + y) begin failures++; $display("FAIL add %0d/%0d", i, k); end
        if (spm[160 + i][k*64 +: 64] !== x * y) begin failures++; $display("FAIL mul %0d/%0d", i, k); end
      end
    checks++;
    if (nstall == 0) begin failures++; $display("FAIL SS.gen never waited for the FIFO"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

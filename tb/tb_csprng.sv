// tb_csprng: checks the Keccak random generator against the SHA3-256 test
// vector of the empty message (the first output block of a seed that is
// the padded empty message) and the following squeeze blocks against a
// reference Keccak-f[1600] written here with its round constants and
// rotation offsets derived from their defining LFSR and recurrence.  The
// consumer stalls at random to exercise back-pressure; the word rate with a
// ready consumer is also checked (17 words per 24-cycle permutation).
module tb_csprng;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic seed_valid, out_valid, out_ready, seeded;
  logic [1087:0] seed_block;
  logic [63:0] out_word;
  csprng dut (.*);

  int checks = 0, failures = 0;
  logic [63:0] ref_st [5][5];
  logic [63:0] exp_w [$];
  int nrecv = 0;

  function automatic bit rc_bit(int t);
    logic [8:0] r = 9'h1;
    if (t % 255 == 0) return 1'b1;
    for (int i = 1; i <= t % 255; i++) begin
      r = r << 1;
      r[0] ^= r[8]; r[4] ^= r[8]; r[5] ^= r[8]; r[6] ^= r[8];
      r[8] = 1'b0;
    end
    return r[0];
  endfunction

  task automatic ref_perm();
    logic [63:0] c [5], d [5], b [5][5];
    int rot [5][5];
    int x, y, tx;
    rot[0][0] = 0; x = 1; y = 0;
    for (int t = 0; t < 24; t++) begin
      rot[x][y] = ((t + 1) * (t + 2) / 2) % 64;
      tx = x; x = y; y = (2 * tx + 3 * y) % 5;
    end
    for (int ir = 0; ir < 24; ir++) begin
      logic [63:0] rc;
      rc = '0;
      for (int i = 0; i < 5; i++) c[i] = ref_st[i][0] ^ ref_st[i][1] ^ ref_st[i][2] ^ ref_st[i][3] ^ ref_st[i][4];
      for (int i = 0; i < 5; i++) d[i] = c[(i + 4) % 5] ^ {c[(i + 1) % 5][62:0], c[(i + 1) % 5][63]};
      for (int i = 0; i < 5; i++)
        for (int j = 0; j < 5; j++) begin
          logic [63:0] v;
          v = ref_st[i][j] ^ d[i];
          b[j][(2 * i + 3 * j) % 5] = (v << rot[i][j]) | (rot[i][j] == 0 ? 64'h0 : v >> (64 - rot[i][j]));
        end
      for (int i = 0; i < 5; i++)
        for (int j = 0; j < 5; j++)
          ref_st[i][j] = b[i][j] ^ (~b[(i + 1) % 5][j] & b[(i + 2) % 5][j]);
      for (int j = 0; j < 7; j++) rc[(1 << j) - 1] = rc_bit(j + 7 * ir);
      ref_st[0][0] ^= rc;
    end
  endtask

  task automatic ref_block();
    ref_perm();
    for (int i = 0; i < 17; i++) exp_w.push_back(ref_st[i % 5][i / 5]);
  endtask

  always @(posedge clk) begin
    if (out_valid && out_ready) begin
      logic [63:0] e;
      e = exp_w.pop_front();
      checks++;
      if (out_word !== e) begin
        failures++;
        $display("FAIL word %0d: got %h expected %h", nrecv, out_word, e);
      end
      nrecv++;
    end
  end

  initial begin
    int t0;
    seed_valid = 0; out_ready = 0;
    seed_block = '0;
    seed_block[7:0] = 8'h06;
    seed_block[1087] = 1'b1;
    for (int i = 0; i < 5; i++) for (int j = 0; j < 5; j++) ref_st[i][j] = '0;
    ref_st[0][0] = 64'h06;
    ref_st[16 % 5][16 / 5] = 64'h8000000000000000;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); seed_valid = 1;
    @(negedge clk); seed_valid = 0;
    ref_block(); ref_block(); ref_block(); ref_block();
    // known answer: SHA3-256("") = a7ffc6f8bf1ed766 51c14756a061d662 f580ff4de43b49fa 82d80a4b80f8434a
    checks += 4;
    if (exp_w[0] != 64'h66d71ebff8c6ffa7 || exp_w[1] != 64'h62d661a05647c151 ||
        exp_w[2] != 64'hfa493be44dff80f5 || exp_w[3] != 64'h4a43f8804b0ad882) begin
      failures += 4;
      $display("FAIL reference model does not give the SHA3-256 test vector");
    end
    // back-pressure: hold ready low for a while, nothing may be lost
    repeat (100) @(negedge clk);
    while (nrecv < 34) begin
      @(negedge clk); out_ready = ($urandom % 3) != 0;
    end
    // full rate: 17 more words should take at most one permutation time
    @(negedge clk); out_ready = 1;
    while (!out_valid) @(negedge clk);
    t0 = $time / 10;
    while (nrecv < 68) @(negedge clk);
    checks++;
    if ($time / 10 - t0 > 2 * 26 + 34) begin
      failures++;
      $display("FAIL rate: 34 words took %0d cycles", $time / 10 - t0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

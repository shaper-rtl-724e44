// tb_mm_engine: self-checking test of the pipelined modular multiplier.
// Loads a full-length 3072-bit modulus and a shorter 2000-bit one, issues
// five independent multiplications back to back (filling all five stages),
// plus edge operands (0, 1, m-1), and compares every product with a*b mod m
// computed here with wide-integer arithmetic.  Also checks the latency of a
// single product, (TAU+1)*5*STAGE_CYC cycles, and that five products in
// flight complete within one latency plus five ticks.
module tb_mm_engine;
  localparam int unsigned L = 3072, K = 72, SC = 4;
  localparam int unsigned TAU = (L + K - 1) / K;
  localparam int unsigned LAT = (TAU + 1) * 5 * SC;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic m_load, m_busy, in_valid, in_ready, out_valid, idle;
  logic [L-1:0] m_in, in_a, in_b, out_c;
  logic [3:0] in_tag, out_tag;

  mm_engine #(.L(L), .K(K), .STAGE_CYC(SC)) dut (.*);

  int checks = 0, failures = 0;
  logic [L-1:0] mod_v;
  logic [L-1:0] exp_q [16];
  int          got_n;
  int          t_start, t_first, t_last;
  int          cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic logic [L-1:0] rnd_bits(int unsigned nb);
    logic [L-1:0] r = '0;
    for (int i = 0; i < L/32; i++) r[i*32 +: 32] = $urandom;
    if (nb < L) r = r & ((L'(1) << nb) - 1);
    return r;
  endfunction

  function automatic logic [L-1:0] mulmod(logic [L-1:0] a, logic [L-1:0] b, logic [L-1:0] m);
    // left-to-right double-and-add, all values kept below m
    logic [L+1:0] r = '0;
    for (int i = L-1; i >= 0; i--) begin
      r = r << 1;
      if (r >= (L+2)'(m)) r = r - (L+2)'(m);
      if (b[i]) begin
        r = r + (L+2)'(a);
        if (r >= (L+2)'(m)) r = r - (L+2)'(m);
      end
    end
    return L'(r);
  endfunction

  // collect results
  always @(posedge clk) if (out_valid) begin
    checks++;
    if (out_c !== exp_q[out_tag]) begin
      failures++;
      $display("FAIL tag %0d: got %h", out_tag, out_c[63:0]);
    end
    if (got_n == 0) t_first = cyc;
    t_last = cyc;
    got_n++;
  end

  task automatic load_mod(input logic [L-1:0] m);
    @(negedge clk); m_in = m; m_load = 1;
    @(negedge clk); m_load = 0;
    while (m_busy) @(negedge clk);
    mod_v = m;
  endtask

  task automatic issue(input logic [L-1:0] a, input logic [L-1:0] b, input int tag);
    @(negedge clk);
    in_a = a; in_b = b; in_tag = 4'(tag); in_valid = 1;
    exp_q[tag] = mulmod(a, b, mod_v);
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    @(negedge clk); in_valid = 0;
  endtask

  task automatic run_batch(input int nb, input int n);
    logic [L-1:0] m, a, b;
    m = rnd_bits(nb); m[nb-1] = 1'b1; m[0] = 1'b1;
    load_mod(m);
    got_n = 0;
    for (int i = 0; i < n; i++) begin
      a = rnd_bits(nb - 1);
      b = rnd_bits(nb - 1);
      if (i == 0) begin a = m - 1; b = m - 1; end
      if (i == 1 && n > 2) begin a = 1; end
      if (i == 0) t_start = cyc;
      issue(a, b, i);
    end
    while (got_n < n) @(posedge clk);
    @(posedge clk);
  endtask

  initial begin
    m_load = 0; in_valid = 0; m_in = '0; in_a = '0; in_b = '0; in_tag = '0;
    got_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // single product: latency check
    run_batch(L, 1);
    checks++;
    if (t_first - t_start < int'(LAT - SC) || t_first - t_start > int'(LAT + 2*SC)) begin
      failures++;
      $display("FAIL latency %0d, expected about %0d", t_first - t_start, LAT);
    end
    // five in flight: throughput check
    run_batch(L, 5);
    checks++;
    if (t_last - t_start > int'(LAT + 6*SC)) begin
      failures++;
      $display("FAIL 5 products took %0d cycles", t_last - t_start);
    end
    // shorter modulus and more operations than slots
    run_batch(2000, 8);
    run_batch(200, 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

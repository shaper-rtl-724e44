// tb_shaper_csr: self-checking test of the control/status registers.
// Writes random seed words and reads them back, checks that a control write
// produces a single seed_valid pulse carrying exactly those words, that the
// interrupt rises only on an idle rising edge and is cleared by control
// bit 1, that the status word mirrors its inputs and that the bundle counter
// counts.  A watchdog ends the run if it hangs.
module tb_shaper_csr;
  localparam int unsigned RATE  = 1088;
  localparam int unsigned NSEED = RATE / 64;

  logic            clk = 1'b0, rst_n = 1'b0;
  logic            csr_we = 1'b0, csr_re = 1'b0;
  logic [7:0]      csr_addr = '0;
  logic [63:0]     csr_wdata = '0, csr_rdata;
  logic            seed_valid;
  logic [RATE-1:0] seed_block;
  logic            all_idle = 1'b1, rng_seeded = 1'b0, illegal = 1'b0, ev_bundle = 1'b0;
  logic            irq;

  int checks = 0, failures = 0, n_pulse = 0;
  logic [NSEED-1:0][63:0] ref_seed;

  shaper_csr #(.RATE(RATE)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(input int a, input logic [63:0] d);
    @(negedge clk); csr_we = 1'b1; csr_addr = 8'(a); csr_wdata = d;
    @(negedge clk); csr_we = 1'b0;
  endtask

  task automatic rd(input int a, output logic [63:0] d);
    @(negedge clk); csr_re = 1'b1; csr_addr = 8'(a);
    @(negedge clk); csr_re = 1'b0; d = csr_rdata;
  endtask

  always @(posedge clk) if (seed_valid) begin
    n_pulse++;
    checks++;
    if (seed_block !== RATE'(ref_seed)) begin failures++; $display("FAIL: seed block contents"); end
  end

  initial begin
    logic [63:0] d;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // seed words
    for (int i = 0; i < NSEED; i++) begin
      ref_seed[i] = {$urandom, $urandom};
      wr(i, ref_seed[i]);
    end
    for (int i = 0; i < NSEED; i++) begin
      rd(i, d);
      check(d == ref_seed[i], $sformatf("seed word %0d readback", i));
    end
    check(n_pulse == 0, "no seed pulse before the control write");
    wr(NSEED, 64'h1);
    repeat (2) @(negedge clk);
    check(n_pulse == 1, "exactly one seed pulse");
    // status mirrors inputs
    for (int k = 0; k < 8; k++) begin
      rng_seeded = k[0]; illegal = k[1];
      rd(NSEED + 1, d);
      check(d[3:1] == {illegal, rng_seeded, all_idle}, "status bits");
    end
    // interrupt on busy -> idle
    check(irq == 1'b0, "no interrupt after reset");
    @(negedge clk); all_idle = 1'b0;
    repeat (4) @(negedge clk);
    check(irq == 1'b0, "no interrupt while busy");
    all_idle = 1'b1;
    @(negedge clk); @(negedge clk);
    check(irq == 1'b1, "interrupt on becoming idle");
    rd(NSEED + 1, d);
    check(d[0] == 1'b1, "status shows interrupt");
    repeat (3) @(negedge clk);
    check(irq == 1'b1, "interrupt stays until cleared");
    wr(NSEED, 64'h2);
    check(irq == 1'b0, "interrupt cleared");
    check(n_pulse == 1, "clearing the interrupt loads no seed");
    // bundle counter
    for (int i = 0; i < 37; i++) begin
      @(negedge clk); ev_bundle = ($urandom_range(0, 1) == 1) || i == 0;
    end
    @(negedge clk); ev_bundle = 1'b0;
    begin
      logic [63:0] c0, c1;
      rd(NSEED + 2, c0);
      for (int i = 0; i < 11; i++) begin @(negedge clk); ev_bundle = 1'b1; end
      @(negedge clk); ev_bundle = 1'b0;
      rd(NSEED + 2, c1);
      check(c0 != 0, "bundle counter counted");
      check(c1 - c0 == 11, $sformatf("bundle counter delta %0d", c1 - c0));
    end
    rd(NSEED + 5, d);
    check(d == 0, "unmapped address reads zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

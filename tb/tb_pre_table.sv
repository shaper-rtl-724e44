// tb_pre_table: fills a reduced table (64-bit lines, 32-bit exponents,
// 4-bit windows: 2 x 8 x 15 lines) through the linear write port with
// random lines, then reads every (base, window, digit) entry in random
// order and checks that it returns the line written at
// (base*NWIN + window)*15 + digit - 1, one cycle after the read.
module tb_pre_table;
  localparam int L = 64, EB = 32, WIN = 4, NWIN = EB / WIN, NLINE = 2 * NWIN * 15;
  localparam int AW = shaper_pkg::clog2i(NLINE);
  logic clk = 0;
  always #5 clk = ~clk;
  logic we = 0, re = 0, sel = 0;
  logic [AW-1:0] waddr = '0;
  logic [L-1:0] wdata = '0, rdata;
  logic [shaper_pkg::clog2i(NWIN)-1:0] win = '0;
  logic [WIN-1:0] digit = 4'd1;
  logic [L-1:0] ref_mem [NLINE];
  int checks = 0, failures = 0;

  pre_table #(.L(L), .EXP_BITS(EB), .WIN(WIN)) dut (.*);

  initial begin
    for (int i = 0; i < NLINE; i++) begin
      ref_mem[i] = {$urandom, $urandom};
      @(negedge clk); we = 1; waddr = AW'(i); wdata = ref_mem[i];
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 4 * NLINE; n++) begin
      int s, j, d;
      s = $urandom_range(0, 1); j = $urandom_range(0, NWIN - 1); d = $urandom_range(1, 15);
      @(negedge clk); re = 1; sel = s[0]; win = $bits(win)'(j); digit = WIN'(d);
      @(negedge clk); re = 0;
      checks++;
      if (rdata !== ref_mem[(s * NWIN + j) * 15 + d - 1]) begin
        failures++; $display("FAIL: entry %0d/%0d/%0d", s, j, d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

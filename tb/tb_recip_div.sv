// tb_recip_div: floor(2^E / d) for the engine's divisor range
// (d = m_hat + 1 with m_hat of D+2 bits, top bit set), compared with a
// restoring division done here bit by bit on wide integers; also checks the
// E+1 cycle run time.
module tb_recip_div;
  localparam int E = 158, DW = 81, QW = 80;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, busy, done;
  logic [DW-1:0] d;
  logic [QW-1:0] q;
  recip_div #(.E(E), .DW(DW), .QW(QW)) dut (.*);
  int checks = 0, failures = 0;
  initial begin
    logic [E:0] num, qq;
    logic [E:0] rem;
    int t0, t1;
    start = 0; d = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 40; i++) begin
      @(negedge clk);
      d = {$urandom, $urandom, $urandom};
      d[DW-1] = 1'b0; d[DW-2] = 1'b1;            // 80-bit divisor with top bit set
      if (i == 0) d = {1'b1, {(DW-1){1'b0}}};   // m_hat all ones plus one
      start = 1; t0 = $time / 10;
      @(negedge clk); start = 0;
      while (!done) @(negedge clk);
      t1 = $time / 10;
      num = '0; num[E] = 1'b1;
      rem = '0; qq = '0;
      for (int k = E; k >= 0; k--) begin
        rem = (rem << 1) | (E+1)'(num[k]);
        if (rem >= (E+1)'(d)) begin rem = rem - (E+1)'(d); qq[k] = 1'b1; end
      end
      checks += 2;
      if (q !== QW'(qq)) begin failures++; $display("FAIL q case %0d", i); end
      if (t1 - t0 != E + 2) begin failures++; $display("FAIL time %0d", t1 - t0); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

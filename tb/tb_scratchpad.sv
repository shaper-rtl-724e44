// tb_scratchpad: random reads and writes on all ports against an array
// model, including same-cycle writes to one line (lower port wins) and
// read-during-write (old data).
module tb_scratchpad;
  localparam int W = 96, D = 64, NP = 3, AW = 6;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [NP-1:0] en, we;
  logic [NP-1:0][AW-1:0] addr;
  logic [NP-1:0][W-1:0] wdata, rdata;
  scratchpad #(.W(W), .DEPTH(D), .NPORT(NP)) dut (.*);
  int checks = 0, failures = 0;
  logic [W-1:0] model [D];
  logic [W-1:0] expq [NP];
  logic [NP-1:0] rd_pend;
  initial begin
    en = '0; we = '0; addr = '0; wdata = '0; rd_pend = '0;
    // initialise every line through port 0
    for (int i = 0; i < D; i++) begin
      @(negedge clk);
      en = 3'b001; we = 3'b001; addr[0] = AW'(i); wdata[0] = {$urandom, $urandom, $urandom};
      model[i] = wdata[0];
    end
    @(negedge clk); en = '0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      for (int p = 0; p < NP; p++) if (rd_pend[p]) begin
        checks++;
        if (rdata[p] !== expq[p]) begin failures++; $display("FAIL port %0d read", p); end
      end
      for (int p = 0; p < NP; p++) begin
        en[p] = $urandom % 2; we[p] = $urandom % 2;
        addr[p] = (t % 7 == 0) ? AW'(5) : AW'($urandom % D);
        wdata[p] = {$urandom, $urandom, $urandom};
      end
      for (int p = 0; p < NP; p++) begin
        rd_pend[p] = en[p] && !we[p];
        expq[p] = model[addr[p]];
      end
      for (int p = NP - 1; p >= 0; p--) if (en[p] && we[p]) model[addr[p]] = wdata[p];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_sync_fifo: random push/pop traffic against a queue model; checks data
// order, the full and empty flags and the occupancy count.
module tb_sync_fifo;
  localparam int W = 64, D = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic push, pop, full, empty;
  logic [W-1:0] din, dout;
  logic [4:0] count;
  sync_fifo #(.W(W), .DEPTH(D)) dut (.*);

  int checks = 0, failures = 0;
  logic [W-1:0] q [$];
  int nfull = 0, nempty = 0;

  initial begin
    push = 0; pop = 0; din = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      checks++;
      if (full != (q.size() == D) || empty != (q.size() == 0) || count != 5'(q.size())) begin
        failures++;
        $display("FAIL flags at %0d: full %b empty %b count %0d model %0d", i, full, empty, count, q.size());
      end
      if (!empty) begin
        checks++;
        if (dout !== q[0]) begin failures++; $display("FAIL data %h vs %h", dout, q[0]); end
      end
      if (full) nfull++;
      if (empty) nempty++;
      // phases: fill-biased, then drain-biased
      push = !full && (($urandom % 4) < ((i / 250) % 2 == 0 ? 3 : 1));
      pop  = !empty && (($urandom % 4) < ((i / 250) % 2 == 0 ? 1 : 3));
      din  = {$urandom, $urandom};
      @(posedge clk);
      #1;
      if (pop) void'(q.pop_front());
      if (push) q.push_back(din);
    end
    checks++;
    if (nfull == 0 || nempty == 0) begin failures++; $display("FAIL full/empty never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

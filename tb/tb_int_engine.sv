// tb_int_engine: random 64-bit additions and multiplications (with wrap
// around) compared with the expected ring-Z_(2^64) results; checks the
// one-cycle latency through the valid flag.
module tb_int_engine;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic en, is_mul, vld;
  logic [63:0] a, b, y;
  int_engine dut (.*);
  int checks = 0, failures = 0;
  initial begin
    logic [63:0] e;
    en = 0; is_mul = 0; a = 0; b = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      en = 1; is_mul = i[0];
      a = {$urandom, $urandom}; b = {$urandom, $urandom};
      if (i == 2) begin a = '1; b = 64'd1; end
      if (i == 3) begin a = 64'h8000000000000000; b = 64'd2; end
      e = is_mul ? a * b : a + b;
      @(negedge clk);
      en = 0;
      checks++;
      if (!vld || y !== e) begin
        failures++;
        $display("FAIL %0d: op %0d got %h expected %h", i, is_mul, y, e);
      end
    end
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

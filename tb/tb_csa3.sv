// tb_csa3: checks x + y + z == s + 2c modulo 2^(W+1) for random operands.
module tb_csa3;
  localparam int W = 300;
  logic [W-1:0] x, y, z, s, c;
  csa3 #(.W(W)) dut (.*);
  int checks = 0, failures = 0;
  initial begin
    for (int i = 0; i < 500; i++) begin
      for (int j = 0; j < W/32 + 1; j++) begin
        x[j*32 +: 32] = $urandom; y[j*32 +: 32] = $urandom; z[j*32 +: 32] = $urandom;
      end
      if (i == 0) begin x = '1; y = '1; z = '1; end
      #1;
      checks++;
      if ((W+2)'(x) + (W+2)'(y) + (W+2)'(z) !== (W+2)'(s) + ((W+2)'(c) << 1)) begin
        failures++; $display("FAIL case %0d", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

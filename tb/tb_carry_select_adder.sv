// tb_carry_select_adder: random and carry-chain corner operands for a
// 700-bit adder (five full 128-bit chunks and a short one) and a width that
// fills its chunks exactly; sums and carry-outs compared with a plain add.
module tb_carry_select_adder;
  localparam int W1 = 700, W2 = 256;
  logic [W1-1:0] x1, y1, s1; logic ci1, co1;
  logic [W2-1:0] x2, y2, s2; logic ci2, co2;
  carry_select_adder #(.W(W1)) dut1 (.x(x1), .y(y1), .cin(ci1), .sum(s1), .cout(co1));
  carry_select_adder #(.W(W2)) dut2 (.x(x2), .y(y2), .cin(ci2), .sum(s2), .cout(co2));
  int checks = 0, failures = 0;
  initial begin
    logic [W1:0] e1; logic [W2:0] e2;
    for (int i = 0; i < 500; i++) begin
      for (int j = 0; j < W1/32 + 1; j++) begin
        x1[j*32 +: 32] = $urandom; y1[j*32 +: 32] = $urandom;
      end
      for (int j = 0; j < W2/32; j++) begin
        x2[j*32 +: 32] = $urandom; y2[j*32 +: 32] = $urandom;
      end
      ci1 = $urandom % 2; ci2 = $urandom % 2;
      if (i % 5 == 1) begin x1 = '1; y1 = '0; ci1 = 1; x2 = '1; y2 = W2'(1); ci2 = 0; end
      if (i % 5 == 2) begin y1 = ~x1; y2 = ~x2; end
      if (i % 5 == 3) begin x1[383:0] = '1; y1[383:0] = '0; ci1 = 1; end
      #1;
      e1 = (W1+1)'(x1) + (W1+1)'(y1) + (W1+1)'(ci1);
      e2 = (W2+1)'(x2) + (W2+1)'(y2) + (W2+1)'(ci2);
      checks += 2;
      if ({co1, s1} !== e1) begin failures++; $display("FAIL W1 case %0d", i); end
      if ({co2, s2} !== e2) begin failures++; $display("FAIL W2 case %0d", i); end
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

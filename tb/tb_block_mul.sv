// tb_block_mul: a x b == pe + po for the engine's two block multipliers
// (72 x 3072 and 80 x 3072) with random and all-ones operands.
module tb_block_mul;
  localparam int BW = 3072;
  logic [71:0] a1; logic [79:0] a2;
  logic [BW-1:0] b;
  logic [72+BW-1:0] pe1, po1;
  logic [80+BW-1:0] pe2, po2;
  block_mul #(.AW(72), .BW(BW)) dut1 (.a(a1), .b(b), .pe(pe1), .po(po1));
  block_mul #(.AW(80), .BW(BW)) dut2 (.a(a2), .b(b), .pe(pe2), .po(po2));
  int checks = 0, failures = 0;
  initial begin
    logic [72+BW-1:0] e1; logic [80+BW-1:0] e2;
    for (int i = 0; i < 100; i++) begin
      for (int j = 0; j < BW/32; j++) b[j*32 +: 32] = $urandom;
      a1 = {$urandom, $urandom, $urandom};
      a2 = {$urandom, $urandom, $urandom};
      if (i == 0) begin a1 = '1; a2 = '1; b = '1; end
      #1;
      // reference: shift-and-add over the bits of the short operand
      e1 = '0; e2 = '0;
      for (int k = 0; k < 72; k++) if (a1[k]) e1 = e1 + ((72+BW)'(b) << k);
      for (int k = 0; k < 80; k++) if (a2[k]) e2 = e2 + ((80+BW)'(b) << k);
      checks += 2;
      if (pe1 + po1 !== e1) begin failures++; $display("FAIL 72-bit case %0d", i); end
      if (pe2 + po2 !== e2) begin failures++; $display("FAIL 80-bit case %0d", i); end
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

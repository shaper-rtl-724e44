// tb_vliw_parser: random bundles (mixtures of AHE, SS, memory and NOP
// slots, some with two slots for one unit, some fenced) into the parser,
// with unit models that stay busy for random times.  Checks that every
// unit receives exactly its instructions in program order, that nothing
// from a fenced bundle leaves while a unit is busy, that NOPs are dropped,
// and that slots for different units of one bundle can leave together.
module tb_vliw_parser;
  import shaper_pkg::*;
  localparam int NS = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic b_valid, b_ready, b_fence, idle, ev_bundle, ev_slot_wait, ev_fence_wait;
  instr_t [NS-1:0] b_slots;
  logic [2:0] u_valid, u_ready, u_idle;
  instr_t [2:0] u_instr;

  vliw_parser #(.NSLOT(NS)) dut (.*);

  int checks = 0, failures = 0, together = 0, fences = 0;
  instr_t expq [3][$];
  int busy_left [3];
  logic fence_cur;

  const opcode_e ops [4] = '{OP_AHE_ENC, OP_SS_GEN, OP_SPM_LD, OP_NOP};

  always @(negedge clk) begin
    for (int u = 0; u < 3; u++) begin
      u_ready[u] = (busy_left[u] == 0) && ($urandom % 2 == 0);
      u_idle[u]  = (busy_left[u] == 0);
    end
  end
  always @(posedge clk) begin
    if ($countones(u_valid & u_ready) > 1) together++;
    for (int u = 0; u < 3; u++) begin
      if (busy_left[u] > 0) busy_left[u]--;
      if (u_valid[u] && u_ready[u]) begin
        instr_t e;
        e = expq[u].pop_front();
        checks++;
        if (u_instr[u] !== e) begin failures++; $display("FAIL unit %0d got wrong instruction", u); end
        busy_left[u] = $urandom % 6;
      end
    end
    if (|(u_valid & u_ready) && fence_cur && !(&u_idle)) begin
      failures++; $display("FAIL fenced bundle issued while a unit was busy");
    end
    if (b_valid && b_ready) fence_cur <= b_fence;
  end

  initial begin
    b_valid = 0; b_fence = 0; b_slots = '0; fence_cur = 0;
    for (int u = 0; u < 3; u++) busy_left[u] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      for (int s = 0; s < NS; s++) begin
        b_slots[s].op  = ops[$urandom % 4];
        b_slots[s].len = LEN_W'($urandom);
        b_slots[s].p0  = $urandom; b_slots[s].p1 = $urandom; b_slots[s].p2 = $urandom;
        if (fu_of(b_slots[s].op) != FU_NONE) expq[int'(fu_of(b_slots[s].op)) - 1].push_back(b_slots[s]);
      end
      b_fence = ($urandom % 8) == 0;
      if (b_fence) fences++;
      b_valid = 1;
      @(posedge clk);
      while (!b_ready) @(posedge clk);
      @(negedge clk); b_valid = 0;
    end
    while (!idle) @(negedge clk);
    for (int u = 0; u < 3; u++) begin
      checks++;
      if (expq[u].size() != 0) begin failures++; $display("FAIL unit %0d missed %0d", u, expq[u].size()); end
    end
    checks++;
    if (together == 0 || fences == 0) begin failures++; $display("FAIL no parallel issue"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_spm_mover: SPM.ld, SPM.st, AHE.init and DM.ld through the data mover,
// with a device-memory model that accepts requests at random and answers
// reads in order after a random delay.  Checks every line that lands in the
// scratchpad model, in device memory, in the key registers and in the table.
module tb_spm_mover;
  import shaper_pkg::*;
  localparam int L = 128, SAW = 8, DAW = 16, TAW = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, dm_req_valid, dm_req_ready, dm_req_we, dm_rsp_valid;
  logic host_valid, host_to_dm, host_done, spm_en, spm_we, key_we, tbl_we, idle;
  opcode_e in_op;
  logic [LEN_W-1:0] in_len, host_len;
  logic [DAW-1:0] in_dm, in_host, dm_req_addr, host_dm_addr, host_addr;
  logic [SAW-1:0] in_spm, spm_addr;
  logic [L-1:0] dm_req_wdata, dm_rsp_rdata, spm_wdata, spm_rdata, key_wdata, tbl_wdata;
  logic [2:0] key_idx;
  logic [TAW-1:0] tbl_waddr;

  spm_mover #(.L(L), .SAW(SAW), .DAW(DAW), .TAW(TAW)) dut (.*);

  int checks = 0, failures = 0;
  logic [L-1:0] dm [1024];
  logic [L-1:0] spm [256];
  logic [L-1:0] keys [8];
  logic [L-1:0] tbl [64];
  logic [L-1:0] rq [$];
  int rdelay = 0;

  always @(negedge clk) dm_req_ready = ($urandom % 4) != 0;
  always @(posedge clk) begin
    dm_rsp_valid <= 1'b0;
    if (dm_req_valid && dm_req_ready) begin
      if (dm_req_we) dm[dm_req_addr] <= dm_req_wdata;
      else rq.push_back(dm[dm_req_addr]);
    end
    if (rq.size() > 0 && ($urandom % 3) == 0) begin
      dm_rsp_valid <= 1'b1;
      dm_rsp_rdata <= rq.pop_front();
    end
    if (spm_en && spm_we) spm[spm_addr] <= spm_wdata;
    if (spm_en && !spm_we) spm_rdata <= spm[spm_addr];
    if (key_we) keys[key_idx] <= key_wdata;
    if (tbl_we) tbl[tbl_waddr] <= tbl_wdata;
    host_done <= host_valid && !host_done;
  end

  task automatic run(opcode_e op, int len, int dmp, int spmp, int hostp);
    @(negedge clk);
    in_valid = 1; in_op = op; in_len = LEN_W'(len); in_dm = DAW'(dmp); in_spm = SAW'(spmp); in_host = DAW'(hostp);
    @(negedge clk); in_valid = 0;
    while (!idle) @(negedge clk);
    repeat (2) @(negedge clk);
  endtask

  initial begin
    in_valid = 0; in_op = OP_NOP; in_len = '0; in_dm = '0; in_spm = '0; in_host = '0;
    dm_rsp_rdata = '0;
    for (int i = 0; i < 1024; i++) dm[i] = {$urandom, $urandom, $urandom, $urandom};
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(OP_SPM_LD, 20, 100, 10, 0);
    for (int i = 0; i < 20; i++) begin
      checks++;
      if (spm[10 + i] !== dm[100 + i]) begin failures++; $display("FAIL ld %0d", i); end
    end
    run(OP_SPM_ST, 20, 500, 10, 0);
    for (int i = 0; i < 20; i++) begin
      checks++;
      if (dm[500 + i] !== dm[100 + i]) begin failures++; $display("FAIL st %0d", i); end
    end
    run(OP_AHE_INIT, KEY_LINES + 30, 200, 0, 0);
    for (int i = 0; i < KEY_LINES + 30; i++) begin
      checks++;
      if (i < KEY_LINES ? keys[i] !== dm[200 + i] : tbl[i - KEY_LINES] !== dm[200 + i]) begin
        failures++; $display("FAIL init line %0d", i);
      end
    end
    fork
      run(OP_DM_LD, 7, 300, 0, 4000);
      begin
        @(posedge host_valid);
        checks++;
        if (!host_to_dm || host_len != 7 || host_dm_addr != 300 || host_addr != 4000) begin
          failures++; $display("FAIL host request");
        end
      end
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

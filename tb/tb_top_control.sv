// tb_top_control: checks the command decode (core select, broadcast, target, index), the read
// data return per core, the chip status word and all_done.
module tb_top_control;
  import gpcim_pkg::*;
  logic clk = 1'b0;
  logic cmd_valid = 1'b0, cmd_we = 1'b0;
  logic [23:0] cmd_addr = '0;
  word_t cmd_wdata = '0, cmd_rdata, core_wdata;
  logic [3:0] core_valid, core_halted = '0, core_running = '0;
  logic core_we, all_done;
  host_tgt_e core_tgt;
  logic [15:0] core_addr;
  word_t [3:0] core_rdata;
  int checks = 0, failures = 0;

  top_control dut (.cmd_valid, .cmd_we, .cmd_addr, .cmd_wdata, .cmd_rdata, .core_valid,
                   .core_we, .core_tgt, .core_addr, .core_wdata, .core_rdata, .core_halted,
                   .core_running, .all_done);

  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int i = 0; i < 4; i++) core_rdata[i] = 32'hC0DE0000 + 32'(i);
    for (int t = 0; t < 200; t++) begin
      int core, bc, tgt;
      logic [15:0] idx;
      core = $urandom_range(0, 3); bc = $urandom_range(0, 1); tgt = $urandom_range(0, 7);
      idx = 16'($urandom);
      core_halted = 4'($urandom); core_running = 4'($urandom);
      cmd_valid = 1'($urandom); cmd_we = 1'($urandom); cmd_wdata = $urandom;
      cmd_addr = {2'(core), 1'(bc), 3'(tgt), 2'b00, idx};
      #1;
      for (int i = 0; i < 4; i++)
        chk(core_valid[i] == (cmd_valid && tgt != 7 && (bc == 1 || core == i)), "core select");
      chk(core_we == cmd_we && core_addr == idx && core_wdata == cmd_wdata && int'(core_tgt) == tgt,
          "fields");
      if (tgt == 7) chk(cmd_rdata == {24'b0, core_running, core_halted}, "status word");
      else          chk(cmd_rdata == 32'hC0DE0000 + 32'(core), "read return");
      chk(all_done == (core_halted == 4'hF), "all_done");
      @(posedge clk);
    end
    core_halted = 4'hF; #1 chk(all_done, "all_done all halted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

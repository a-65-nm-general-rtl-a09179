// tb_scan_io: shifts random 57-bit command frames in, checks the decoded command on the update
// cycle, and checks that the read data captured then comes out serially, MSB first.
module tb_scan_io;
  import gpcim_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, scan_en = 1'b0, scan_in = 1'b0, scan_update = 1'b0;
  logic scan_out, cmd_valid, cmd_we;
  logic [23:0] cmd_addr;
  word_t cmd_wdata, cmd_rdata = '0;
  int checks = 0, failures = 0;

  scan_io dut (.clk, .rst_n, .scan_en, .scan_in, .scan_update, .scan_out,
               .cmd_valid, .cmd_we, .cmd_addr, .cmd_wdata, .cmd_rdata);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    logic [56:0] frame;
    word_t rdv, got;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 30; t++) begin
      frame = {1'($urandom), 24'($urandom), 32'($urandom)};
      rdv   = $urandom;
      // shift in; the bits shifted out belong to the previous read
      for (int i = 56; i >= 0; i--) begin
        @(negedge clk);
        scan_en = 1'b1; scan_in = frame[i];
      end
      @(negedge clk);
      scan_en = 1'b0; scan_update = 1'b1;
      @(negedge clk);
      scan_update = 1'b0;
      chk(cmd_valid, "cmd_valid after update");
      chk({cmd_we, cmd_addr, cmd_wdata} == frame, "decoded frame");
      cmd_rdata = rdv;
      @(negedge clk);
      chk(!cmd_valid, "cmd_valid one cycle");
      cmd_rdata = '0;
      // shift out the captured read data
      for (int i = 31; i >= 0; i--) begin
        got[i] = scan_out;
        scan_en = 1'b1; scan_in = 1'b0;
        @(negedge clk);
      end
      scan_en = 1'b0;
      chk(got == rdv, $sformatf("read data out got %h exp %h", got, rdv));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

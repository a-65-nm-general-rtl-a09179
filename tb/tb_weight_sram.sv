// tb_weight_sram: writes every 32-bit word of every entry, then checks the 256-bit entry reads
// and the placement of word w at bits 32w+31:32w.
module tb_weight_sram;
  import gpcim_pkg::*;
  logic clk = 1'b0, we = 1'b0;
  logic [6:0] ra = '0, wa = '0;
  logic [2:0] ww = '0;
  logic [31:0] wd = '0;
  logic [WS_WIDTH-1:0] rd;
  logic [WS_WIDTH-1:0] model [WS_DEPTH];
  int checks = 0, failures = 0;

  weight_sram dut (.clk, .raddr(ra), .rdata(rd), .we, .waddr(wa), .wword(ww), .wdata(wd));

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < WS_DEPTH; e++)
      for (int w = 0; w < WS_WIDTH / 32; w++) begin
        @(negedge clk);
        we = 1'b1; wa = 7'(e); ww = 3'(w); wd = $urandom;
        model[e][32*w +: 32] = wd;
      end
    @(negedge clk);
    we = 1'b0;
    for (int e = 0; e < WS_DEPTH; e++) begin
      ra = 7'(e);
      #1;
      checks++;
      if (rd !== model[e]) begin failures++; $display("FAIL entry %0d", e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

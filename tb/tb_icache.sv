// tb_icache: fills the whole instruction memory with an address-derived pattern and reads it
// back, then overwrites random words.
module tb_icache;
  import gpcim_pkg::*;
  logic clk = 1'b0, we = 1'b0;
  logic [9:0] ra = '0, wa = '0;
  logic [31:0] rd, wd = '0;
  logic [31:0] model [IC_DEPTH];
  int checks = 0, failures = 0;

  icache dut (.clk, .raddr(ra), .rdata(rd), .we, .waddr(wa), .wdata(wd));

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < IC_DEPTH; i++) begin
      @(negedge clk);
      we = 1'b1; wa = 10'(i); wd = 32'(i) * 32'h9E3779B1;
      model[i] = wd;
    end
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      wa = 10'($urandom); wd = $urandom; model[wa] = wd;
    end
    @(negedge clk);
    we = 1'b0;
    for (int i = 0; i < IC_DEPTH; i++) begin
      ra = 10'(i);
      #1;
      checks++;
      if (rd !== model[i]) begin failures++; $display("FAIL word %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

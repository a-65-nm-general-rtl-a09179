// tb_domem: random writes with lane masks and two simultaneous reads per cycle against a
// reference array; also checks that a write becomes visible to reads in the next cycle.
module tb_domem;
  import gpcim_pkg::*;
  logic clk = 1'b0;
  logic [6:0] ra = '0, rb = '0, wa = '0;
  vec_t rda, rdb, wd = '0;
  logic we = 1'b0;
  logic [LANES-1:0] lw = '0;
  vec_t model [DO_ROWS];
  int checks = 0, failures = 0;

  domem dut (.clk, .raddr_a(ra), .rdata_a(rda), .raddr_b(rb), .rdata_b(rdb),
             .we, .waddr(wa), .lane_we(lw), .wdata(wd));

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < DO_ROWS; r++) begin
      @(negedge clk);
      we = 1'b1; wa = 7'(r); lw = '1;
      for (int l = 0; l < LANES; l++) wd[l] = $urandom;
      model[r] = wd;
    end
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      // reads of the state before this cycle's write
      ra = 7'($urandom); rb = 7'($urandom);
      #1;
      checks += 2;
      if (rda !== model[ra]) begin failures++; $display("FAIL A row %0d", ra); end
      if (rdb !== model[rb]) begin failures++; $display("FAIL B row %0d", rb); end
      we = 1'($urandom); wa = 7'($urandom); lw = 4'($urandom);
      for (int l = 0; l < LANES; l++) wd[l] = $urandom;
      @(posedge clk);
      if (we) for (int l = 0; l < LANES; l++) if (lw[l]) model[wa][l] = wd[l];
      #1;
      ra = wa;
      #1;
      checks++;
      if (rda !== model[wa]) begin failures++; $display("FAIL write-through row %0d", wa); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

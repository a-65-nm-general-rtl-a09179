// tb_ccu: the four-unit CCU. DNN mode: builds a random 32x64 DOUT product array from random
// activations and weight bit planes (both banks), runs eight steps and checks each unit's dot
// product over its own 8-column group of the selected bank. CPU mode: a lane-wise VADD and VSUB
// and a VMERGE with a per-lane mask.
module tb_ccu;
  import gpcim_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, dnn_mode = 1'b0, bank = 1'b0;
  opcode_e op = OP_VADD;
  vec_t a = '0, b = '0, psum = '0, result;
  logic [LANES-1:0] mask = '0;
  logic [DA_ROWS-1:0][DA_COLS-1:0] dout = '0;
  logic first = 1'b0, step = 1'b0, neg = 1'b0;
  int checks = 0, failures = 0;

  ccu dut (.clk, .rst_n, .dnn_mode, .op, .ext_sel(2'b00), .mul_step(2'b00), .a, .b, .mask,
           .dout, .bank, .dnn_first(first), .dnn_step(step), .dnn_neg(neg), .acc_en(1'b0),
           .relu_en(1'b0), .shift(5'd0), .psum, .result);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    logic [DA_ROWS-1:0][DA_COLS-1:0] act;
    logic signed [7:0] w [DA_ROWS];
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 60; t++) begin
      int expd [LANES];
      @(negedge clk);
      dnn_mode = 1'b1; bank = 1'($urandom);
      for (int r = 0; r < DA_ROWS; r++) begin
        act[r] = {$urandom, $urandom};
        w[r] = 8'($urandom);
      end
      for (int k = 0; k < LANES; k++) begin
        expd[k] = 0;
        for (int r = 0; r < DA_ROWS; r++)
          expd[k] += int'(w[r]) * int'($signed(act[r][(bank ? 32 : 0) + 8*k +: 8]));
      end
      for (int bi = 7; bi >= 0; bi--) begin
        for (int r = 0; r < DA_ROWS; r++) dout[r] = w[r][bi] ? act[r] : '0;
        first = (bi == 7); neg = (bi == 7); step = 1'b1;
        @(negedge clk);
      end
      step = 1'b0;
      #1;
      for (int k = 0; k < LANES; k++)
        chk(result[k] == word_t'(expd[k]), $sformatf("unit %0d got %0d exp %0d", k, $signed(result[k]), expd[k]));
    end
    dnn_mode = 1'b0;
    for (int t = 0; t < 100; t++) begin
      for (int k = 0; k < LANES; k++) begin a[k] = $urandom; b[k] = $urandom; end
      mask = 4'($urandom);
      op = OP_VADD; #1;
      for (int k = 0; k < LANES; k++) chk(result[k] == b[k] + a[k], "lane add");
      op = OP_VSUB; #1;
      for (int k = 0; k < LANES; k++) chk(result[k] == b[k] - a[k], "lane sub");
      op = OP_VMERGE; #1;
      for (int k = 0; k < LANES; k++) chk(result[k] == (mask[k] ? a[k] : b[k]), "lane merge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

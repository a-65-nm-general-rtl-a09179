// tb_latch_buffer: the latch must capture on the falling edge only when enabled, hold otherwise,
// and clear on reset.
module tb_latch_buffer;
  localparam int W = 16;
  logic clk = 1'b0, rst_n = 1'b1, en = 1'b0;
  logic [W-1:0] d = '0, q, exp_q;
  int checks = 0, failures = 0;

  latch_buffer #(.W(W)) dut (.clk, .rst_n, .en, .d, .q);

  always #5 clk = ~clk;
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic [W-1:0] e, input string what);
    checks++;
    if (q !== e) begin
      failures++;
      $display("FAIL %s: q=%h exp %h", what, q, e);
    end
  endtask

  initial begin
    #1 rst_n = 1'b0;  // asynchronous clear on the falling reset edge
    #1 chk('0, "reset");
    rst_n = 1'b1;
    exp_q = '0;
    for (int t = 0; t < 200; t++) begin
      @(posedge clk);
      #1;
      en = 1'($urandom);
      d  = W'($urandom);
      chk(exp_q, "rising edge must not capture");
      @(negedge clk);
      if (en) exp_q = d;
      #1 chk(exp_q, "falling edge capture/hold");
      d = ~d;  // data changes while clock is low must not pass
      #1 chk(exp_q, "hold while low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

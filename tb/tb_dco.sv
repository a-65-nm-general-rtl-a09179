// tb_dco: measures the oscillator's half period for several codes against
// BASE + code * STEP, and checks that the output stops low when disabled.
module tb_dco;
  logic en = 1'b0, clk_out;
  logic [3:0] code = '0;
  int checks = 0, failures = 0;

  dco #(.BASE(4), .STEP(1)) dut (.en, .code, .clk_out);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    time t0, t1;
    for (int c = 0; c < 16; c += 5) begin
      code = 4'(c);
      en = 1'b1;
      @(posedge clk_out); t0 = $time;
      @(negedge clk_out); t1 = $time;
      checks++;
      if (t1 - t0 != time'(4 + c)) begin
        failures++;
        $display("FAIL code %0d half period %0t", c, t1 - t0);
      end
      @(posedge clk_out); 
      checks++;
      if ($time - t0 != time'(2 * (4 + c))) begin failures++; $display("FAIL period code %0d", c); end
      en = 1'b0;
      #50;
      checks++;
      if (clk_out !== 1'b0) begin failures++; $display("FAIL not stopped"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

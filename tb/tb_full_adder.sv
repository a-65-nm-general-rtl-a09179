// tb_full_adder: exhaustive check of the active-low full adder cell against the arithmetic
// sum of its three (inverted) inputs.
module tb_full_adder;
  logic a_n, b_n, c_n, s_n, co_n, clk = 1'b0;
  int checks = 0, failures = 0;

  full_adder dut (.a_n, .b_n, .cin_n(c_n), .s_n, .cout_n(co_n));

  always #5 clk = ~clk;
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int a, b, c, s;
      {a_n, b_n, c_n} = 3'(v);
      a = !a_n; b = !b_n; c = !c_n;   // true-polarity values
      s = a + b + c;
      #1;
      checks++;
      if ({!co_n, !s_n} != 2'(s)) begin
        failures++;
        $display("FAIL a=%0d b=%0d c=%0d got co=%0d s=%0d", a, b, c, !co_n, !s_n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_adder_tree: random vectors through the 32-input, 40-bit adder tree, compared with a
// sequential sum; includes negative (sign-extended) inputs and all-ones inputs.
module tb_adder_tree;
  localparam int N = 32, W = 40;
  logic [N-1:0][W-1:0] in;
  logic [W-1:0] sum, ref_sum;
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  adder_tree #(.N(N), .W(W)) dut (.in, .sum);

  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      ref_sum = '0;
      for (int i = 0; i < N; i++) begin
        case (t % 3)
          0: in[i] = W'($signed(8'($urandom)));
          1: in[i] = {8'($urandom), $urandom};
          default: in[i] = (t == 2) ? '1 : W'($urandom_range(0, 255));
        endcase
        ref_sum += in[i];
      end
      #1;
      checks++;
      if (sum !== ref_sum) begin
        failures++;
        $display("FAIL t=%0d got %h exp %h", t, sum, ref_sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

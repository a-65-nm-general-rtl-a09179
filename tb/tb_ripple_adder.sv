// tb_ripple_adder: the 32-bit ripple-carry adder built from active-low full adders. Checks sum and
// carry-out against the + operator for random operands and carry-in, and for the corner cases
// (all ones plus one, zero, alternating patterns).
module tb_ripple_adder;
  logic [31:0] x = '0, y = '0, sum;
  logic cin = 1'b0, cout;
  int checks = 0, failures = 0;

  ripple_adder #(.W(32)) dut (.x, .y, .cin, .sum, .cout);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try(input logic [31:0] a, input logic [31:0] b, input logic ci);
    logic [32:0] e;
    x = a; y = b; cin = ci;
    #1;
    e = {1'b0, a} + {1'b0, b} + 33'(ci);
    checks++;
    if ({cout, sum} !== e) begin
      failures++;
      $display("FAIL %h + %h + %b = %b%h, expected %h", a, b, ci, cout, sum, e);
    end
  endtask

  initial begin
    try(32'hFFFF_FFFF, 32'h0, 1'b1);
    try(32'hFFFF_FFFF, 32'h1, 1'b0);
    try(32'h0, 32'h0, 1'b0);
    try(32'hAAAA_AAAA, 32'h5555_5555, 1'b1);
    for (int t = 0; t < 2000; t++) try($urandom, $urandom, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// ripple_adder: W-bit adder made of a chain of full_adder cells, used for the CCU's 32-bit
// add/subtract/compare path. Inputs are inverted before the chain and outputs after it, because
// the cell works on active-low signals. Combinational; carry out is brought out for unsigned
// comparisons.
module ripple_adder #(
  parameter int W = 32
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic [W:0]   c_n;
  logic [W-1:0] s_n;

  assign c_n[0] = ~cin;
  for (genvar i = 0; i < W; i++) begin : g_fa
    full_adder u_fa (.a_n(~x[i]), .b_n(~y[i]), .cin_n(c_n[i]), .s_n(s_n[i]), .cout_n(c_n[i+1]));
  end
  assign sum  = ~s_n;
  assign cout = ~c_n[W];
endmodule

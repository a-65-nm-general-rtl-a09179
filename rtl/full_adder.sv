// full_adder: one-bit full adder, the cell the CCU's 32-bit adders are built from.
// The silicon version is a 16-transistor mirror-style cell working on inverted signals
// (A_N, B_N, Cin_N in, S_N, Cout_N out); this model keeps those active-low pins so a
// chain of cells can be wired exactly as the cell is used: with all inputs inverted, the
// outputs are the inverted sum and carry. Purely combinational.
module full_adder (
  input  logic a_n,
  input  logic b_n,
  input  logic cin_n,
  output logic s_n,
  output logic cout_n
);
  // inverting symmetry of the full adder: FA(~a,~b,~c) = ~FA(a,b,c)
  always_comb begin
    s_n    = a_n ^ b_n ^ cin_n;
    cout_n = (a_n & b_n) | (cin_n & (a_n ^ b_n));
  end
endmodule

// adder_tree: binary tree that adds N words of W bits (modulo 2^W). In DNN mode the CCU feeds it
// the 32 sign-extended 8-bit products of one DAMEM column group; in CPU mode the same tree adds
// the eight shifted 32-bit partial products of a 32b x 8b multiply step (logic reuse between the
// two modes). N must be a power of two. Combinational: log2(N) adder levels.
module adder_tree #(
  parameter int N = 32,
  parameter int W = 40
) (
  input  logic [N-1:0][W-1:0] in,
  output logic [W-1:0]        sum
);
  // node i has children 2i+1 and 2i+2; leaves are nodes N-1 .. 2N-2
  logic [W-1:0] node [2*N-1];

  for (genvar i = 0; i < N; i++) begin : g_leaf
    assign node[N-1+i] = in[i];
  end
  for (genvar i = 0; i < N-1; i++) begin : g_add
    assign node[i] = node[2*i+1] + node[2*i+2];
  end
  assign sum = node[0];

  initial assert ((N & (N - 1)) == 0 && N >= 2) else $error("adder_tree: N must be a power of two");
endmodule

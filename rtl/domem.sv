// domem: data-cache output memory, a 128 x 128 array of dual-port 8T cells. Each row is one
// vector register of four 32-bit lanes (lane 0 = columns 31:0). Two independent reads (ports A
// and B, combinational, the bitline-discharge phase) and one write per cycle; the write lands at
// the rising edge, i.e. in the write-back phase that opens the next cycle, so a value written by
// one instruction is read by the next without forwarding. Per-lane write enable.
module domem
  import gpcim_pkg::*;
#(
  parameter int ROWS = DO_ROWS
) (
  input  logic                     clk,
  input  logic [$clog2(ROWS)-1:0]  raddr_a,
  output vec_t                     rdata_a,
  input  logic [$clog2(ROWS)-1:0]  raddr_b,
  output vec_t                     rdata_b,
  input  logic                     we,
  input  logic [$clog2(ROWS)-1:0]  waddr,
  input  logic [LANES-1:0]         lane_we,
  input  vec_t                     wdata
);
  vec_t mem [ROWS];

  always_ff @(posedge clk) begin
    if (we) begin
      for (int l = 0; l < LANES; l++)
        if (lane_we[l]) mem[waddr][l] <= wdata[l];
    end
  end

  assign rdata_a = mem[raddr_a];
  assign rdata_b = mem[raddr_b];
endmodule

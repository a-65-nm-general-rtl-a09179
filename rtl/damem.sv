// damem: data-cache activation memory, a 32-row x 64-column array of 9T cells in two banks of
// 32 columns. Each cell also ANDs its stored bit with the weight bit on its row and drives the
// result on its own DOUT line (the cell's 3T NAND gate; the active-high product is modelled), so
// in DNN mode all 32x64 one-bit products are available at once.
//
// CPU mode sees the array as 16 vector registers of four 32-bit lanes: register v occupies rows
// 2v (lane 0 = bank 0, lane 1 = bank 1) and 2v+1 (lane 2 = bank 0, lane 3 = bank 1), so lane 0
// is the first 32 columns, the scalar location. The single read/write port of the 9T cell gives
// one vector read and one vector write per cycle. Read is combinational (bitline discharge),
// write happens at the rising clock edge (write-back phase of the following cycle), with a
// per-lane write enable. The two-row view of a vector register is this design's choice.
module damem
  import gpcim_pkg::*;
#(
  parameter int ROWS = DA_ROWS,
  parameter int COLS = DA_COLS
) (
  input  logic                           clk,
  input  logic [$clog2(ROWS/2)-1:0]      raddr,
  output vec_t                           rdata,
  input  logic                           we,
  input  logic [$clog2(ROWS/2)-1:0]      waddr,
  input  logic [LANES-1:0]               lane_we,
  input  vec_t                           wdata,
  input  logic [ROWS-1:0]                wl_weight,
  output logic [ROWS-1:0][COLS-1:0]      dout
);
  logic [COLS-1:0] mem [ROWS];

  initial assert (COLS == 2 * XLEN) else $error("damem: a row must hold two lanes");

  always_ff @(posedge clk) begin
    if (we) begin
      if (lane_we[0]) mem[2*waddr][XLEN-1:0]      <= wdata[0];
      if (lane_we[1]) mem[2*waddr][2*XLEN-1:XLEN] <= wdata[1];
      if (lane_we[2]) mem[2*waddr+1][XLEN-1:0]      <= wdata[2];
      if (lane_we[3]) mem[2*waddr+1][2*XLEN-1:XLEN] <= wdata[3];
    end
  end

  always_comb begin
    rdata[0] = mem[2*raddr][XLEN-1:0];
    rdata[1] = mem[2*raddr][2*XLEN-1:XLEN];
    rdata[2] = mem[2*raddr+1][XLEN-1:0];
    rdata[3] = mem[2*raddr+1][2*XLEN-1:XLEN];
  end

  for (genvar r = 0; r < ROWS; r++) begin : g_dout
    assign dout[r] = mem[r] & {COLS{wl_weight[r]}};
  end
endmodule

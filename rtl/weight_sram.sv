// weight_sram: per-core weight store. Each entry holds the 32 8-bit weights of one output
// channel, weight r (bits 8r+7:8r) belonging to DAMEM row r. It is written one 32-bit word at a
// time over the scan path (word w of an entry = weights 4w..4w+3) and read one whole entry at a
// time by the weight controller. Combinational read, write at the rising edge. The depth (128
// entries, 4 KB) is this design's split of the per-core SRAM budget.
module weight_sram
  import gpcim_pkg::*;
#(
  parameter int DEPTH = WS_DEPTH,
  parameter int WIDTH = WS_WIDTH
) (
  input  logic                           clk,
  input  logic [$clog2(DEPTH)-1:0]       raddr,
  output logic [WIDTH-1:0]               rdata,
  input  logic                           we,
  input  logic [$clog2(DEPTH)-1:0]       waddr,
  input  logic [$clog2(WIDTH/32)-1:0]    wword,
  input  logic [31:0]                    wdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr][32*wword +: 32] <= wdata;
  end
  assign rdata = mem[raddr];
endmodule

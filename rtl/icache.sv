// icache: per-core instruction store, 1024 words of 32 bits. It is filled over the scan path
// while the core is idle and read every cycle by the fetch stage. Combinational read, write at
// the rising edge. The document gives no refill path, so it is modelled as an instruction memory
// rather than a tagged cache; its depth is this design's split of the per-core SRAM.
module icache
  import gpcim_pkg::*;
#(
  parameter int DEPTH = IC_DEPTH
) (
  input  logic                      clk,
  input  logic [$clog2(DEPTH)-1:0]  raddr,
  output logic [31:0]               rdata,
  input  logic                      we,
  input  logic [$clog2(DEPTH)-1:0]  waddr,
  input  logic [31:0]               wdata
);
  logic [31:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end
  assign rdata = mem[raddr];
endmodule

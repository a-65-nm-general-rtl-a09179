// top_control: chip-level control between the scan port and the four cores. It decodes a scan
// command address {core[23:22], broadcast[21], target[20:18], index[15:0]}, issues the word
// access to the addressed core (or to all cores when broadcast is set, e.g. to load the same
// program or start all cores together), returns the addressed core's read data, and answers
// target 7 (chip status) itself with {running[3:0], halted[3:0]}. all_done is high when every
// core has halted. The block holds no state: reads pass straight through from the cores' host
// ports and writes are registered inside the cores at the rising edge. The address map is this
// design's choice.
module top_control
  import gpcim_pkg::*;
#(
  parameter int NCORE = 4
) (
  input  logic                     cmd_valid,
  input  logic                     cmd_we,
  input  logic [23:0]              cmd_addr,
  input  word_t                    cmd_wdata,
  output word_t                    cmd_rdata,
  output logic [NCORE-1:0]         core_valid,
  output logic                     core_we,
  output host_tgt_e                core_tgt,
  output logic [15:0]              core_addr,
  output word_t                    core_wdata,
  input  word_t [NCORE-1:0]        core_rdata,
  input  logic [NCORE-1:0]         core_halted,
  input  logic [NCORE-1:0]         core_running,
  output logic                     all_done
);
  logic [1:0] sel;
  logic       bcast;
  logic [2:0] tgt;

  assign sel        = cmd_addr[23:22];
  assign bcast      = cmd_addr[21];
  assign tgt        = cmd_addr[20:18];
  assign core_we    = cmd_we;
  assign core_tgt   = host_tgt_e'(tgt);
  assign core_addr  = cmd_addr[15:0];
  assign core_wdata = cmd_wdata;
  assign all_done   = &core_halted;

  always_comb begin
    for (int i = 0; i < NCORE; i++)
      core_valid[i] = cmd_valid && tgt != 3'd7 && (bcast || int'(sel) == i);
    if (tgt == 3'd7) cmd_rdata = word_t'({core_running, core_halted});
    else             cmd_rdata = core_rdata[sel];
  end
endmodule

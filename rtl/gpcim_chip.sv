// gpcim_chip: the four-core GPCIM processor. Each core can run as a four-lane 32-bit vector CPU
// or as a CIM DNN accelerator and switches between the two under program control without moving
// data. The cores are loaded, started and read back over the scan port (scan_io, decoded by
// top_control); they run independently in parallel and all_done rises when all have halted.
// The core clock is the on-chip DCO when dco_en is high, otherwise ext_clk (the external clock
// path is this design's addition for test). The per-core pulse-generator phases are brought out
// for observation; they come from a behavioural delay-chain model, so synthesis, which drops
// the delays, sees them as constant outputs, and the DCO as a combinational loop (see dco).
module gpcim_chip
  import gpcim_pkg::*;
#(
  parameter int NCORE = 4
) (
  input  logic               ext_clk,
  input  logic               rst_n,
  input  logic               dco_en,
  input  logic [3:0]         dco_code,
  input  logic [3:0]         pg_delay,
  input  logic               scan_en,
  input  logic               scan_in,
  input  logic               scan_update,
  output logic               scan_out,
  output logic               all_done,
  output logic [NCORE-1:0]   core_halted,
  output logic [NCORE-1:0]   core_dnn_mode,
  output pulse_t [NCORE-1:0] core_pulse
);
  logic        dco_clk, clk;
  logic        cmd_valid, cmd_we, core_we;
  logic [23:0] cmd_addr;
  word_t       cmd_wdata, cmd_rdata, core_wdata;
  host_tgt_e   core_tgt;
  logic [15:0] core_addr;
  logic [NCORE-1:0] core_valid, core_running;
  word_t [NCORE-1:0] core_rdata;

  dco u_dco (.en(dco_en), .code(dco_code), .clk_out(dco_clk));
  assign clk = dco_en ? dco_clk : ext_clk;

  scan_io u_scan (
    .clk, .rst_n, .scan_en, .scan_in, .scan_update, .scan_out,
    .cmd_valid, .cmd_we, .cmd_addr, .cmd_wdata, .cmd_rdata
  );

  top_control #(.NCORE(NCORE)) u_ctl (
    .cmd_valid, .cmd_we, .cmd_addr, .cmd_wdata, .cmd_rdata,
    .core_valid, .core_we, .core_tgt, .core_addr, .core_wdata,
    .core_rdata, .core_halted, .core_running, .all_done
  );

  for (genvar i = 0; i < NCORE; i++) begin : g_core
    gpcim_core u_core (
      .clk, .rst_n, .host_valid(core_valid[i]), .host_we(core_we), .host_tgt(core_tgt),
      .host_addr(core_addr), .host_wdata(core_wdata), .host_rdata(core_rdata[i]),
      .pg_delay, .pulse(core_pulse[i]), .halted(core_halted[i]),
      .running(core_running[i]), .dnn_mode(core_dnn_mode[i])
    );
  end
endmodule

// gpcim_core: one GPCIM core: instruction cache, weight SRAM, the bottom (CPU) controller, the
// top (DNN) controller and the CIM macro. In vector CPU mode the bottom controller runs the
// program: DAMEM and DOMEM act as data cache and register file and the four CCUs as ALUs. A
// SWITCH instruction hands the macro to the top controller, which runs a DNN layer directly on
// the activations the program left in DAMEM and leaves its results in DOMEM, where the program
// picks them up after switching back. No data moves between the modes.
//
// Host port (scan path), word access while the core is idle:
//   TGT_ICACHE addr[9:0] instruction word
//   TGT_WSRAM  addr[9:3] weight entry, addr[2:0] 32-bit word (weights 4w..4w+3)
//   TGT_DAMEM  addr[5:2] vector register, addr[1:0] lane
//   TGT_DOMEM  addr[8:2] vector register, addr[1:0] lane
//   TGT_CTRL   write addr 0: start at PC 0 (also while running is ignored);
//              read addr 0: {dnn_mode, running, halted}, addr 1: PC
// Reads are combinational, writes take effect at the rising edge. The host map is this design's.
module gpcim_core
  import gpcim_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       host_valid,
  input  logic       host_we,
  input  host_tgt_e  host_tgt,
  input  logic [15:0] host_addr,
  input  word_t      host_wdata,
  output word_t      host_rdata,
  input  logic [3:0] pg_delay,
  output pulse_t     pulse,
  output logic       halted,
  output logic       running,
  output logic       dnn_mode
);
  cpu_ctl_t   cc;
  dnn_ctl_t   dc;
  word_t [N_CSR-1:0] csr;
  word_t      scalar_a, mac_host_rdata;
  vec_t       result;
  logic [9:0] ic_addr, pc;
  logic [31:0] ic_rdata;
  logic [6:0] ws_addr;
  logic [WS_WIDTH-1:0] ws_rdata;
  logic       dnn_start, dnn_done, dnn_busy, start, idle, hw;

  assign idle  = !running;
  assign hw    = host_valid && host_we;
  assign start = hw && host_tgt == TGT_CTRL && host_addr == 16'd0;

  icache u_icache (
    .clk, .raddr(idle ? host_addr[9:0] : ic_addr), .rdata(ic_rdata),
    .we(idle && hw && host_tgt == TGT_ICACHE), .waddr(host_addr[9:0]), .wdata(host_wdata)
  );

  weight_sram u_wsram (
    .clk, .raddr(idle ? host_addr[9:3] : ws_addr), .rdata(ws_rdata),
    .we(idle && hw && host_tgt == TGT_WSRAM), .waddr(host_addr[9:3]), .wword(host_addr[2:0]),
    .wdata(host_wdata)
  );

  bot_cim_ctrl u_bot (
    .clk, .rst_n, .start, .ic_addr, .ic_rdata, .scalar_a, .result, .cc,
    .dnn_mode, .dnn_start, .dnn_done, .csr, .running, .halted, .pc
  );

  top_cim_ctrl u_top (
    .clk, .rst_n, .start(dnn_start), .csr, .ws_addr, .ws_rdata, .dc,
    .busy(dnn_busy), .done(dnn_done)
  );

  gpcim_macro u_macro (
    .clk, .rst_n, .dnn_mode, .cc, .dc,
    .host_en(idle), .host_we(hw && (host_tgt == TGT_DAMEM || host_tgt == TGT_DOMEM)),
    .host_sel(host_tgt == TGT_DOMEM), .host_row(host_addr[8:2]), .host_lane(host_addr[1:0]),
    .host_wdata, .host_rdata(mac_host_rdata), .pg_delay, .pulse, .scalar_a, .result
  );

  always_comb begin
    unique case (host_tgt)
      TGT_ICACHE: host_rdata = ic_rdata;
      TGT_WSRAM:  host_rdata = ws_rdata[32*host_addr[2:0] +: 32];
      TGT_DAMEM, TGT_DOMEM: host_rdata = mac_host_rdata;
      default:    host_rdata = (host_addr == 16'd1) ? word_t'(pc)
                             : word_t'({dnn_mode, running, halted});
    endcase
  end
endmodule

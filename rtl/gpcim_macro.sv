// gpcim_macro: the compute-in-memory macro of one core: the DAMEM activation array on top, the
// DOMEM output array below, the four CCUs between them, the operand latches (sense-amplifier
// latch and buffer) and the mode multiplexing that lets the same hardware act as a DNN
// accelerator or as a four-lane vector CPU datapath.
//
// CPU mode (`dnn_mode` = 0), driven by the bottom controller through `cc`: R0 is read from
// DAMEM or DOMEM port A (or is an immediate, or a scalar = lane 0 broadcast), R1 from DAMEM or
// DOMEM port B; both are captured in latches at the falling clock edge (latch-update phase),
// the CCUs execute in the low half-cycle and the result is written to DAMEM or DOMEM at the
// next rising edge (write-back phase). A third latch captures DOMEM port A as the VMERGE mask.
// DNN mode, driven by the top controller through `dc`: the weight bits drive the DAMEM rows,
// the in-cell products flow over the DOUT lines straight into the CCU adder trees, the partial
// sum of the output row is read through DOMEM port A into the third latch, and the four lane
// results are written to one DOMEM row. The word lines of DAMEM are held low in CPU mode.
// `host_*` gives the scan path word access to both arrays while the core is idle; it has
// priority over both controllers. The pulse generator model runs alongside and shows the
// in-cycle phases on `pulse`.
module gpcim_macro
  import gpcim_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       dnn_mode,
  input  cpu_ctl_t   cc,
  input  dnn_ctl_t   dc,
  // host word access
  input  logic       host_en,
  input  logic       host_we,
  input  logic       host_sel,    // 0 = DAMEM, 1 = DOMEM
  input  logic [6:0] host_row,    // vector register
  input  logic [1:0] host_lane,
  input  word_t      host_wdata,
  output word_t      host_rdata,
  // pulse generator
  input  logic [3:0] pg_delay,
  output pulse_t     pulse,
  // to the controller
  output word_t      scalar_a,    // latched R0, lane 0
  output vec_t       result
);
  vec_t da_rd, do_a, do_b, a_raw, b_raw, a_q, b_q, m_q;
  logic [DA_ROWS-1:0][DA_COLS-1:0] dout;
  logic [LANES-1:0] mask, host_lane_oh;

  // ---------------- arrays ----------------
  logic        da_we, do_we;
  logic [3:0]  da_raddr, da_waddr;
  logic [6:0]  do_raddr_a, do_raddr_b, do_waddr;
  logic [LANES-1:0] da_lane, do_lane;
  vec_t        wdata;

  always_comb begin
    host_lane_oh = '0;
    host_lane_oh[host_lane] = 1'b1;

    da_raddr   = host_en ? host_row[3:0] : cc.da_addr;
    do_raddr_a = dnn_mode ? dc.psum_addr : cc.do_addr_a;
    do_raddr_b = host_en ? host_row : cc.do_addr_b;

    wdata      = host_en ? {LANES{host_wdata}} : result;
    da_we      = host_en ? (host_we && !host_sel) : (!dnn_mode && cc.wr_en && cc.wr_loc == LOC_DAMEM);
    da_waddr   = host_en ? host_row[3:0] : cc.wr_addr[3:0];
    da_lane    = host_en ? host_lane_oh : cc.wr_lane;
    do_we      = host_en ? (host_we && host_sel)
                         : (dnn_mode ? dc.wr_en : (cc.wr_en && cc.wr_loc == LOC_DOMEM));
    do_waddr   = host_en ? host_row : (dnn_mode ? dc.wr_addr : cc.wr_addr);
    do_lane    = host_en ? host_lane_oh : (dnn_mode ? dc.wr_lane : cc.wr_lane);
  end

  damem u_damem (
    .clk, .raddr(da_raddr), .rdata(da_rd),
    .we(da_we), .waddr(da_waddr), .lane_we(da_lane), .wdata,
    .wl_weight(dnn_mode ? dc.wl_weight : '0), .dout
  );

  domem u_domem (
    .clk, .raddr_a(do_raddr_a), .rdata_a(do_a), .raddr_b(do_raddr_b), .rdata_b(do_b),
    .we(do_we), .waddr(do_waddr), .lane_we(do_lane), .wdata
  );

  assign host_rdata = host_sel ? do_b[host_lane] : da_rd[host_lane];

  // ---------------- operand selection and latches ----------------
  always_comb begin
    if (cc.a_imm_en)      a_raw = {LANES{cc.a_imm}};
    else if (cc.a_src)    a_raw = do_a;
    else                  a_raw = da_rd;
    if (cc.a_scalar)      a_raw = {LANES{a_raw[0]}};
    b_raw = cc.b_src ? do_b : da_rd;
  end

  latch_buffer #(.W(LANES*XLEN)) u_lat_a (
    .clk, .rst_n, .en(!dnn_mode && cc.lat_a_en), .d(a_raw), .q(a_q));
  latch_buffer #(.W(LANES*XLEN)) u_lat_b (
    .clk, .rst_n, .en(!dnn_mode && cc.lat_b_en), .d(b_raw), .q(b_q));
  latch_buffer #(.W(LANES*XLEN)) u_lat_m (
    .clk, .rst_n, .en(dnn_mode ? dc.lat_m_en : cc.lat_m_en), .d(do_a), .q(m_q));

  for (genvar k = 0; k < LANES; k++) begin : g_mask
    assign mask[k] = m_q[k][0];
  end
  assign scalar_a = a_q[0];

  // ---------------- central compute units ----------------
  ccu u_ccu (
    .clk, .rst_n, .dnn_mode, .op(cc.op), .ext_sel(cc.ext_sel), .mul_step(cc.mul_step),
    .a(a_q), .b(b_q), .mask, .dout, .bank(dc.bank),
    .dnn_first(dc.first), .dnn_step(dc.step), .dnn_neg(dc.neg),
    .acc_en(dc.acc_en), .relu_en(dc.relu_en), .shift(dc.shift), .psum(m_q), .result
  );

  pulse_generator u_pg (.clk, .en(1'b1), .delay_code(pg_delay), .p(pulse));
endmodule

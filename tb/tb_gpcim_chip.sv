// tb_gpcim_chip: end-to-end test of the four-core chip at its default size, driven only through
// the scan port. It broadcasts the test program and the weights to all cores, gives every core
// its own random DAMEM/DOMEM contents, starts all cores with one broadcast command, runs them on
// the on-chip DCO clock, waits for all_done, switches back to the external clock, reads every
// data word of every core back over the scan port and compares with one reference model per
// core (data and run time). It also counts, on core 0, how often each mechanism of the design
// occurred (mode switches both ways, multi-cycle multiply, VMERGE, two-DAMEM-source stall, taken
// branch flush, PCS, scalar and immediate operands, partial-sum accumulation, ReLU clipping,
// lane gating, CSR writes, halt) and counts a failure for any that never did.
module tb_gpcim_chip;
  import gpcim_pkg::*;
  import gpcim_ref_pkg::*;

  logic ext_clk = 1'b0, rst_n = 1'b0, dco_en = 1'b0;
  logic scan_en = 1'b0, scan_in = 1'b0, scan_update = 1'b0, scan_out, all_done;
  logic [3:0] core_halted, core_dnn_mode;
  pulse_t [3:0] core_pulse;
  int checks = 0, failures = 0;

  gpcim_chip dut (.ext_clk, .rst_n, .dco_en, .dco_code(4'd2), .pg_delay(4'd0), .scan_en,
                  .scan_in, .scan_update, .scan_out, .all_done, .core_halted, .core_dnn_mode,
                  .core_pulse);

  always #5 ext_clk = ~ext_clk;
  initial begin
    #20_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------- mechanism counters on core 0 ----------------
  typedef enum int {EV_TO_DNN, EV_TO_CPU, EV_MUL, EV_MERGE, EV_DBL, EV_TAKEN, EV_PCS, EV_SCALAR,
                    EV_IMM, EV_PSUM, EV_RELU, EV_GATED, EV_CSR, EV_HALT, EV_DCO, EV_N} ev_e;
  int ev [EV_N];
  logic prev_dnn = 1'b0;
  always @(posedge dut.clk) if (rst_n) begin
    if (dut.g_core[0].u_core.u_bot.dnn_start) ev[EV_TO_DNN]++;
    if (prev_dnn && !core_dnn_mode[0]) ev[EV_TO_CPU]++;
    prev_dnn <= core_dnn_mode[0];
    if (dut.g_core[0].u_core.u_bot.last) begin
      case (dut.g_core[0].u_core.u_bot.ir.op)
        OP_VMUL, OP_VMULH: ev[EV_MUL]++;
        OP_VMERGE: ev[EV_MERGE]++;
        OP_PCS: ev[EV_PCS]++;
        OP_MVCSR: ev[EV_CSR]++;
        default: ;
      endcase
      if (dut.g_core[0].u_core.u_bot.dbl) ev[EV_DBL]++;
      if (dut.g_core[0].u_core.u_bot.cc.a_scalar) ev[EV_SCALAR]++;
      if (dut.g_core[0].u_core.u_bot.ir.r0[7] && dut.g_core[0].u_core.u_bot.r0_mem == 1'b0)
        ev[EV_IMM]++;
      if (dut.g_core[0].u_core.u_bot.taken &&
          dut.g_core[0].u_core.u_bot.target != dut.g_core[0].u_core.u_bot.ex_pc) ev[EV_TAKEN]++;
    end
    if (dut.g_core[0].u_core.u_top.dc.wr_en && core_dnn_mode[0]) begin
      if (dut.g_core[0].u_core.u_top.dc.acc_en) ev[EV_PSUM]++;
      if (dut.g_core[0].u_core.u_top.dc.wr_lane != 4'hF) ev[EV_GATED]++;
      for (int k = 0; k < 3; k++)
        if (dut.g_core[0].u_core.u_macro.result[k] == '0 &&
            dut.g_core[0].u_core.u_top.dc.relu_en) ev[EV_RELU]++;
    end
    if (dco_en) ev[EV_DCO]++;
  end
  always @(posedge core_halted[0]) if (rst_n) ev[EV_HALT]++;

  // ---------------- scan access ----------------
  task automatic scan_cmd(input logic we, input logic [23:0] addr, input word_t data,
                          output word_t rdata);
    logic [56:0] f = {we, addr, data};
    for (int i = 56; i >= 0; i--) begin
      @(negedge dut.clk); scan_en = 1'b1; scan_in = f[i];
    end
    @(negedge dut.clk); scan_en = 1'b0; scan_update = 1'b1;
    @(negedge dut.clk); scan_update = 1'b0;
    @(negedge dut.clk);
    for (int i = 31; i >= 0; i--) begin
      rdata[i] = scan_out;
      scan_en = 1'b1;
      @(negedge dut.clk);
    end
    scan_en = 1'b0;
  endtask

  function automatic logic [23:0] adr(input int core, input logic bc, input host_tgt_e t, input int idx);
    return {2'(core), bc, 3'(t), 2'b00, 16'(idx)};
  endfunction

  task automatic wr(input int core, input logic bc, input host_tgt_e t, input int idx, input word_t d);
    word_t dummy;
    scan_cmd(1'b1, adr(core, bc, t, idx), d, dummy);
  endtask

  task automatic rd(input int core, input host_tgt_e t, input int idx, output word_t d);
    scan_cmd(1'b0, adr(core, 1'b0, t, idx), '0, d);
  endtask

  initial begin
    ref_core m [4];
    logic [31:0] prog [];
    word_t v;
    int run_cycles;
    localparam int NOUT = 4;
    test_program(prog, NOUT, 0);
    repeat (3) @(negedge ext_clk);
    rst_n = 1'b1;
    for (int c = 0; c < 4; c++) m[c] = new();
    // broadcast program and weights
    foreach (prog[k]) wr(0, 1'b1, TGT_ICACHE, k, prog[k]);
    for (int e = 0; e < NOUT; e++)
      for (int w = 0; w < 8; w++) begin
        v = $urandom;
        for (int c = 0; c < 4; c++) m[c].ws[e][32*w +: 32] = v;
        wr(0, 1'b1, TGT_WSRAM, 8 * e + w, v);
      end
    // per-core data; DOMEM rows 0..71 used by the program, the rest cleared by broadcast
    for (int c = 0; c < 4; c++) begin
      for (int r = 0; r < DA_VREGS; r++)
        for (int l = 0; l < LANES; l++) begin
          v = $urandom; m[c].da[r][l] = v; wr(c, 1'b0, TGT_DAMEM, 4 * r + l, v);
        end
      for (int r = 0; r < 72; r++)
        for (int l = 0; l < LANES; l++) begin
          v = (r == 58 && l == 0) ? '0 : $urandom;
          m[c].dm[r][l] = v; wr(c, 1'b0, TGT_DOMEM, 4 * r + l, v);
        end
    end
    for (int r = 72; r < DO_ROWS; r++)
      for (int l = 0; l < LANES; l++) begin
        for (int c = 0; c < 4; c++) m[c].dm[r][l] = '0;
        wr(0, 1'b1, TGT_DOMEM, 4 * r + l, '0);
      end
    for (int c = 0; c < 4; c++) chk(m[c].run(prog) > 0, "reference halts");

    // run on the DCO clock
    @(negedge ext_clk); #1;
    dco_en = 1'b1;
    @(negedge dut.clk);
    scan_update = 1'b0;
    begin
      logic [56:0] f;
      f = {1'b1, adr(0, 1'b1, TGT_CTRL, 0), 32'd1};
      for (int i = 56; i >= 0; i--) begin
        @(negedge dut.clk); scan_en = 1'b1; scan_in = f[i];
      end
      @(negedge dut.clk); scan_en = 1'b0; scan_update = 1'b1;
      @(negedge dut.clk); scan_update = 1'b0;
    end
    run_cycles = 0;
    while (!all_done) begin
      @(posedge dut.clk);
      #1;
      run_cycles++;
      if (run_cycles > 100000) break;
    end
    chk(all_done, "all cores halted");
    // start command issues at the update edge; cores then run m.cycles cycles
    chk(run_cycles == m[0].cycles + 1, $sformatf("run %0d cycles, expected %0d", run_cycles, m[0].cycles + 1));
    @(negedge dut.clk);
    wait (!ext_clk); #1;
    dco_en = 1'b0;

    rd(0, TGT_CTRL, 0, v);
    v = '0;
    scan_cmd(1'b0, {2'd0, 1'b0, 3'd7, 18'd0}, '0, v);
    chk(v[3:0] == 4'hF && v[7:4] == 4'h0, $sformatf("chip status %h", v));
    for (int c = 0; c < 4; c++) begin
      for (int r = 0; r < DA_VREGS; r++)
        for (int l = 0; l < LANES; l++) begin
          rd(c, TGT_DAMEM, 4 * r + l, v);
          chk(v == m[c].da[r][l], $sformatf("core %0d DAMEM v%0d.%0d got %h exp %h", c, r, l, v, m[c].da[r][l]));
        end
      for (int r = 0; r < DO_ROWS; r++)
        for (int l = 0; l < LANES; l++) begin
          rd(c, TGT_DOMEM, 4 * r + l, v);
          chk(v == m[c].dm[r][l], $sformatf("core %0d DOMEM %0d.%0d got %h exp %h", c, r, l, v, m[c].dm[r][l]));
        end
    end
    for (int e = 0; e < EV_N; e++) begin
      ev_e x;
      x = ev_e'(e);
      $display("mechanism %s happened %0d times", x.name(), ev[e]);
      chk(ev[e] > 0, $sformatf("mechanism %s never happened", x.name()));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

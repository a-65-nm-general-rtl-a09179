// tb_gpcim_macro: the CIM macro with both controllers replaced by the testbench. Loads random
// data through the host port and reads it back; runs CPU-mode instructions by driving the
// control bundle for one cycle each (vector, scalar and immediate R0; R1 from DAMEM and DOMEM;
// results to both arrays) and checks the written rows; runs one DNN output channel (eight weight
// bit planes on bank 1, then the partial-sum write-back step) and checks the DOMEM row against a
// dot product computed from the loaded data; checks that the pulse generator runs.
module tb_gpcim_macro;
  import gpcim_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, dnn_mode = 1'b0;
  cpu_ctl_t cc = '0;
  dnn_ctl_t dc = '0;
  logic host_en = 1'b1, host_we = 1'b0, host_sel = 1'b0;
  logic [6:0] host_row = '0;
  logic [1:0] host_lane = '0;
  word_t host_wdata = '0, host_rdata, scalar_a;
  pulse_t pulse;
  vec_t result;
  vec_t da [DA_VREGS];
  vec_t dm [DO_ROWS];
  int checks = 0, failures = 0, wb_pulses = 0;

  gpcim_macro dut (.clk, .rst_n, .dnn_mode, .cc, .dc, .host_en, .host_we, .host_sel, .host_row,
                   .host_lane, .host_wdata, .host_rdata, .pg_delay(4'd0), .pulse, .scalar_a,
                   .result);

  always #5 clk = ~clk;
  always @(posedge pulse.wb_en) wb_pulses++;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic hwr(input logic sel, input int row, input int lane, input word_t d);
    @(negedge clk);
    host_en = 1'b1; host_we = 1'b1; host_sel = sel; host_row = 7'(row); host_lane = 2'(lane);
    host_wdata = d;
    @(negedge clk);
    host_we = 1'b0;
  endtask

  task automatic hrd(input logic sel, input int row, input int lane, output word_t d);
    host_sel = sel; host_row = 7'(row); host_lane = 2'(lane);
    #1 d = host_rdata;
  endtask

  task automatic hchk(input logic sel, input int row, input int lane, input word_t exp,
                      input string what);
    word_t d;
    hrd(sel, row, lane, d);
    chk(d == exp, what);
  endtask

  // one CPU instruction: R0 (kind, loc, addr), R1 (loc, addr) -> RD (loc, addr)
  task automatic cpu_op(input opcode_e op, input logic r0_loc, input int r0, input logic imm,
                        input word_t imm_v, input logic sca, input logic r1_loc, input int r1,
                        input logic rd_loc, input int rd);
    @(posedge clk); #1;
    host_en = 1'b0;
    cc = '0;
    cc.op = op;
    cc.da_addr = (r0_loc == LOC_DAMEM && !imm) ? 4'(r0) : 4'(r1);
    cc.do_addr_a = 7'(r0); cc.do_addr_b = 7'(r1);
    cc.a_src = r0_loc; cc.a_imm_en = imm; cc.a_imm = imm_v; cc.a_scalar = sca;
    cc.b_src = r1_loc; cc.lat_a_en = 1'b1; cc.lat_b_en = 1'b1;
    cc.wr_en = 1'b1; cc.wr_loc = rd_loc; cc.wr_lane = 4'hF; cc.wr_addr = 7'(rd);
    @(posedge clk); #1;
    cc = '0;
    host_en = 1'b1;
  endtask

  initial begin
    vec_t x, y, e;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < DA_VREGS; r++)
      for (int l = 0; l < LANES; l++) begin da[r][l] = $urandom; hwr(LOC_DAMEM, r, l, da[r][l]); end
    for (int r = 0; r < 32; r++)
      for (int l = 0; l < LANES; l++) begin dm[r][l] = $urandom; hwr(LOC_DOMEM, r, l, dm[r][l]); end
    @(negedge clk);
    for (int r = 0; r < DA_VREGS; r++)
      for (int l = 0; l < LANES; l++) hchk(LOC_DAMEM, r, l, da[r][l], "DAMEM host readback");
    for (int r = 0; r < 32; r++)
      for (int l = 0; l < LANES; l++) hchk(LOC_DOMEM, r, l, dm[r][l], "DOMEM host readback");

    // VADD O9 = D2 + O3
    cpu_op(OP_VADD, LOC_DOMEM, 3, 1'b0, '0, 1'b0, LOC_DAMEM, 2, LOC_DOMEM, 9);
    for (int l = 0; l < LANES; l++) dm[9][l] = da[2][l] + dm[3][l];
    // VSUB D5 = O4 - scalar(D1)
    cpu_op(OP_VSUB, LOC_DAMEM, 1, 1'b0, '0, 1'b1, LOC_DOMEM, 4, LOC_DAMEM, 5);
    for (int l = 0; l < LANES; l++) da[5][l] = dm[4][l] - da[1][0];
    // VXOR O10 = O9 ^ imm
    cpu_op(OP_VXOR, LOC_DOMEM, 0, 1'b1, 32'hFFFF_FFF3, 1'b0, LOC_DOMEM, 9, LOC_DOMEM, 10);
    for (int l = 0; l < LANES; l++) dm[10][l] = dm[9][l] ^ 32'hFFFF_FFF3;
    @(negedge clk);
    for (int l = 0; l < LANES; l++) begin
      hchk(LOC_DOMEM, 9, l, dm[9][l], "VADD result");
      hchk(LOC_DAMEM, 5, l, da[5][l], "VSUB scalar result");
      hchk(LOC_DOMEM, 10, l, dm[10][l], "VXOR immediate result");
    end

    // DNN: one channel, bank 1, weights w, partial sum from O20, lanes 0..3
    begin
      logic signed [7:0] w [DA_ROWS];
      int expd [LANES];
      for (int r = 0; r < DA_ROWS; r++) w[r] = 8'($urandom);
      for (int k = 0; k < LANES; k++) begin
        expd[k] = int'(dm[20][k]);
        for (int r = 0; r < DA_ROWS; r++)
          expd[k] += int'(w[r]) * int'($signed(da[r/2][2*(r%2) + 1][8*k +: 8]));
      end
      @(posedge clk); #1;
      host_en = 1'b0; dnn_mode = 1'b1;
      dc = '0; dc.bank = 1'b1; dc.acc_en = 1'b1;
      for (int bi = 7; bi >= 0; bi--) begin
        for (int r = 0; r < DA_ROWS; r++) dc.wl_weight[r] = w[r][bi];
        dc.first = (bi == 7); dc.neg = (bi == 7); dc.step = 1'b1;
        @(posedge clk); #1;
      end
      dc.step = 1'b0; dc.first = 1'b0; dc.neg = 1'b0; dc.wl_weight = '0;
      dc.psum_addr = 7'd20; dc.lat_m_en = 1'b1; dc.wr_en = 1'b1; dc.wr_addr = 7'd20;
      dc.wr_lane = 4'hF;
      @(posedge clk); #1;
      dc = '0; dnn_mode = 1'b0; host_en = 1'b1;
      @(negedge clk);
      for (int k = 0; k < LANES; k++)
        hchk(LOC_DOMEM, 20, k, word_t'(expd[k]), $sformatf("DNN lane %0d", k));
    end
    chk(wb_pulses > 10, "pulse generator write-back pulses");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

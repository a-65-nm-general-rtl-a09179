// tb_bot_cim_ctrl: the CPU-mode controller running a fixed ten-word program from an instruction
// memory model, with the CCU result and scalar operand driven by the testbench (the branch
// condition is always true, the scalar is 3). A monitor checks cycle by cycle, counted from the
// start: the fetch address; one cycle for VADD, four for VMUL with multiply steps 0..3, one
// extra cycle (R1 first) for two DAMEM sources, two for VMERGE with the mask read from DOMEM row 0
// in the second cycle, the CSR write of MVCSR, a taken branch with one bubble and the skipped
// word never executed, PCS writing its resume address to lane 0 only, the two SWITCH cycles,
// DNN mode until the done pulse and resumption at the PCS address, the VMVI immediate, and the
// halt on a branch to itself. The run is done twice to check restart.
module tb_bot_cim_ctrl;
  import gpcim_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, dnn_done = 1'b0;
  logic [9:0] ic_addr, pc;
  logic [31:0] imem [16];
  word_t scalar_a = 32'd3;
  vec_t result = '{default: 32'd1};
  cpu_ctl_t cc;
  logic dnn_mode, dnn_start, running, halted;
  word_t [N_CSR-1:0] csr;
  int checks = 0, failures = 0, c = -1, dnn_seen = 0, halt_cycle = -1, resume_cycle = -1;

  bot_cim_ctrl dut (.clk, .rst_n, .start, .ic_addr, .ic_rdata(imem[ic_addr[3:0]]), .scalar_a,
                    .result, .cc, .dnn_mode, .dnn_start, .dnn_done, .csr, .running, .halted, .pc);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL cycle %0d: %s", c, what); end
  endtask

  // expected fetch address in cycles 0..15 (x = don't care while holding)
  int fetch_exp [16] = '{0, 1, 2, 2, 2, 2, 3, 3, 4, 4, 5, 6, 7, 8, 9, 9};

  // monitor: values during cycle c (sampled at the falling edge)
  always @(negedge clk) if (c >= 0) begin
    if (c < 16) chk(ic_addr == 10'(fetch_exp[c]) || (c >= 2 && c <= 4) || c == 6 || c == 8,
                    $sformatf("fetch address %0d", ic_addr));
    unique case (c)
      1:  chk(cc.wr_en && cc.wr_loc == LOC_DOMEM && cc.wr_addr == 7'd1 && cc.op == OP_VADD &&
              cc.lat_a_en && cc.lat_b_en && cc.a_src == LOC_DOMEM && cc.do_addr_a == 7'd3 &&
              cc.b_src == LOC_DAMEM && cc.da_addr == 4'd2, "VADD: 1 cycle");
      2, 3, 4:
          chk(!cc.wr_en && cc.op == OP_VMUL && cc.mul_step == 2'(c - 2), "VMUL step");
      5:  chk(cc.wr_en && cc.op == OP_VMUL && cc.mul_step == 2'd3 && cc.wr_addr == 7'd4,
              "VMUL: 4 cycles");
      6:  chk(!cc.wr_en && cc.da_addr == 4'd3 && cc.lat_b_en && !cc.lat_a_en,
              "double DAMEM: R1 in the first cycle");
      7:  chk(cc.wr_en && cc.da_addr == 4'd2 && cc.lat_a_en && !cc.lat_b_en &&
              cc.wr_loc == LOC_DAMEM && cc.wr_addr == 7'd1, "double DAMEM: R0 in the second");
      8:  chk(!cc.wr_en && !cc.lat_m_en && cc.op == OP_VMERGE, "VMERGE first cycle");
      9:  chk(cc.wr_en && cc.lat_m_en && cc.do_addr_a == 7'd0 && cc.wr_addr == 7'd7,
              "VMERGE: mask from DOMEM row 0, 2 cycles");
      10: chk(!cc.wr_en && cc.a_scalar && cc.op == OP_MVCSR, "MVCSR uses a scalar");
      11: chk(!cc.wr_en && csr[1] == 32'd3 && cc.op == OP_BEQ, "CSR written; branch cycle");
      12: chk(!cc.wr_en && ic_addr == 10'd7, "branch bubble, fetch target");
      13: chk(cc.wr_en && cc.op == OP_PCS && cc.wr_lane == 4'b0001 && cc.a_imm == 32'd9 &&
              cc.wr_addr == 7'd8, "PCS writes resume address 9 to lane 0");
      14: chk(!cc.wr_en && cc.op == OP_SWITCH && !dnn_mode, "SWITCH first cycle");
      15: chk(!cc.wr_en && cc.op == OP_SWITCH && !dnn_mode && !dnn_start, "SWITCH second cycle");
      16: chk(dnn_mode && dnn_start && running, "DNN mode entered");
      default: ;
    endcase
    if (cc.wr_en) chk(cc.wr_addr != 7'd11, "skipped word must not execute");
    if (cc.wr_en && cc.op == OP_VMVI)
      chk(cc.a_imm == 32'hFFFF_8123 && c == resume_cycle + 1, "VMVI immediate after resume");
    if (dnn_mode) dnn_seen++;
    if (halted && halt_cycle < 0) halt_cycle = c;
    if (resume_cycle < 0 && c > 16 && !dnn_mode) begin
      resume_cycle = c;
      chk(ic_addr == 10'd9, "resume at the PCS address");
    end
  end

  initial begin
    imem = '{default: 32'h0};
    imem[0] = enc(LOC_DOMEM, LOC_DAMEM, LOC_DOMEM, OP_VADD, 8'd3, 8'd2, 8'd1);
    imem[1] = enc(LOC_DOMEM, LOC_DOMEM, LOC_DOMEM, OP_VMUL, 8'd5, 8'd6, 8'd4);
    imem[2] = enc(LOC_DAMEM, LOC_DAMEM, LOC_DAMEM, OP_VADD, 8'd2, 8'd3, 8'd1);
    imem[3] = enc(LOC_DOMEM, LOC_DOMEM, LOC_DOMEM, OP_VMERGE, 8'd5, 8'd6, 8'd7);
    imem[4] = enc(LOC_DAMEM, LOC_DAMEM, LOC_DAMEM, OP_MVCSR, {R0_SCA, 6'd1}, 8'd0, 8'd1);
    imem[5] = enc(LOC_DOMEM, LOC_DOMEM, LOC_DAMEM, OP_BEQ, 8'd1, 8'd1, 8'd2);
    imem[6] = enc(LOC_DOMEM, LOC_DOMEM, LOC_DOMEM, OP_VADD, 8'd1, 8'd1, 8'd11);
    imem[7] = enc(LOC_DAMEM, LOC_DAMEM, LOC_DOMEM, OP_PCS, 8'd2, 8'd0, 8'd8);
    imem[8] = enc(LOC_DAMEM, LOC_DAMEM, LOC_DAMEM, OP_SWITCH, 8'd0, 8'd0, 8'd0);
    imem[9] = enc(LOC_DAMEM, LOC_DAMEM, LOC_DOMEM, OP_VMVI, 8'h81, 8'h23, 8'd12);
    imem[10] = enc(LOC_DOMEM, LOC_DOMEM, LOC_DAMEM, OP_BEQ, 8'd1, 8'd1, 8'd0);
    repeat (2) @(negedge clk);
    chk(!running && !halted && csr[CSR_TEN] == 32'hF, "reset state");
    rst_n = 1'b1;
    for (int run = 0; run < 2; run++) begin
      dnn_seen = 0; halt_cycle = -1; resume_cycle = -1;
      @(negedge clk);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      c = 0;
      // DNN controller stand-in: done five cycles after the start pulse
      while (!dnn_start) begin @(posedge clk); #1 c++; end
      repeat (4) begin @(posedge clk); #1 c++; end
      dnn_done = 1'b1;
      @(posedge clk); #1 c++;
      dnn_done = 1'b0;
      while (!halted && c < 100) begin @(posedge clk); #1 c++; end
      @(negedge clk); #1;  // let the monitor see the halted cycle
      chk(dnn_seen == 5, $sformatf("DNN mode for %0d cycles", dnn_seen));
      // after resume (fetch 9): VMVI, then the BEQ to itself halts
      chk(halt_cycle == resume_cycle + 3, $sformatf("halt at %0d, resume at %0d", halt_cycle,
                                                   resume_cycle));
      chk(halted && !running && !dnn_mode, "halted");
      c = -1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

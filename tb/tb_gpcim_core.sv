// tb_gpcim_core: loads random data into DAMEM, DOMEM and the weight SRAM and the shared test
// program into the instruction cache through the host port, starts the core, waits for it to
// halt, and compares every DAMEM and DOMEM word and the run time in cycles with the
// instruction-level reference model. The program covers every ALU instruction class, scalar and
// immediate operands, two DAMEM sources, a counted loop, CSR setup, PCS, SWITCH to DNN mode and
// back, and post-processing of the DNN results.
module tb_gpcim_core;
  import gpcim_pkg::*;
  import gpcim_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic host_valid = 1'b0, host_we = 1'b0;
  host_tgt_e host_tgt = TGT_CTRL;
  logic [15:0] host_addr = '0;
  word_t host_wdata = '0, host_rdata;
  pulse_t pulse;
  logic halted, running, dnn_mode;
  int checks = 0, failures = 0;
  int run_cycles = 0, dnn_cycles = 0;

  gpcim_core dut (.clk, .rst_n, .host_valid, .host_we, .host_tgt, .host_addr, .host_wdata,
                  .host_rdata, .pg_delay(4'd0), .pulse, .halted, .running, .dnn_mode);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (running) run_cycles++;
    if (dnn_mode) dnn_cycles++;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic hw(input host_tgt_e t, input int a, input word_t d);
    @(negedge clk);
    host_valid = 1'b1; host_we = 1'b1; host_tgt = t; host_addr = 16'(a); host_wdata = d;
    @(negedge clk);
    host_valid = 1'b0; host_we = 1'b0;
  endtask

  task automatic hr(input host_tgt_e t, input int a, output word_t d);
    @(negedge clk);
    host_valid = 1'b1; host_we = 1'b0; host_tgt = t; host_addr = 16'(a);
    #1 d = host_rdata;
    host_valid = 1'b0;
  endtask

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    ref_core m;
    logic [31:0] prog [];
    word_t v;
    int steps;
    m = new();
    test_program(prog, 3, 1);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < DA_VREGS; r++)
      for (int l = 0; l < LANES; l++) begin
        v = (l % 2) ? $urandom : $urandom & 32'h7FFF_FFFF;
        m.da[r][l] = v; hw(TGT_DAMEM, 4 * r + l, v);
      end
    for (int r = 0; r < 80; r++)
      for (int l = 0; l < LANES; l++) begin
        v = (r == 58 && l == 0) ? '0 : $urandom;
        m.dm[r][l] = v; hw(TGT_DOMEM, 4 * r + l, v);
      end
    for (int r = 80; r < DO_ROWS; r++) m.dm[r] = '0;
    for (int r = 80; r < DO_ROWS; r++) for (int l = 0; l < LANES; l++) hw(TGT_DOMEM, 4 * r + l, '0);
    for (int e = 0; e < 8; e++)
      for (int w = 0; w < 8; w++) begin
        v = $urandom; m.ws[e][32*w +: 32] = v; hw(TGT_WSRAM, 8 * e + w, v);
      end
    foreach (prog[k]) hw(TGT_ICACHE, k, prog[k]);
    steps = m.run(prog);
    chk(steps > 0, "reference program halts");

    hw(TGT_CTRL, 0, 32'd1);   // start
    wait (halted);
    @(negedge clk);
    chk(run_cycles == m.cycles, $sformatf("run time %0d cycles, expected %0d", run_cycles, m.cycles));
    chk(dnn_cycles == 9 * 3 + 2, $sformatf("DNN mode %0d cycles, expected 9 per channel + 2", dnn_cycles));
    for (int r = 0; r < DA_VREGS; r++)
      for (int l = 0; l < LANES; l++) begin
        hr(TGT_DAMEM, 4 * r + l, v);
        chk(v == m.da[r][l], $sformatf("DAMEM v%0d lane %0d got %h exp %h", r, l, v, m.da[r][l]));
      end
    for (int r = 0; r < DO_ROWS; r++)
      for (int l = 0; l < LANES; l++) begin
        hr(TGT_DOMEM, 4 * r + l, v);
        chk(v == m.dm[r][l], $sformatf("DOMEM row %0d lane %0d got %h exp %h", r, l, v, m.dm[r][l]));
      end
    hr(TGT_CTRL, 0, v);
    chk(v[0] && !v[1], "status halted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

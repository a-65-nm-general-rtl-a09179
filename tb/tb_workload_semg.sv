// tb_workload_semg: the CPU-side workload of the hand-gesture demonstration, run on one core:
// four time-domain features of surface-EMG channels (mean, variance, slope sign change count and
// a four-bin amplitude histogram) over a window of W = 32 samples, six channels. A core has four
// 32-bit lanes, so the six channels run as two passes of four lanes (channels 0-3, then 4-5 with
// two spare lanes). The samples (random signed 12-bit values) sit in DOMEM rows 8..39, one row
// per time step and one lane per channel; the program is straight-line code generated here,
// because the instruction set has no indirect addressing, and it ends with a branch to itself.
// Each pass is checked word by word against features computed directly from the samples in the
// testbench, and the run time against the cycle count of the instruction-level reference model.
// The six channels and four features follow the demonstration; the window length, sample width,
// histogram thresholds and integer formulas (mean = sum >>> 5, variance = (sum of squares >>> 5)
// - mean^2, slope sign change where the product of successive differences is negative) are
// this testbench's choices.
module tb_workload_semg;
  import gpcim_pkg::*;
  import gpcim_ref_pkg::*;

  localparam int W = 32;       // window length (samples)
  localparam int X0 = 8;       // DOMEM row of the first sample
  localparam int NCH = 6;
  localparam logic L_DA = LOC_DAMEM, L_DO = LOC_DOMEM;

  logic clk = 1'b0, rst_n = 1'b0;
  logic host_valid = 1'b0, host_we = 1'b0;
  host_tgt_e host_tgt = TGT_CTRL;
  logic [15:0] host_addr = '0;
  word_t host_wdata = '0, host_rdata;
  pulse_t pulse;
  logic halted, running, dnn_mode;
  int checks = 0, failures = 0, run_cycles = 0;
  int samples [NCH][W];

  gpcim_core dut (.clk, .rst_n, .host_valid, .host_we, .host_tgt, .host_addr, .host_wdata,
                  .host_rdata, .pg_delay(4'd0), .pulse, .halted, .running, .dnn_mode);

  always #5 clk = ~clk;
  always @(posedge clk) if (running) run_cycles++;
  initial begin
    repeat (200000) @(posedge clk);
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

  function automatic logic [7:0] vr(input int r); return 8'(r); endfunction      // vector
  function automatic logic [7:0] im(input int v); return {1'b1, 7'(v)}; endfunction // imm7

  // DAMEM registers: 0 sum/mean, 1 sum of squares/variance, 2 SSC count, 3-5 counts x < T,
  // 6-7 scratch, 8 previous difference, 9 current difference, 10-12 thresholds
  function automatic void build(ref logic [31:0] p [$]);
    p.delete();
    for (int r = 0; r <= 5; r++) p.push_back(enc(L_DA, L_DA, L_DA, OP_VMVI, 8'h00, 8'h00, vr(r)));
    p.push_back(enc(L_DA, L_DA, L_DA, OP_VMVI, 8'hFF, 8'h00, vr(10)));   // -256
    p.push_back(enc(L_DA, L_DA, L_DA, OP_VMVI, 8'h00, 8'h00, vr(11)));   // 0
    p.push_back(enc(L_DA, L_DA, L_DA, OP_VMVI, 8'h01, 8'h00, vr(12)));   // 256
    for (int k = 0; k < W; k++) begin
      p.push_back(enc(L_DO, L_DA, L_DA, OP_VADD, vr(X0 + k), vr(0), vr(0)));
      p.push_back(enc(L_DO, L_DO, L_DA, OP_VMUL, vr(X0 + k), vr(X0 + k), vr(6)));
      p.push_back(enc(L_DA, L_DA, L_DA, OP_VADD, vr(6), vr(1), vr(1)));
      for (int t = 0; t < 3; t++) begin
        p.push_back(enc(L_DA, L_DO, L_DA, OP_VCLT, vr(10 + t), vr(X0 + k), vr(6)));
        p.push_back(enc(L_DA, L_DA, L_DA, OP_VADD, vr(6), vr(3 + t), vr(3 + t)));
      end
      if (k >= 1)
        p.push_back(enc(L_DO, L_DO, L_DA, OP_VSUB, vr(X0 + k - 1), vr(X0 + k), vr(9)));
      if (k >= 2) begin
        p.push_back(enc(L_DA, L_DA, L_DA, OP_VMUL, vr(8), vr(9), vr(7)));
        p.push_back(enc(L_DA, L_DA, L_DA, OP_VCLT, im(0), vr(7), vr(7)));
        p.push_back(enc(L_DA, L_DA, L_DA, OP_VADD, vr(7), vr(2), vr(2)));
      end
      if (k >= 1) p.push_back(enc(L_DA, L_DA, L_DA, OP_VMV, vr(9), 8'd0, vr(8)));
    end
    p.push_back(enc(L_DA, L_DA, L_DA, OP_VSRA, im(5), vr(0), vr(0)));   // mean
    p.push_back(enc(L_DA, L_DA, L_DA, OP_VSRA, im(5), vr(1), vr(1)));   // mean of squares
    p.push_back(enc(L_DA, L_DA, L_DA, OP_VMUL, vr(0), vr(0), vr(6)));
    p.push_back(enc(L_DA, L_DA, L_DA, OP_VSUB, vr(6), vr(1), vr(1)));   // variance
    p.push_back(enc(L_DO, L_DO, L_DA, OP_BEQ, vr(0), vr(0), 8'd0));     // halt
  endfunction

  initial begin
    logic [31:0] q [$];
    logic [31:0] prog [];
    ref_core m;
    word_t v;
    int steps, cyc0;
    for (int c = 0; c < NCH; c++)
      for (int k = 0; k < W; k++) samples[c][k] = $signed(12'($urandom));
    build(q);
    prog = new[q.size()];
    foreach (q[i]) prog[i] = q[i];
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    foreach (prog[k]) hw(TGT_ICACHE, k, prog[k]);
    for (int pass = 0; pass < 2; pass++) begin
      int ch [LANES];
      int mean [LANES], var_ [LANES], ssc [LANES], cnt [LANES][3];
      m = new();
      for (int l = 0; l < LANES; l++) ch[l] = (4 * pass + l) % NCH;
      for (int r = 0; r < DA_VREGS; r++)
        for (int l = 0; l < LANES; l++) begin
          v = $urandom; m.da[r][l] = v; hw(TGT_DAMEM, 4 * r + l, v);
        end
      for (int r = 0; r < X0 + W; r++)
        for (int l = 0; l < LANES; l++) begin
          v = (r >= X0) ? word_t'(samples[ch[l]][r - X0]) : '0;
          m.dm[r][l] = v; hw(TGT_DOMEM, 4 * r + l, v);
        end
      for (int r = X0 + W; r < DO_ROWS; r++) m.dm[r] = '0;
      steps = m.run(prog);
      chk(steps > 0, "reference model halts");
      // features straight from the samples
      for (int l = 0; l < LANES; l++) begin
        int s, s2;
        s = 0; s2 = 0;
        ssc[l] = 0; cnt[l] = '{0, 0, 0};
        for (int k = 0; k < W; k++) begin
          int x;
          x = samples[ch[l]][k];
          s += x; s2 += x * x;
          if (x < -256) cnt[l][0]++;
          if (x < 0)    cnt[l][1]++;
          if (x < 256)  cnt[l][2]++;
          if (k >= 1 && k < W - 1 &&
              (x - samples[ch[l]][k-1]) * (samples[ch[l]][k+1] - x) < 0) ssc[l]++;
        end
        mean[l] = s >>> 5;
        var_[l] = (s2 >>> 5) - mean[l] * mean[l];
      end
      cyc0 = run_cycles;
      hw(TGT_CTRL, 0, 32'd1);
      wait (halted);
      @(negedge clk);
      chk(run_cycles - cyc0 == m.cycles, $sformatf("pass %0d: %0d cycles, reference %0d", pass,
                                                  run_cycles - cyc0, m.cycles));
      for (int l = 0; l < LANES; l++) begin
        hr(TGT_DAMEM, 4 * 0 + l, v); chk(v == word_t'(mean[l]), $sformatf("mean ch%0d got %0d exp %0d model %0d", ch[l], $signed(v), mean[l], $signed(m.da[0][l])));
        hr(TGT_DAMEM, 4 * 1 + l, v); chk(v == word_t'(var_[l]), $sformatf("variance ch%0d", ch[l]));
        hr(TGT_DAMEM, 4 * 2 + l, v); chk(v == word_t'(ssc[l]), $sformatf("SSC ch%0d got %0d exp %0d", ch[l], v, ssc[l]));
        for (int t = 0; t < 3; t++) begin
          hr(TGT_DAMEM, 4 * (3 + t) + l, v);
          chk(v == word_t'(cnt[l][t]), $sformatf("histogram ch%0d threshold %0d", ch[l], t));
        end
      end
      if (pass == 0) $display("program %0d words, %0d cycles per pass of 4 channels",
                              prog.size(), m.cycles);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

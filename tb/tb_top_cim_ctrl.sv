// tb_top_cim_ctrl: the DNN controller against a weight memory model. For random CSR settings it
// checks, cycle by cycle after start: the weight entry address, the bit plane on the word lines
// (most significant first), first/neg/step, the write-back cycle (row, lane mask, partial-sum
// latch), the pass-through of bank/scale/activation/accumulate, the 9-cycle-per-channel rate
// and the done pulse; and that NOUT = 0 finishes at once.
module tb_top_cim_ctrl;
  import gpcim_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, busy, done;
  word_t [N_CSR-1:0] csr = '0;
  logic [6:0] ws_addr;
  logic [WS_WIDTH-1:0] ws_rdata;
  logic [WS_WIDTH-1:0] wmem [WS_DEPTH];
  dnn_ctl_t dc;
  int checks = 0, failures = 0;

  top_cim_ctrl dut (.clk, .rst_n, .start, .csr, .ws_addr, .ws_rdata, .dc, .busy, .done);
  assign ws_rdata = wmem[ws_addr];

  always #5 clk = ~clk;
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

  initial begin
    for (int e = 0; e < WS_DEPTH; e++)
      for (int w = 0; w < 8; w++) wmem[e][32*w +: 32] = $urandom;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 12; t++) begin
      int nout, wbase, obase;
      nout = (t == 0) ? 0 : $urandom_range(1, 6);
      wbase = $urandom_range(0, 120); obase = $urandom_range(0, 120);
      csr[CSR_WBASE] = wbase; csr[CSR_NOUT] = nout; csr[CSR_BANK] = $urandom_range(0, 1);
      csr[CSR_OBASE] = obase; csr[CSR_ACT] = $urandom_range(0, 1); csr[CSR_SCALE] = $urandom_range(0, 31);
      csr[CSR_TACC] = $urandom_range(0, 1); csr[CSR_TEN] = $urandom_range(1, 15);
      @(negedge clk);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      for (int n = 0; n < nout; n++) begin
        for (int bi = 7; bi >= 0; bi--) begin
          logic [DA_ROWS-1:0] plane;
          for (int r = 0; r < DA_ROWS; r++) plane[r] = wmem[7'(wbase + n)][8*r + bi];
          chk(busy && dc.step && !dc.wr_en, "MAC cycle");
          chk(ws_addr == 7'(wbase + n), "weight address");
          chk(dc.wl_weight == plane, $sformatf("bit plane %0d of channel %0d", bi, n));
          chk(dc.first == (bi == 7) && dc.neg == (bi == 7), "first/neg");
          chk(!done, "no early done");
          @(negedge clk);
        end
        chk(dc.wr_en && dc.lat_m_en && !dc.step, "write-back cycle");
        chk(dc.wr_addr == 7'(obase + n) && dc.psum_addr == 7'(obase + n), "output row");
        chk(dc.wr_lane == csr[CSR_TEN][3:0], "lane mask");
        chk(dc.bank == csr[CSR_BANK][0] && dc.shift == csr[CSR_SCALE][4:0] &&
            dc.relu_en == csr[CSR_ACT][0] && dc.acc_en == csr[CSR_TACC][0], "parameters");
        @(negedge clk);
      end
      chk(done && !busy, $sformatf("done after %0d cycles", 9 * nout));
      @(negedge clk);
      chk(!done, "done is one cycle");
      repeat (2) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

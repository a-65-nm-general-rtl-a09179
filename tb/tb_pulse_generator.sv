// tb_pulse_generator: for several delay codes, records when each phase signal rises and falls in
// a cycle and checks the order write-back -> precharge -> discharge (both word lines, sense
// enabled) -> latch, the stage lengths, that write-back/precharge/word lines never overlap, and
// that the whole sequence ends before the next rising clock edge.
module tb_pulse_generator;
  import gpcim_pkg::*;
  logic clk = 1'b0, en = 1'b0;
  logic [3:0] code = '0;
  pulse_t p;
  int checks = 0, failures = 0;
  localparam int HALF = 50;

  pulse_generator #(.UNIT(1)) dut (.clk, .en, .delay_code(code), .p);

  always #(HALF) clk = ~clk;
  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  // overlap monitor
  always @(p) if (en) chk(int'(p.wb_en) + int'(p.prc_en) + int'(p.wl_a) <= 1, "phase overlap");

  initial begin
    time t_edge, wb_r, wb_f, pr_f, wl_f, la_f;
    @(negedge clk);
    @(posedge clk);
    #1 chk(p == '0, "idle when disabled");
    for (int c = 0; c < 16; c += 3) begin
      int d;
      d = c + 1;
      @(negedge clk);
      code = 4'(c); en = 1'b1;
      @(posedge clk); t_edge = $time;
      @(negedge p.wb_en);  wb_f = $time;
      chk(p.prc_en, "precharge follows write-back");
      @(negedge p.prc_en); pr_f = $time;
      chk(p.wl_a && p.wl_b && p.sense_clk, "both word lines and sense amp in discharge");
      @(negedge p.wl_a);   wl_f = $time;
      chk(p.latch && p.sense_clk, "latch follows discharge");
      @(negedge p.latch);  la_f = $time;
      chk(wb_f - t_edge == time'(d), "write-back length");
      chk(pr_f - wb_f == time'(d), "precharge length");
      chk(wl_f - pr_f == time'(2 * d), "discharge length");
      chk(la_f - wl_f == time'(d), "latch length");
      chk(la_f - t_edge < time'(2 * HALF), "sequence fits the cycle");
      @(negedge clk);
      en = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

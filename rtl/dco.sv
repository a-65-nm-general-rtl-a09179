// dco: BEHAVIOURAL MODEL (not synthesizable) of the on-chip digitally controlled oscillator that
// clocks the cores. While `en` is high it toggles `clk_out` with a half period of
// BASE + code * STEP time units, so a larger code gives a slower clock; while `en` is low the
// output rests low. The code-to-period law and its constants are this model's choice; the
// document only names the block. A synthesis tool that drops the delay sees `clk_out` fed back
// through an inverter and reports a combinational loop: that loop is the ring oscillator this
// model stands for, and a real DCO is a custom cell, not synthesized logic.
module dco #(
  parameter int BASE = 4,
  parameter int STEP = 1
) (
  input  logic       en,
  input  logic [3:0] code,
  output logic       clk_out
);
  initial clk_out = 1'b0;

  always begin
    if (en) begin
      #(BASE + int'(code) * STEP);
      clk_out = ~clk_out;
    end else begin
      clk_out = 1'b0;
      @(posedge en);
    end
  end
endmodule

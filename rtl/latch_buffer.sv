// latch_buffer: the sense-amplifier latch and buffer between a bitcell array and the CCUs.
// A CIM cycle writes back, precharges and discharges the bitlines while the clock is high; the
// sensed data is captured in the latch-update phase, modelled here as the falling clock edge,
// and held for the CCU during the low half of the cycle and for as long as `en` stays low
// (multi-cycle instructions keep their operands this way). Asynchronous active-low clear.
module latch_buffer #(
  parameter int W = 128
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n)  q <= '0;
    else if (en) q <= d;
  end
endmodule

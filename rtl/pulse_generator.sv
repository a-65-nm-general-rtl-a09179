// pulse_generator: BEHAVIOURAL MODEL (not synthesizable) of the tunable delay-chain pulse
// generator that times one CIM cycle of a bitcell array. On each rising clock edge, when
// enabled, it walks through the phases of a cycle in order: write-back (wb_en, data from the
// previous cycle written), bitline precharge (prc_en), bitline discharge on both read ports
// (wl_a, wl_b, with the sense amplifiers enabled by sense_clk), then latch update (latch). The
// remaining time of the cycle is the CCU execute phase. Each phase lasts a multiple of one
// delay-chain stage, (delay_code + 1) * UNIT time units (discharge two stages), as a tuning code
// would set it on silicon. The phase order follows the document; the stage counts per phase and
// the delay unit are this model's choice. The whole sequence must fit in one clock period:
// 5 * (delay_code + 1) * UNIT < clock period. The synthesizable RTL of the macro abstracts these
// phases into clock edges: write-back at the rising edge, latch update at the falling edge.
module pulse_generator
  import gpcim_pkg::*;
#(
  parameter int UNIT = 1
) (
  input  logic       clk,
  input  logic       en,
  input  logic [3:0] delay_code,
  output pulse_t     p
);
  logic wb_en = 1'b0, prc_en = 1'b0, wl_a = 1'b0, wl_b = 1'b0, sense_clk = 1'b0, latch = 1'b0;
  int   d;

  assign d = (int'(delay_code) + 1) * UNIT;

  // every phase edge is scheduled from the rising clock edge with an intra-assignment delay
  always @(posedge clk) begin
    if (en) begin
      wb_en     <= 1'b1;
      wb_en     <= #(d) 1'b0;
      prc_en    <= #(d) 1'b1;
      prc_en    <= #(2 * d) 1'b0;
      wl_a      <= #(2 * d) 1'b1;
      wl_b      <= #(2 * d) 1'b1;
      sense_clk <= #(2 * d) 1'b1;
      wl_a      <= #(4 * d) 1'b0;
      wl_b      <= #(4 * d) 1'b0;
      latch     <= #(4 * d) 1'b1;
      latch     <= #(5 * d) 1'b0;
      sense_clk <= #(5 * d) 1'b0;
    end
  end

  assign p = '{wb_en: wb_en, prc_en: prc_en, wl_a: wl_a, wl_b: wl_b,
               sense_clk: sense_clk, latch: latch};
endmodule

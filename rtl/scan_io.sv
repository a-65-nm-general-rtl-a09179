// scan_io: serial test port through which an external controller streams data into and out of
// the chip. While scan_en is high, one bit per clock is shifted in at scan_in (most significant
// first) into a 57-bit command frame {we, addr[23:0], wdata[31:0]}, and the previous read result
// is shifted out at scan_out (most significant first). A one-cycle scan_update pulse (scan_en
// low) issues the frame as a command for one cycle; in that same cycle the read data of the
// command is captured for shifting out. The frame layout and the update strobe are this
// design's choice; the document only names the port.
module scan_io
  import gpcim_pkg::*;
#(
  parameter int AW = 24
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          scan_en,
  input  logic          scan_in,
  input  logic          scan_update,
  output logic          scan_out,
  output logic          cmd_valid,
  output logic          cmd_we,
  output logic [AW-1:0] cmd_addr,
  output word_t         cmd_wdata,
  input  word_t         cmd_rdata
);
  localparam int FRAME = 1 + AW + XLEN;
  logic [FRAME-1:0] sr_in;
  word_t            sr_out;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr_in     <= '0;
      sr_out    <= '0;
      cmd_valid <= 1'b0;
      cmd_we    <= 1'b0;
      cmd_addr  <= '0;
      cmd_wdata <= '0;
    end else begin
      cmd_valid <= 1'b0;
      if (scan_en) begin
        sr_in  <= {sr_in[FRAME-2:0], scan_in};
        sr_out <= {sr_out[XLEN-2:0], 1'b0};
      end else if (scan_update) begin
        cmd_valid <= 1'b1;
        {cmd_we, cmd_addr, cmd_wdata} <= sr_in;
      end
      if (cmd_valid) sr_out <= cmd_rdata;
    end
  end

  assign scan_out = sr_out[XLEN-1];

  property p_no_update_while_shifting;
    @(posedge clk) disable iff (!rst_n) !(scan_en && scan_update);
  endproperty
  a_no_update_while_shifting: assert property (p_no_update_while_shifting);
endmodule

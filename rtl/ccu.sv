// ccu: the four central compute units of a GPCIM macro, one per 32-bit vector lane.
// In DNN mode the DOUT lines of the selected DAMEM bank are routed to the units: unit k gets
// columns 8k..8k+7 of that bank on all 32 rows, i.e. 32 8-bit activation/weight-bit products,
// so the four units compute four dot products with the same weights in parallel. In CPU mode
// unit k executes lane k of the vector instruction. All control is shared by the four units.
// Timing is that of ccu_unit: combinational result, accumulators at the rising edge.
module ccu
  import gpcim_pkg::*;
(
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            dnn_mode,
  input  opcode_e                         op,
  input  logic [1:0]                      ext_sel,
  input  logic [1:0]                      mul_step,
  input  vec_t                            a,
  input  vec_t                            b,
  input  logic [LANES-1:0]                mask,
  input  logic [DA_ROWS-1:0][DA_COLS-1:0] dout,
  input  logic                            bank,
  input  logic                            dnn_first,
  input  logic                            dnn_step,
  input  logic                            dnn_neg,
  input  logic                            acc_en,
  input  logic                            relu_en,
  input  logic [4:0]                      shift,
  input  vec_t                            psum,
  output vec_t                            result
);
  localparam int GRP = DA_BANKW / LANES;  // columns per unit within a bank (= ACT_W)

  initial assert (GRP == ACT_W) else $error("ccu: bank width must give one activation per unit");

  for (genvar k = 0; k < LANES; k++) begin : g_unit
    logic [DA_ROWS-1:0][ACT_W-1:0] pp;
    always_comb begin
      for (int r = 0; r < DA_ROWS; r++)
        pp[r] = dout[r][(bank ? DA_BANKW : 0) + GRP*k +: ACT_W];
    end

    ccu_unit u_unit (
      .clk, .rst_n, .dnn_mode, .op, .ext_sel, .mul_step,
      .a(a[k]), .b(b[k]), .mask(mask[k]), .pp,
      .dnn_first, .dnn_step, .dnn_neg, .acc_en, .relu_en, .shift,
      .psum(psum[k]), .result(result[k])
    );
  end
endmodule

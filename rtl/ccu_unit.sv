// ccu_unit: one central compute unit (one vector lane) of the GPCIM macro, reconfigurable
// between an adder-tree accumulator (DNN mode) and a 32-bit ALU (vector CPU mode).
//
// DNN mode: the 32 DAMEM rows of this lane's 8-column group deliver 8-bit products
// (activation AND one weight bit). The adder tree sums them; the sum is shift-accumulated into a
// 32-bit register, most significant weight bit first (`first`), with the sign bit's sum
// subtracted (`neg`) so weights are two's complement. After eight steps the register holds the
// dot product. The output stage scales it (arithmetic right shift), optionally adds a partial
// sum read from DOMEM and optionally applies ReLU.
//
// CPU mode: R0 (`a`) and R1 (`b`) come from the operand latches. Boolean, add/subtract/compare,
// min/max, shifts and extensions finish in one cycle; add/subtract/compare run on a ripple
// adder of full_adder cells. VMUL/VMULH reuse the adder tree as a 32b x 8b multiplier: in step
// s (0..3, driven by the controller) the eight partial products of `a` and byte 3-s of `b` are
// summed and added to the 64-bit accumulator shifted left by 8, so the product is complete in
// the fourth cycle. VMULH corrects the unsigned high word to a signed one. VMERGE selects a or b
// by the lane's mask bit. Result is combinational from the latched operands; the accumulators
// update at the rising edge.
//
// Operand order (result = R1 op R0, compares "R1 > R0"), signed weights and activations, and
// the scale/ReLU/partial-sum ordering of the output stage are this design's choices.
module ccu_unit
  import gpcim_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          dnn_mode,
  // CPU mode
  input  opcode_e                       op,
  input  logic [1:0]                    ext_sel,
  input  logic [1:0]                    mul_step,
  input  word_t                         a,
  input  word_t                         b,
  input  logic                          mask,
  // DNN mode
  input  logic [DA_ROWS-1:0][ACT_W-1:0] pp,
  input  logic                          dnn_first,
  input  logic                          dnn_step,
  input  logic                          dnn_neg,
  input  logic                          acc_en,
  input  logic                          relu_en,
  input  logic [4:0]                    shift,
  input  word_t                         psum,
  output word_t                         result
);
  // ---------------- shared adder tree ----------------
  logic [DA_ROWS-1:0][TREE_W-1:0] tree_in;
  logic [TREE_W-1:0]              tree_sum;
  logic [7:0]                     b_byte;

  assign b_byte = b[8*(3-int'(mul_step)) +: 8];

  always_comb begin
    for (int i = 0; i < DA_ROWS; i++) begin
      if (dnn_mode)
        tree_in[i] = TREE_W'($signed(pp[i]));
      else if (i < 8 && b_byte[i])
        tree_in[i] = TREE_W'(a) << i;
      else
        tree_in[i] = '0;
    end
  end

  adder_tree #(.N(DA_ROWS), .W(TREE_W)) u_tree (.in(tree_in), .sum(tree_sum));

  // ---------------- DNN shift-accumulate ----------------
  word_t dnn_acc_q, tsum, dnn_acc_d, scaled, dnn_sum, dnn_out;

  assign tsum      = tree_sum[XLEN-1:0];
  assign dnn_acc_d = (dnn_first ? '0 : (dnn_acc_q << 1)) + (dnn_neg ? -tsum : tsum);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                   dnn_acc_q <= '0;
    else if (dnn_mode && dnn_step) dnn_acc_q <= dnn_acc_d;
  end

  always_comb begin
    scaled  = word_t'($signed(dnn_acc_q) >>> shift);
    dnn_sum = (acc_en ? psum : '0) + scaled;
    dnn_out = (relu_en && dnn_sum[XLEN-1]) ? '0 : dnn_sum;
  end

  // ---------------- multiplier accumulator ----------------
  logic [63:0] mul_acc_q, mul_acc_in, mul_next;
  logic        is_mul;

  assign is_mul     = (op == OP_VMUL) || (op == OP_VMULH);
  assign mul_acc_in = (mul_step == 2'd0) ? '0 : mul_acc_q;
  assign mul_next   = (mul_acc_in << 8) + 64'(tree_sum);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                    mul_acc_q <= '0;
    else if (!dnn_mode && is_mul)  mul_acc_q <= mul_next;
  end

  // ---------------- ALU ----------------
  word_t add_x, add_y, add_s, mulh;
  logic  add_ci, add_co;
  logic  lt_s, lt_u, eq;

  always_comb begin
    unique case (op)
      OP_VADD:  begin add_x = b; add_y = a;  add_ci = 1'b0; end
      OP_VRSUB: begin add_x = a; add_y = ~b; add_ci = 1'b1; end
      default:  begin add_x = b; add_y = ~a; add_ci = 1'b1; end  // R1 - R0
    endcase
  end

  ripple_adder #(.W(XLEN)) u_add (.x(add_x), .y(add_y), .cin(add_ci), .sum(add_s), .cout(add_co));

  assign eq   = (a == b);
  assign lt_u = ~add_co;                                   // R1 < R0 unsigned
  assign lt_s = (b[XLEN-1] != a[XLEN-1]) ? b[XLEN-1] : add_s[XLEN-1];  // R1 < R0 signed
  assign mulh = mul_next[63:32] - (a[XLEN-1] ? b : '0) - (b[XLEN-1] ? a : '0);

  word_t cpu_res;
  always_comb begin
    unique case (op)
      OP_VAND:   cpu_res = b & a;
      OP_VOR:    cpu_res = b | a;
      OP_VXOR:   cpu_res = b ^ a;
      OP_VNAND:  cpu_res = ~(b & a);
      OP_VNOR:   cpu_res = ~(b | a);
      OP_VXNOR:  cpu_res = ~(b ^ a);
      OP_VADD, OP_VSUB, OP_VRSUB: cpu_res = add_s;
      OP_VMIN:   cpu_res = lt_s ? b : a;
      OP_VMINU:  cpu_res = lt_u ? b : a;
      OP_VMAX:   cpu_res = lt_s ? a : b;
      OP_VMAXU:  cpu_res = lt_u ? a : b;
      OP_VEXT: begin
        unique case (ext_sel)
          2'b00:   cpu_res = word_t'(b[7:0]);
          2'b01:   cpu_res = word_t'($signed(b[7:0]));
          2'b10:   cpu_res = word_t'(b[15:0]);
          default: cpu_res = word_t'($signed(b[15:0]));
        endcase
      end
      OP_VMUL:   cpu_res = mul_next[31:0];
      OP_VMULH:  cpu_res = mulh;
      OP_VMERGE: cpu_res = mask ? a : b;
      OP_VSLL:   cpu_res = b << a[4:0];
      OP_VSRL:   cpu_res = b >> a[4:0];
      OP_VSRA:   cpu_res = word_t'($signed(b) >>> a[4:0]);
      OP_VCGT, OP_BGT: cpu_res = word_t'(!lt_s && !eq);
      OP_VCLT, OP_BLT: cpu_res = word_t'(lt_s);
      OP_VCEQ, OP_BEQ: cpu_res = word_t'(eq);
      default:   cpu_res = a;  // VMV, VMVI, JMP, MVCSR, PCS pass R0 through
    endcase
  end

  assign result = dnn_mode ? dnn_out : cpu_res;
endmodule

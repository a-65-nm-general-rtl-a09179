// tb_ccu_unit: one CCU lane. CPU mode: every single-cycle opcode with random and corner operands
// against SV arithmetic; VMUL/VMULH stepped through their four cycles and compared with 64-bit
// products. DNN mode: eight bit-serial steps of random signed weights against random signed
// activations, then the output stage with random scale, partial sum and ReLU settings, compared
// with a direct dot product.
module tb_ccu_unit;
  import gpcim_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, dnn_mode = 1'b0, mask = 1'b0;
  opcode_e op = OP_VADD;
  logic [1:0] ext_sel = '0, mul_step = '0;
  word_t a = '0, b = '0, psum = '0, result;
  logic [DA_ROWS-1:0][ACT_W-1:0] pp = '0;
  logic first = 1'b0, step = 1'b0, neg = 1'b0, acc_en = 1'b0, relu_en = 1'b0;
  logic [4:0] shift = '0;
  int checks = 0, failures = 0;

  ccu_unit dut (.clk, .rst_n, .dnn_mode, .op, .ext_sel, .mul_step, .a, .b, .mask, .pp,
                .dnn_first(first), .dnn_step(step), .dnn_neg(neg), .acc_en, .relu_en, .shift,
                .psum, .result);

  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input word_t e, input string what);
    checks++;
    if (result !== e) begin
      failures++;
      $display("FAIL %s a=%h b=%h got %h exp %h", what, a, b, result, e);
    end
  endtask

  function automatic word_t rnd();
    case ($urandom_range(0, 5))
      0: return 32'h8000_0000;
      1: return 32'hFFFF_FFFF;
      2: return 32'($urandom_range(0, 40));
      default: return $urandom;
    endcase
  endfunction

  function automatic word_t model(input opcode_e o, input word_t x, input word_t y,
                                  input logic [1:0] es, input logic m);
    case (o)
      OP_VAND: return y & x;   OP_VOR: return y | x;   OP_VXOR: return y ^ x;
      OP_VNAND: return ~(y & x); OP_VNOR: return ~(y | x); OP_VXNOR: return ~(y ^ x);
      OP_VADD: return y + x;   OP_VSUB: return y - x;  OP_VRSUB: return x - y;
      OP_VMIN: return ($signed(y) < $signed(x)) ? y : x;
      OP_VMINU: return (y < x) ? y : x;
      OP_VMAX: return ($signed(y) > $signed(x)) ? y : x;
      OP_VMAXU: return (y > x) ? y : x;
      OP_VEXT: return es == 0 ? {24'b0, y[7:0]} : es == 1 ? {{24{y[7]}}, y[7:0]}
                    : es == 2 ? {16'b0, y[15:0]} : {{16{y[15]}}, y[15:0]};
      OP_VMERGE: return m ? x : y;
      OP_VSLL: return y << x[4:0]; OP_VSRL: return y >> x[4:0];
      OP_VSRA: return $signed(y) >>> x[4:0];
      OP_VMV, OP_VMVI, OP_JMP, OP_MVCSR, OP_PCS: return x;
      OP_VCGT, OP_BGT: return word_t'($signed(y) > $signed(x));
      OP_VCLT, OP_BLT: return word_t'($signed(y) < $signed(x));
      OP_VCEQ, OP_BEQ: return word_t'(y == x);
      default: return 'x;
    endcase
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // ---- single-cycle CPU ops ----
    for (int t = 0; t < 3000; t++) begin
      opcode_e o;
      o = opcode_e'($urandom_range(0, 31));
      if (o inside {OP_VMUL, OP_VMULH, OP_SWITCH}) continue;
      op = o; a = rnd(); b = (t % 7 == 0) ? a : rnd(); ext_sel = 2'($urandom); mask = 1'($urandom);
      #1 chk(model(o, a, b, ext_sel, mask), o.name());
    end
    // ---- multiply, four cycles ----
    for (int t = 0; t < 300; t++) begin
      longint sp, up;
      @(negedge clk);
      a = rnd(); b = rnd();
      op = (t % 2) ? OP_VMULH : OP_VMUL;
      up = longint'({32'b0, a}) * longint'({32'b0, b});
      sp = longint'($signed(a)) * longint'($signed(b));
      for (int s = 0; s < 4; s++) begin
        mul_step = 2'(s);
        if (s < 3) @(negedge clk);
      end
      #1 chk((op == OP_VMUL) ? up[31:0] : sp[63:32], op.name());
      @(negedge clk);
    end
    // ---- DNN dot products ----
    op = OP_VADD;
    for (int t = 0; t < 200; t++) begin
      logic signed [7:0] w [DA_ROWS], x [DA_ROWS];
      int dot, v;
      @(negedge clk);
      dnn_mode = 1'b1;
      for (int r = 0; r < DA_ROWS; r++) begin
        w[r] = (t == 0) ? -8'sd128 : 8'($urandom);
        x[r] = (t == 0) ? -8'sd128 : 8'($urandom);
      end
      dot = 0;
      for (int r = 0; r < DA_ROWS; r++) dot += int'(w[r]) * int'(x[r]);
      for (int bit_i = 7; bit_i >= 0; bit_i--) begin
        for (int r = 0; r < DA_ROWS; r++) pp[r] = w[r][bit_i] ? x[r] : 8'h00;
        first = (bit_i == 7); neg = (bit_i == 7); step = 1'b1;
        @(negedge clk);
      end
      step = 1'b0; first = 1'b0; neg = 1'b0;
      shift = 5'($urandom_range(0, 6)); acc_en = 1'($urandom); relu_en = 1'($urandom);
      psum = $urandom_range(0, 2000) - 1000;
      v = dot >>> shift;
      if (acc_en) v += int'(psum);
      if (relu_en && v < 0) v = 0;
      #1 chk(word_t'(v), $sformatf("dnn dot=%0d", dot));
      dnn_mode = 1'b0; acc_en = 1'b0; relu_en = 1'b0; shift = '0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

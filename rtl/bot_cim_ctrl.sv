// bot_cim_ctrl: CPU-mode controller of a core, the "PC + IF + ID" stage of the two-stage GPCIM
// pipeline, plus the control and status registers (CSRs) and the CPU/DNN mode switch.
//
// Stage 1 fetches the word at PC from the instruction cache into the instruction register.
// Stage 2 is the CIM macro: the controller decodes the instruction there, drives the array
// addresses, operand selects and latch enables, and writes the CCU result to RD at the end of
// the instruction's last cycle. There is no forwarding: a write lands in the write-back phase
// that opens the next cycle, before that cycle's reads. Latencies: one cycle for most
// instructions, four for VMUL/VMULH, two for VMERGE (a second DOMEM read fetches the mask from
// register 0 of DOMEM) and two for SWITCH. When both R0 and R1 are vector registers in DAMEM,
// whose 9T cells have one read port, R1 is read in an extra first cycle. While an instruction
// is in its non-final cycles the fetch stage holds. A taken branch or jump flushes the fetched
// word (one bubble). A jump or branch to itself halts the core (end of program).
//
// MVCSR writes lane 0 of R0 to CSR RD. PCS records a resume address (its own PC + imm) and writes
// it to lane 0 of RD. SWITCH hands the macro to the top controller (DNN mode); when that
// reports done, fetching resumes at the PCS address, or after the SWITCH without a PCS.
//
// The document gives the format (location bits, R0/R1/RD fields), the instruction list and
// cycle counts; the opcode values, R0 kind bits, branch offset in RD, halt convention, the
// VMERGE mask register, the extra DAMEM cycle and the flush are this design's choices.
module bot_cim_ctrl
  import gpcim_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output logic [9:0]        ic_addr,
  input  logic [31:0]       ic_rdata,
  input  word_t             scalar_a,
  input  vec_t              result,
  output cpu_ctl_t          cc,
  output logic              dnn_mode,
  output logic              dnn_start,
  input  logic              dnn_done,
  output word_t [N_CSR-1:0] csr,
  output logic              running,
  output logic              halted,
  output logic [9:0]        pc
);
  typedef enum logic [1:0] {M_IDLE, M_CPU, M_DNN, M_HALT} mode_e;
  mode_e      mode;
  logic [9:0] pc_q, ex_pc, pcs_pc;
  logic       pcs_valid, ex_valid;
  instr_t     ir;
  logic [2:0] cyc;

  // ---------------- decode ----------------
  logic       uses_r1, fixed_a, r0_mem, dbl, writes_rd, is_branch, is_jump, last, taken;
  logic [2:0] exec_n, total, e;
  logic [9:0] target, resume_pc;

  always_comb begin
    uses_r1   = !(ir.op inside {OP_VMV, OP_VMVI, OP_JMP, OP_MVCSR, OP_SWITCH, OP_PCS});
    fixed_a   = ir.op inside {OP_VMVI, OP_PCS, OP_VEXT, OP_SWITCH};
    r0_mem    = !fixed_a && !ir.r0[7];
    dbl       = r0_mem && ir.loc_r0 == LOC_DAMEM && uses_r1 && ir.loc_r1 == LOC_DAMEM;
    writes_rd = (ir.op <= OP_VCEQ) || ir.op == OP_PCS;
    is_branch = ir.op inside {OP_BGT, OP_BLT, OP_BEQ};
    is_jump   = ir.op == OP_JMP;
    unique case (ir.op)
      OP_VMUL, OP_VMULH:    exec_n = 3'd4;
      OP_VMERGE, OP_SWITCH: exec_n = 3'd2;
      default:              exec_n = 3'd1;
    endcase
    total     = exec_n + 3'(dbl);
    e         = cyc - 3'(dbl);
    last      = ex_valid && (cyc == total - 3'd1);
    resume_pc = ex_pc + 10'($signed(ir.r0));
    target    = is_jump ? scalar_a[9:0] : ex_pc + 10'($signed(ir.rd));
    taken     = last && (is_jump || (is_branch && result[0][0]));
  end

  // ---------------- macro control ----------------
  always_comb begin
    cc          = '0;
    cc.op       = ir.op;
    cc.da_addr  = (dbl && cyc == 3'd0) ? ir.r1[3:0]
                : (r0_mem && ir.loc_r0 == LOC_DAMEM) ? ir.r0[3:0] : ir.r1[3:0];
    cc.do_addr_a = (ir.op == OP_VMERGE && e == 3'd1) ? 7'd0 : {1'b0, ir.r0[5:0]};
    cc.do_addr_b = ir.r1[6:0];
    cc.a_src    = ir.loc_r0;
    cc.a_imm_en = !r0_mem;
    cc.a_scalar = r0_mem && ir.r0[7:6] == R0_SCA;
    unique case (ir.op)
      OP_VMVI: cc.a_imm = word_t'($signed({ir.r0, ir.r1}));
      OP_PCS:  cc.a_imm = word_t'(resume_pc);
      default: cc.a_imm = word_t'($signed(ir.r0[6:0]));
    endcase
    cc.b_src    = ir.loc_r1;
    cc.lat_a_en = ex_valid && cyc == 3'(dbl);
    cc.lat_b_en = ex_valid && cyc == 3'd0;
    cc.lat_m_en = ex_valid && ir.op == OP_VMERGE && e == 3'd1;
    cc.ext_sel  = ir.r0[1:0];
    cc.mul_step = e[1:0];
    cc.wr_en    = last && writes_rd && mode == M_CPU;
    cc.wr_loc   = ir.loc_rd;
    cc.wr_lane  = (ir.op == OP_PCS) ? 4'b0001 : 4'b1111;
    cc.wr_addr  = ir.rd[6:0];
  end

  // ---------------- pipeline, CSRs, mode ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode      <= M_IDLE;
      pc_q      <= '0;
      ex_pc     <= '0;
      ex_valid  <= 1'b0;
      ir        <= '0;
      cyc       <= '0;
      pcs_valid <= 1'b0;
      pcs_pc    <= '0;
      dnn_start <= 1'b0;
      for (int i = 0; i < N_CSR; i++) csr[i] <= '0;
      csr[CSR_TEN] <= 32'hF;
    end else begin
      dnn_start <= 1'b0;
      unique case (mode)
        M_IDLE, M_HALT: if (start) begin
          mode      <= M_CPU;
          pc_q      <= '0;
          ex_valid  <= 1'b0;
          cyc       <= '0;
          pcs_valid <= 1'b0;
        end
        M_DNN: if (dnn_done) mode <= M_CPU;
        M_CPU: begin
          if (ex_valid && !last) begin
            cyc <= cyc + 3'd1;                      // multi-cycle instruction: hold fetch
          end else begin
            cyc <= '0;
            if (last && ir.op == OP_MVCSR) csr[ir.rd[2:0]] <= scalar_a;
            if (last && ir.op == OP_PCS) begin
              pcs_valid <= 1'b1;
              pcs_pc    <= resume_pc;
            end
            if (taken && target == ex_pc) begin
              mode     <= M_HALT;                   // jump to self: end of program
              ex_valid <= 1'b0;
            end else if (taken) begin
              pc_q     <= target;
              ex_valid <= 1'b0;                     // flush the word fetched behind it
            end else if (last && ir.op == OP_SWITCH) begin
              mode      <= M_DNN;
              dnn_start <= 1'b1;
              ex_valid  <= 1'b0;
              pc_q      <= pcs_valid ? pcs_pc : ex_pc + 10'd1;
              pcs_valid <= 1'b0;
            end else begin
              ir       <= instr_t'(ic_rdata);
              ex_pc    <= pc_q;
              ex_valid <= 1'b1;
              pc_q     <= pc_q + 10'd1;
            end
          end
        end
        default: mode <= M_IDLE;
      endcase
    end
  end

  assign ic_addr  = pc_q;
  assign pc       = pc_q;
  assign dnn_mode = (mode == M_DNN);
  assign running  = (mode == M_CPU) || (mode == M_DNN);
  assign halted   = (mode == M_HALT);
endmodule

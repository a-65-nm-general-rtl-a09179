// gpcim_ref_pkg: instruction-level reference model of one GPCIM core, written independently of
// the RTL, for the core and chip testbenches. It keeps its own copies of the two data arrays, the
// CSRs and the weight store, executes a program word by word and counts the clock cycles the
// two-stage pipeline should take (one fill cycle, the documented per-instruction latencies, an
// extra cycle for two DAMEM vector sources, one bubble per taken branch, and 9 cycles per output
// channel plus 5 cycles of hand-over for a SWITCH). It also holds the test program shared by the
// core and chip testbenches.
package gpcim_ref_pkg;
  import gpcim_pkg::*;

  class ref_core;
    vec_t                da [DA_VREGS];
    vec_t                dm [DO_ROWS];
    word_t               csr [N_CSR];
    logic [WS_WIDTH-1:0] ws [WS_DEPTH];
    int                  cycles;
    int                  n_switch, n_taken, n_dbl, n_mul, n_merge, n_pcs, n_scalar, n_imm;

    function new();
      foreach (csr[i]) csr[i] = '0;
      csr[CSR_TEN] = 32'hF;
    endfunction

    function automatic vec_t rd_vec(input logic loc, input int addr);
      return loc ? dm[addr % DO_ROWS] : da[addr % DA_VREGS];
    endfunction

    function automatic void wr_vec(input logic loc, input int addr, input vec_t v,
                                   input logic [3:0] lanes);
      for (int l = 0; l < LANES; l++)
        if (lanes[l]) begin
          if (loc) dm[addr % DO_ROWS][l] = v[l];
          else     da[addr % DA_VREGS][l] = v[l];
        end
    endfunction

    // signed 8-bit activation of DAMEM row r, CCU k, bank b
    function automatic int act(input int r, input int k, input int b);
      word_t w = da[r / 2][2 * (r % 2) + b];
      return int'($signed(w[8*k +: 8]));
    endfunction

    function automatic void dnn();
      int nout = int'(csr[CSR_NOUT]);
      for (int n = 0; n < nout; n++) begin
        int row = (int'(csr[CSR_OBASE][6:0]) + n) % DO_ROWS;
        int e   = (int'(csr[CSR_WBASE][6:0]) + n) % WS_DEPTH;
        for (int k = 0; k < LANES; k++) begin
          int acc = 0;
          int v;
          if (!csr[CSR_TEN][k]) continue;
          for (int r = 0; r < DA_ROWS; r++)
            acc += int'($signed(ws[e][8*r +: 8])) * act(r, k, int'(csr[CSR_BANK][0]));
          v = (acc >>> csr[CSR_SCALE][4:0]);
          if (csr[CSR_TACC][0]) v += int'(dm[row][k]);
          if (csr[CSR_ACT][0] && v < 0) v = 0;
          dm[row][k] = word_t'(v);
        end
      end
      cycles += 9 * nout + 5;
    endfunction

    // run until a jump/branch to itself; returns executed instruction count
    function automatic int run(input logic [31:0] prog [], input int max_steps = 10000);
      int pc = 0, steps = 0, pcs_pc = -1;
      cycles = 1;
      while (steps < max_steps) begin
        instr_t i = instr_t'(prog[pc]);
        vec_t a, b, res;
        logic uses_r1, r0_mem, taken;
        int next = pc + 1, lat = 1;
        steps++;
        uses_r1 = !(i.op inside {OP_VMV, OP_VMVI, OP_JMP, OP_MVCSR, OP_SWITCH, OP_PCS});
        r0_mem  = !(i.op inside {OP_VMVI, OP_PCS, OP_VEXT, OP_SWITCH}) && !i.r0[7];
        if (r0_mem) begin
          a = i.loc_r0 ? dm[i.r0[5:0]] : da[i.r0[3:0]];
          if (i.r0[6]) begin a = {LANES{a[0]}}; n_scalar++; end
        end else begin
          a = {LANES{word_t'($signed(i.r0[6:0]))}};
          if (i.r0[7]) n_imm++;
        end
        b = i.loc_r1 ? dm[i.r1[6:0]] : da[i.r1[3:0]];
        if (r0_mem && uses_r1 && !i.loc_r0 && !i.loc_r1) begin lat++; n_dbl++; end
        taken = 1'b0;
        for (int l = 0; l < LANES; l++) begin
          longint sp, up;
          word_t x = a[l], y = b[l];
          sp = longint'($signed(x)) * longint'($signed(y));
          up = longint'({32'b0, x}) * longint'({32'b0, y});
          case (i.op)
            OP_VAND:  res[l] = y & x;
            OP_VOR:   res[l] = y | x;
            OP_VXOR:  res[l] = y ^ x;
            OP_VNAND: res[l] = ~(y & x);
            OP_VNOR:  res[l] = ~(y | x);
            OP_VXNOR: res[l] = ~(y ^ x);
            OP_VADD:  res[l] = y + x;
            OP_VSUB:  res[l] = y - x;
            OP_VRSUB: res[l] = x - y;
            OP_VMIN:  res[l] = ($signed(y) < $signed(x)) ? y : x;
            OP_VMINU: res[l] = (y < x) ? y : x;
            OP_VMAX:  res[l] = ($signed(y) < $signed(x)) ? x : y;
            OP_VMAXU: res[l] = (y < x) ? x : y;
            OP_VEXT:  case (i.r0[1:0])
                        2'd0: res[l] = {24'b0, y[7:0]};
                        2'd1: res[l] = {{24{y[7]}}, y[7:0]};
                        2'd2: res[l] = {16'b0, y[15:0]};
                        default: res[l] = {{16{y[15]}}, y[15:0]};
                      endcase
            OP_VMUL:  res[l] = up[31:0];
            OP_VMULH: res[l] = sp[63:32];
            OP_VMERGE: res[l] = dm[0][l][0] ? x : y;
            OP_VSLL:  res[l] = y << x[4:0];
            OP_VSRL:  res[l] = y >> x[4:0];
            OP_VSRA:  res[l] = $signed(y) >>> x[4:0];
            OP_VMV:   res[l] = x;
            OP_VMVI:  res[l] = word_t'($signed({i.r0, i.r1}));
            OP_VCGT:  res[l] = word_t'($signed(y) > $signed(x));
            OP_VCLT:  res[l] = word_t'($signed(y) < $signed(x));
            OP_VCEQ:  res[l] = word_t'(y == x);
            default:  res[l] = '0;
          endcase
        end
        case (i.op)
          OP_VMUL, OP_VMULH: begin lat += 3; n_mul++; end
          OP_VMERGE:         begin lat += 1; n_merge++; end
          OP_JMP:  begin taken = 1'b1; next = int'(a[0][9:0]); end
          OP_BGT:  if ($signed(b[0]) > $signed(a[0])) begin taken = 1'b1; next = pc + int'($signed(i.rd)); end
          OP_BLT:  if ($signed(b[0]) < $signed(a[0])) begin taken = 1'b1; next = pc + int'($signed(i.rd)); end
          OP_BEQ:  if (b[0] == a[0]) begin taken = 1'b1; next = pc + int'($signed(i.rd)); end
          OP_MVCSR: csr[i.rd[2:0]] = a[0];
          OP_PCS: begin
            pcs_pc = (pc + int'($signed(i.r0))) % IC_DEPTH;
            res = '0;
            res[0] = word_t'(pcs_pc);
            wr_vec(i.loc_rd, i.loc_rd ? int'(i.rd[6:0]) : int'(i.rd[3:0]), res, 4'b0001);
            n_pcs++;
          end
          default: ;
        endcase
        if (i.op <= OP_VCEQ)
          wr_vec(i.loc_rd, i.loc_rd ? int'(i.rd[6:0]) : int'(i.rd[3:0]), res, 4'b1111);
        if (i.op == OP_SWITCH) begin
          dnn();
          next = (pcs_pc >= 0) ? pcs_pc : pc + 1;
          pcs_pc = -1;
          n_switch++;
          pc = next;
          continue;
        end
        cycles += lat;
        if (taken && next == pc) return steps;   // halt
        if (taken) begin cycles += 1; n_taken++; end
        pc = next % IC_DEPTH;
      end
      return -1;
    endfunction
  endclass

  // Test program: CPU pre-processing of DAMEM data, a DNN layer on it, CPU post-processing of the
  // results, a counted loop, and a jump-to-self halt. Register names: Dn = DAMEM vector n,
  // On = DOMEM row n; R0 kinds: vector, scalar (0x40 | n), immediate (0x80 | imm7).
  localparam logic DA = 1'b0, DO = 1'b1;

  function automatic int imm7(input int v);
    return 8'h80 | (v & 8'h7F);
  endfunction

  function automatic void test_program(output logic [31:0] p [], input int nout, input int bank);
    logic [31:0] q [$];
    // CPU pre-processing (all ALU classes)
    q.push_back(enc(DO, DO, DO, OP_VMVI,  8'h12, 8'h34, 8'd10));        // O10 = 0x1234
    q.push_back(enc(DO, DO, DO, OP_VADD,  8'd1,  8'd2,  8'd11));        // O11 = O2 + O1
    q.push_back(enc(DO, DA, DA, OP_VSUB,  8'd5,  8'd4,  8'd12));        // D12 = D4 - O5
    q.push_back(enc(DO, DA, DO, OP_VRSUB, 8'd6,  8'd7,  8'd12));        // O12 = O6 - D7
    q.push_back(enc(DA, DA, DA, OP_VADD,  8'd6,  8'd7,  8'd13));        // D13 = D7 + D6 (two DAMEM reads)
    q.push_back(enc(DO, DO, DO, OP_VAND,  8'd1,  8'd2,  8'd13));
    q.push_back(enc(DO, DO, DO, OP_VOR,   8'd3,  8'd2,  8'd14));
    q.push_back(enc(DO, DO, DO, OP_VXOR,  8'd4,  8'd2,  8'd15));
    q.push_back(enc(DO, DO, DO, OP_VNAND, 8'd5,  8'd2,  8'd16));
    q.push_back(enc(DO, DO, DO, OP_VNOR,  8'd6,  8'd2,  8'd17));
    q.push_back(enc(DA, DO, DO, OP_VXNOR, 8'd1,  8'd2,  8'd18));
    q.push_back(enc(DO, DO, DO, OP_VMIN,  8'd1,  8'd3,  8'd19));
    q.push_back(enc(DO, DO, DO, OP_VMINU, 8'd1,  8'd3,  8'd20));
    q.push_back(enc(DO, DO, DO, OP_VMAX,  8'd4,  8'd3,  8'd21));
    q.push_back(enc(DO, DO, DO, OP_VMAXU, 8'd4,  8'd3,  8'd22));
    q.push_back(enc(DO, DO, DO, OP_VEXT,  8'd0,  8'd5,  8'd23));
    q.push_back(enc(DO, DO, DO, OP_VEXT,  8'd1,  8'd5,  8'd24));
    q.push_back(enc(DO, DO, DO, OP_VEXT,  8'd2,  8'd6,  8'd25));
    q.push_back(enc(DO, DO, DO, OP_VEXT,  8'd3,  8'd6,  8'd26));
    q.push_back(enc(DO, DO, DO, OP_VMUL,  8'd1,  8'd2,  8'd27));
    q.push_back(enc(DO, DA, DO, OP_VMULH, 8'd3,  8'd2,  8'd28));
    q.push_back(enc(DO, DO, DO, OP_VMULH, 8'h40 | 8'd4, 8'd5, 8'd29));  // scalar R0
    q.push_back(enc(DO, DO, DO, OP_VMERGE, 8'd1, 8'd2,  8'd30));
    q.push_back(enc(DO, DO, DO, OP_VSLL,  imm7(5), 8'd3, 8'd31));
    q.push_back(enc(DO, DO, DO, OP_VSRL,  8'd7,  8'd3,  8'd32));
    q.push_back(enc(DO, DO, DO, OP_VSRA,  imm7(9), 8'd4, 8'd33));
    q.push_back(enc(DO, DO, DO, OP_VMV,   8'h40 | 8'd5, 8'd0, 8'd34));
    q.push_back(enc(DO, DO, DO, OP_VCGT,  8'd1,  8'd2,  8'd35));
    q.push_back(enc(DO, DO, DO, OP_VCLT,  8'd1,  8'd2,  8'd36));
    q.push_back(enc(DO, DO, DO, OP_VCEQ,  8'd1,  8'd1,  8'd37));
    q.push_back(enc(DO, DO, DO, OP_VADD,  imm7(-3), 8'd6, 8'd38));
    // counted loop: O50 = 3; do { O51 += 2; O50 -= 1 } while (O50 > 0)
    q.push_back(enc(DO, DO, DO, OP_VMVI,  8'd0,  8'd3,  8'd50));
    q.push_back(enc(DO, DO, DO, OP_VMVI,  8'd0,  8'd0,  8'd51));
    q.push_back(enc(DO, DO, DO, OP_VADD,  imm7(2), 8'd51, 8'd51));
    q.push_back(enc(DO, DO, DO, OP_VSUB,  imm7(1), 8'd50, 8'd50));
    q.push_back(enc(DO, DO, DO, OP_BGT,   imm7(0), 8'd50, 8'hFE));      // back 2
    // DNN layer configuration, PC save and mode switch
    q.push_back(enc(DO, DO, DO, OP_MVCSR, imm7(0),    8'd0, 8'(CSR_WBASE)));
    q.push_back(enc(DO, DO, DO, OP_MVCSR, imm7(nout), 8'd0, 8'(CSR_NOUT)));
    q.push_back(enc(DO, DO, DO, OP_MVCSR, imm7(bank), 8'd0, 8'(CSR_BANK)));
    q.push_back(enc(DO, DO, DO, OP_MVCSR, imm7(64),   8'd0, 8'(CSR_OBASE)));  // imm7(64) = -64 -> row 64
    q.push_back(enc(DO, DO, DO, OP_MVCSR, imm7(1),    8'd0, 8'(CSR_ACT)));
    q.push_back(enc(DO, DO, DO, OP_MVCSR, imm7(1),    8'd0, 8'(CSR_SCALE)));
    q.push_back(enc(DO, DO, DO, OP_MVCSR, imm7(1),    8'd0, 8'(CSR_TACC)));
    q.push_back(enc(DO, DO, DO, OP_MVCSR, imm7(7),    8'd0, 8'(CSR_TEN)));
    q.push_back(enc(DO, DO, DO, OP_PCS,   8'd3,  8'd0,  8'd52));        // resume 3 words on
    q.push_back(enc(DO, DO, DO, OP_SWITCH, 8'd0, 8'd0,  8'd0));
    q.push_back(enc(DO, DO, DO, OP_VMVI,  8'hDE, 8'hAD, 8'd53));        // skipped by the PCS address
    // CPU post-processing of the DNN results (rows 64..)
    q.push_back(enc(DO, DO, DO, OP_VMUL,  imm7(3), 8'd64, 8'd54));
    q.push_back(enc(DO, DO, DA, OP_VADD,  8'd1,  8'd65, 8'd14));
    q.push_back(enc(DO, DO, DO, OP_VMAX,  8'h40 | 8'd1, 8'd64, 8'd55));
    // jump over a word, then halt with a jump to self
    q.push_back(enc(DO, DO, DO, OP_VMVI,  8'd0,  8'(q.size() + 3), 8'd56));
    q.push_back(enc(DO, DO, DO, OP_JMP,   8'h40 | 8'd56, 8'd0, 8'd0));
    q.push_back(enc(DO, DO, DO, OP_VMVI,  8'hBA, 8'hD0, 8'd57));        // jumped over
    q.push_back(enc(DO, DO, DO, OP_BEQ,   imm7(0), 8'd58, 8'd0));       // O58 lane 0 == 0 -> halt
    p = new[q.size()];
    foreach (q[k]) p[k] = q[k];
  endfunction
endpackage

// gpcim_pkg: sizes, instruction format, opcodes, CSR map and controller bundles shared by the
// GPCIM (general-purpose compute-in-memory) core.
//
// Sizes that follow the published design: 4 cores, 4 CCU lanes of 32 bit, a 32x64 activation
// array (DAMEM, two 32x32 banks), a 128x128 output array (DOMEM), 32-row adder trees fed with
// 8-bit activations, and the 32-bit instruction word whose bits [31:29] are location pointers
// for R0, R1 and RD (0 = DAMEM, 1 = DOMEM), followed by the opcode, R0/Imm [23:16], R1 [15:8]
// and RD/Imm [7:0]. Instruction and weight memory depths (1024 words, 128 x 256-bit entries)
// are this design's split of the per-core SRAM budget; the opcode numbering, the R0 operand
// kind bits and the CSR map are this design's own encoding.
package gpcim_pkg;

  localparam int XLEN     = 32;   // CPU word
  localparam int LANES    = 4;    // CCUs per macro = vector lanes
  localparam int DA_ROWS  = 32;   // DAMEM rows (= adder tree inputs)
  localparam int DA_COLS  = 64;   // DAMEM columns, two banks of 32
  localparam int DA_BANKW = 32;   // columns per DAMEM bank
  localparam int DA_VREGS = DA_ROWS / 2;  // a DAMEM vector register spans two 64-bit rows
  localparam int DO_ROWS  = 128;  // DOMEM rows, one 128-bit vector register each
  localparam int ACT_W    = 8;    // DNN activation precision
  localparam int WGT_W    = 8;    // DNN weight precision (bit-serial)
  localparam int TREE_W   = 40;   // adder tree word: wide enough for a 32b x 8b product
  localparam int IC_DEPTH = 1024; // instruction words per core
  localparam int WS_DEPTH = 128;  // weight entries per core
  localparam int WS_WIDTH = DA_ROWS * WGT_W;  // one 8-bit weight per DAMEM row

  typedef logic [XLEN-1:0]       word_t;
  typedef word_t [LANES-1:0]     vec_t;

  typedef enum logic [4:0] {
    OP_VAND   = 5'd0,  OP_VOR    = 5'd1,  OP_VXOR  = 5'd2,  OP_VNAND = 5'd3,
    OP_VNOR   = 5'd4,  OP_VXNOR  = 5'd5,  OP_VADD  = 5'd6,  OP_VSUB  = 5'd7,
    OP_VRSUB  = 5'd8,  OP_VMIN   = 5'd9,  OP_VMINU = 5'd10, OP_VMAX  = 5'd11,
    OP_VMAXU  = 5'd12, OP_VEXT   = 5'd13, OP_VMUL  = 5'd14, OP_VMULH = 5'd15,
    OP_VMERGE = 5'd16, OP_VSLL   = 5'd17, OP_VSRL  = 5'd18, OP_VSRA  = 5'd19,
    OP_VMV    = 5'd20, OP_VMVI   = 5'd21, OP_VCGT  = 5'd22, OP_VCLT  = 5'd23,
    OP_VCEQ   = 5'd24, OP_JMP    = 5'd25, OP_BGT   = 5'd26, OP_BLT   = 5'd27,
    OP_BEQ    = 5'd28, OP_MVCSR  = 5'd29, OP_SWITCH = 5'd30, OP_PCS  = 5'd31
  } opcode_e;

  typedef struct packed {
    logic    loc_r0;   // [31]
    logic    loc_r1;   // [30]
    logic    loc_rd;   // [29]
    opcode_e op;       // [28:24]
    logic [7:0] r0;    // [23:16] register, scalar or immediate
    logic [7:0] r1;    // [15:8]
    logic [7:0] rd;    // [7:0]  register, CSR number or branch offset
  } instr_t;

  localparam logic LOC_DAMEM = 1'b0;
  localparam logic LOC_DOMEM = 1'b1;

  // R0 field: [7]=1 -> signed 7-bit immediate in [6:0];
  //           [7:6]=01 -> scalar: lane 0 of register [5:0] broadcast; [7:6]=00 -> vector register [5:0]
  localparam logic [1:0] R0_VEC = 2'b00;
  localparam logic [1:0] R0_SCA = 2'b01;

  // CSR numbers (MVCSR destination)
  localparam int CSR_WBASE = 0;  // weight control: first weight entry
  localparam int CSR_NOUT  = 1;  // weight control: number of output channels
  localparam int CSR_BANK  = 2;  // bitcell control: DAMEM bank holding the activations
  localparam int CSR_OBASE = 3;  // bitcell control: first DOMEM output row
  localparam int CSR_ACT   = 4;  // parameter: activation function (bit 0 = ReLU)
  localparam int CSR_SCALE = 5;  // parameter: scaling factor, arithmetic right shift [4:0]
  localparam int CSR_TACC  = 6;  // adder tree: bit 0 = add the DOMEM partial sum
  localparam int CSR_TEN   = 7;  // adder tree: lane enable mask [3:0]
  localparam int N_CSR     = 8;

  // Host access targets (scan path)
  typedef enum logic [2:0] {
    TGT_ICACHE = 3'd0, TGT_WSRAM = 3'd1, TGT_DAMEM = 3'd2, TGT_DOMEM = 3'd3, TGT_CTRL = 3'd4
  } host_tgt_e;

  // CPU-mode control of the macro, driven by the bottom controller.
  typedef struct packed {
    logic [3:0] da_addr;     // DAMEM vector register read
    logic [6:0] do_addr_a;   // DOMEM port A read
    logic [6:0] do_addr_b;   // DOMEM port B read
    logic       a_src;       // R0 from DAMEM (0) or DOMEM port A (1)
    logic       a_imm_en;    // R0 is an immediate
    logic       a_scalar;    // broadcast lane 0 of R0
    word_t      a_imm;
    logic       b_src;       // R1 from DAMEM (0) or DOMEM port B (1)
    logic       lat_a_en;
    logic       lat_b_en;
    logic       lat_m_en;    // latch DOMEM port A into the mask/partial-sum latch
    opcode_e    op;
    logic [1:0] ext_sel;     // VEXT: [0] signed, [1] 16-bit source
    logic [1:0] mul_step;    // VMUL/VMULH byte step 0..3
    logic       wr_en;
    logic       wr_loc;
    logic [3:0] wr_lane;
    logic [6:0] wr_addr;
  } cpu_ctl_t;

  // DNN-mode control of the macro, driven by the top controller.
  typedef struct packed {
    logic [DA_ROWS-1:0] wl_weight;  // one weight bit per DAMEM row
    logic       bank;
    logic       first;       // first (most significant) weight bit of a dot product
    logic       step;        // shift-accumulate the adder tree sum
    logic       neg;         // subtract this bit's sum (two's-complement weight sign bit)
    logic       acc_en;      // add partial sum from DOMEM
    logic       relu_en;
    logic [4:0] shift;
    logic [6:0] psum_addr;
    logic       lat_m_en;
    logic       wr_en;
    logic [3:0] wr_lane;
    logic [6:0] wr_addr;
  } dnn_ctl_t;

  // Phase outputs of the pulse generator (one clock cycle of a CIM access).
  typedef struct packed {
    logic wb_en;
    logic prc_en;
    logic wl_a;
    logic wl_b;
    logic sense_clk;
    logic latch;
  } pulse_t;

  function automatic logic [31:0] enc(input logic lr0, input logic lr1, input logic lrd,
                                      input opcode_e op, input logic [7:0] r0,
                                      input logic [7:0] r1, input logic [7:0] rd);
    instr_t i;
    i = '{loc_r0: lr0, loc_r1: lr1, loc_rd: lrd, op: op, r0: r0, r1: r1, rd: rd};
    return i;
  endfunction

endpackage

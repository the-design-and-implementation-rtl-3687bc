// lp_pkg: types and constants shared by the low-power ARM ID/EX datapath.
//
// The design freezes the function units of an ARM9TDMI-style execution
// stage (ALU, barrel shifter, multiplier) when the instruction in flight does
// not need them, and routes "dummy" moves and zero shifts around them.  This
// package holds the ARM field encodings (data-processing opcodes, shift types)
// and the packed structs that make up the ID/EX inter-stage latch: the
// execution-stage control code (split into OSU/mux control, ALU control code,
// shifter control code and multiplier control code, as the execution stage
// control code is split in the design's block diagram), the memory-stage and
// write-back-stage control codes, the unit-usage summary produced by the
// enhanced decoder, and the per-field latch enables produced by the
// Partial-Latch-Control unit.  Field layouts are this design's own choice.
package lp_pkg;

  localparam int unsigned XLEN = 32;   // ARM word width
  typedef logic [XLEN-1:0] word_t;
  typedef logic [3:0]      reg_idx_t;  // r0..r15

  // ARM data-processing opcodes, instruction bits [24:21]
  typedef enum logic [3:0] {
    OP_AND = 4'h0, OP_EOR = 4'h1, OP_SUB = 4'h2, OP_RSB = 4'h3,
    OP_ADD = 4'h4, OP_ADC = 4'h5, OP_SBC = 4'h6, OP_RSC = 4'h7,
    OP_TST = 4'h8, OP_TEQ = 4'h9, OP_CMP = 4'hA, OP_CMN = 4'hB,
    OP_ORR = 4'hC, OP_MOV = 4'hD, OP_BIC = 4'hE, OP_MVN = 4'hF
  } alu_op_e;

  // ARM shift types, instruction bits [6:5]
  typedef enum logic [1:0] {SH_LSL = 2'd0, SH_LSR = 2'd1, SH_ASR = 2'd2, SH_ROR = 2'd3} shift_e;

  // NZCV condition flags
  typedef struct packed {logic n; logic z; logic c; logic v;} flags_t;

  // OSU control signals and operand-mux selects.  Loaded every cycle: they
  // say which units work this cycle and which operands reach them.
  typedef struct packed {
    logic  alu_en;     // ALU works: its OSUs pass new operands
    logic  shift_en;   // shifter works
    logic  mul_en;     // multiplier works
    logic  alu_byp;    // dummy move: result taken from the B path, ALU frozen
    logic  shift_byp;  // dummy shift: B-mux value routed around the shifter
    logic  a_pc;       // A mux: 1 = PC (branch), 0 = operand1
    logic  b_imm;      // B mux: 1 = immediate, 0 = operand2
    word_t imm;        // immediate for the B mux
  } osu_ctrl_t;

  typedef struct packed {alu_op_e op;} alu_ctrl_t;

  typedef struct packed {
    shift_e     stype;
    logic       amt_reg;   // C mux: 1 = amount from operand3[7:0], 0 = imm_amt
    logic       imm_form;  // immediate-shift encoding: LSR/ASR #0 mean 32, ROR #0 means RRX
    logic [4:0] imm_amt;
  } shift_ctrl_t;

  typedef struct packed {logic acc;} mul_ctrl_t;

  typedef struct packed {
    osu_ctrl_t   osu;
    alu_ctrl_t   alu;
    shift_ctrl_t sh;
    mul_ctrl_t   mul;
  } ex_ctrl_t;

  typedef struct packed {
    logic load;
    logic store;
    logic byte_acc;
    logic half;     // halfword transfer
    logic sign_ext; // signed load (LDRSB, LDRSH)
    logic post;     // post-indexed: the address is the unmodified base
  } mem_ctrl_t;

  typedef struct packed {
    logic     valid;
    logic     unsupported;  // instruction class this datapath does not execute
    logic [3:0] cond;
    reg_idx_t rd;
    logic     rd_we;        // result written to rd (not for loads)
    logic     set_flags;
    logic     base_wb;      // load/store base register write-back
    reg_idx_t rn;
    logic     branch;
    logic     link;
    logic     exchange;     // BX: branch to a register, bit 0 selects the instruction set
  } wb_ctrl_t;

  // What the decoder found out about the instruction in ID.
  typedef struct packed {
    logic alu_used;    // ALU computes (not a dummy move)
    logic shift_used;  // shifter computes (not a dummy shift)
    logic mul_used;
    logic reads1;      // operand1 (port 1) is read
    logic reads2;
    logic reads3;
    logic uses_pc;
  } usage_t;

  // L_ctrl: load enables of the ID/EX latch fields
  typedef struct packed {
    logic osu;
    logic alu;
    logic sh;
    logic mul;
    logic mem;
    logic wb;
    logic op1;
    logic op2;
    logic op3;
    logic pc;
  } lctrl_t;

  // Unit activity of the instruction in EX, for power bookkeeping
  typedef struct packed {
    logic alu_active;
    logic shift_active;
    logic mul_active;
    logic alu_bypass;
    logic shift_bypass;
  } unit_status_t;

endpackage

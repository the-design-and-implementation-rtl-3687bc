// insn_decoder: enhanced ARM instruction decoder of the ID stage.
//
// Besides the usual control codes for the execution, memory and write-back
// stages, it works out in advance which function units the instruction will
// leave idle in EX and which of its operations are dummy operations:
//   * a data-processing MOV only transfers its second operand, so the ALU is
//     not needed (alu_byp);
//   * an operand 2 that is a register with LSL #0, or an immediate with a
//     rotate of 0, passes the shifter unchanged, so the shifter is not needed
//     (shift_byp).
// The usage summary goes to the Partial-Latch-Control unit; the OSU enables
// travel in the execution-stage control code.
//
// Classes decoded: data processing (immediate, immediate-shift and
// register-shift forms), MUL/MLA, single word/byte load/store and halfword /
// signed-byte load/store (ALU computes the address), B/BL (ALU adds the
// offset to the PC) and BX (the target register passes both bypasses).
// Anything else (long multiply, swap, MRS/MSR, block transfers, coprocessor,
// SWI, condition 1111, Thumb) is flagged unsupported and leaves every unit
// frozen.
// A bubble (valid = 0) also freezes every unit.
//
// Register read ports: port 1 = Rn (for MUL/MLA the accumulator), port 2 = Rm,
// port 3 = Rs, or Rd for a store.  The read ports, class list and field
// layout are this design's choices; the encodings are the ARM ones.
//
// Interface: valid, instr -> ex_ctrl, mem_ctrl, wb_ctrl, usage, ra1..ra3.
// Purely combinational.
module insn_decoder
  import lp_pkg::*;
(
  input  logic      valid,
  input  word_t     instr,
  output ex_ctrl_t  ex_ctrl,
  output mem_ctrl_t mem_ctrl,
  output wb_ctrl_t  wb_ctrl,
  output usage_t    usage,
  output reg_idx_t  ra1,
  output reg_idx_t  ra2,
  output reg_idx_t  ra3
);
  logic    is_mul, is_dp, is_ls, is_hw, is_bx, is_br, is_test;
  alu_op_e opc;

  always_comb begin
    opc     = alu_op_e'(instr[24:21]);
    is_test = (instr[24:23] == 2'b10);  // TST, TEQ, CMP, CMN
    is_mul  = 1'b0; is_dp = 1'b0; is_ls = 1'b0; is_hw = 1'b0; is_bx = 1'b0; is_br = 1'b0;
    if (valid && instr[31:28] != 4'b1111) begin
      if (instr[27:22] == 6'b000000 && instr[7:4] == 4'b1001)
        is_mul = 1'b1;
      else if (instr[27:4] == 24'h12FFF1)
        is_bx = 1'b1;
      else if (instr[27:25] == 3'b000 && instr[7] && instr[4] && instr[6:5] != 2'b00 &&
               (instr[20] || instr[6:5] == 2'b01))
        is_hw = 1'b1;                     // LDRH, STRH, LDRSB, LDRSH
      else if (instr[27:26] == 2'b00 &&
               !(instr[25] == 1'b0 && instr[7] == 1'b1 && instr[4] == 1'b1) &&
               !(is_test && instr[20] == 1'b0))
        is_dp = 1'b1;
      else if (instr[27:26] == 2'b01 && !(instr[25] && instr[4]))
        is_ls = 1'b1;
      else if (instr[27:25] == 3'b101)
        is_br = 1'b1;
    end

    ex_ctrl  = '0;
    mem_ctrl = '0;
    wb_ctrl  = '0;
    usage    = '0;
    ra1 = instr[19:16];
    ra2 = instr[3:0];
    ra3 = instr[11:8];

    wb_ctrl.valid       = valid;
    wb_ctrl.unsupported = valid && !(is_mul || is_dp || is_ls || is_hw || is_bx || is_br);
    wb_ctrl.cond        = instr[31:28];
    wb_ctrl.rn          = instr[19:16];
    wb_ctrl.rd          = instr[15:12];
    ex_ctrl.alu.op      = opc;
    ex_ctrl.sh.stype    = SH_LSL;

    if (is_mul) begin
      ra1 = instr[15:12];                 // accumulator Rn
      ra2 = instr[3:0];                   // Rm
      ra3 = instr[11:8];                  // Rs
      wb_ctrl.rd        = instr[19:16];
      wb_ctrl.rd_we     = 1'b1;
      wb_ctrl.set_flags = instr[20];
      ex_ctrl.mul.acc   = instr[21];
      ex_ctrl.osu.mul_en = 1'b1;
      usage.mul_used = 1'b1;
      usage.reads1   = instr[21];
      usage.reads2   = 1'b1;
      usage.reads3   = 1'b1;
    end

    if (is_dp || is_ls) begin
      // second operand through the B mux and the shifter
      if (is_dp && instr[25]) begin
        // 8-bit immediate rotated right by twice the rotate field
        ex_ctrl.osu.b_imm  = 1'b1;
        ex_ctrl.osu.imm    = word_t'(instr[7:0]);
        ex_ctrl.sh.stype   = SH_ROR;
        ex_ctrl.sh.imm_amt = {instr[11:8], 1'b0};
        ex_ctrl.osu.shift_byp = (instr[11:8] == 4'd0);
      end else if (is_ls && !instr[25]) begin
        // 12-bit immediate offset: nothing to shift
        ex_ctrl.osu.b_imm  = 1'b1;
        ex_ctrl.osu.imm    = word_t'(instr[11:0]);
        ex_ctrl.osu.shift_byp = 1'b1;
      end else begin
        usage.reads2 = 1'b1;
        ex_ctrl.sh.stype = shift_e'(instr[6:5]);
        if (is_dp && instr[4]) begin
          ex_ctrl.sh.amt_reg = 1'b1;      // shift amount from Rs
          usage.reads3 = 1'b1;
        end else begin
          ex_ctrl.sh.imm_form = 1'b1;
          ex_ctrl.sh.imm_amt  = instr[11:7];
          ex_ctrl.osu.shift_byp = (instr[6:5] == 2'b00) && (instr[11:7] == 5'd0);
        end
      end
      ex_ctrl.osu.shift_en = !ex_ctrl.osu.shift_byp;
      usage.shift_used     = !ex_ctrl.osu.shift_byp;
    end

    if (is_dp) begin
      wb_ctrl.rd_we     = !is_test;
      wb_ctrl.set_flags = instr[20];
      if (opc == OP_MOV) begin
        ex_ctrl.osu.alu_byp = 1'b1;       // dummy move
      end else begin
        ex_ctrl.osu.alu_en = 1'b1;
        usage.alu_used     = 1'b1;
        usage.reads1       = (opc != OP_MVN);
      end
    end

    if (is_ls) begin
      ex_ctrl.alu.op     = instr[23] ? OP_ADD : OP_SUB;
      ex_ctrl.osu.alu_en = 1'b1;
      usage.alu_used     = 1'b1;
      usage.reads1       = 1'b1;
      mem_ctrl.load      = instr[20];
      mem_ctrl.store     = !instr[20];
      mem_ctrl.byte_acc  = instr[22];
      mem_ctrl.post      = !instr[24];
      wb_ctrl.base_wb    = !instr[24] || instr[21];
      if (!instr[20]) begin
        ra3 = instr[15:12];               // store data Rd
        usage.reads3 = 1'b1;
      end
    end

    if (is_hw) begin
      // halfword and signed transfers: offset is an 8-bit immediate or Rm,
      // never shifted, so the shifter is always bypassed
      if (instr[22]) begin
        ex_ctrl.osu.b_imm = 1'b1;
        ex_ctrl.osu.imm   = word_t'({instr[11:8], instr[3:0]});
      end else begin
        usage.reads2 = 1'b1;
      end
      ex_ctrl.sh.imm_form   = 1'b1;       // LSL #0
      ex_ctrl.osu.shift_byp = 1'b1;
      ex_ctrl.alu.op     = instr[23] ? OP_ADD : OP_SUB;
      ex_ctrl.osu.alu_en = 1'b1;
      usage.alu_used     = 1'b1;
      usage.reads1       = 1'b1;
      mem_ctrl.load      = instr[20];
      mem_ctrl.store     = !instr[20];
      mem_ctrl.half      = instr[5];
      mem_ctrl.byte_acc  = !instr[5];
      mem_ctrl.sign_ext  = instr[6];
      mem_ctrl.post      = !instr[24];
      wb_ctrl.base_wb    = !instr[24] || instr[21];
      if (!instr[20]) begin
        ra3 = instr[15:12];
        usage.reads3 = 1'b1;
      end
    end

    if (is_bx) begin
      // BX Rm: the target is Rm itself, a dummy move through both bypasses
      ex_ctrl.osu.alu_byp   = 1'b1;
      ex_ctrl.osu.shift_byp = 1'b1;
      usage.reads2     = 1'b1;
      wb_ctrl.branch   = 1'b1;
      wb_ctrl.exchange = 1'b1;
    end

    if (is_br) begin
      ex_ctrl.osu.a_pc   = 1'b1;
      ex_ctrl.osu.b_imm  = 1'b1;
      ex_ctrl.osu.imm    = {{8{instr[23]}}, instr[23:0]};
      ex_ctrl.sh.stype   = SH_LSL;
      ex_ctrl.sh.imm_form = 1'b1;
      ex_ctrl.sh.imm_amt = 5'd2;          // word offset to byte offset
      ex_ctrl.alu.op     = OP_ADD;
      ex_ctrl.osu.alu_en = 1'b1;
      ex_ctrl.osu.shift_en = 1'b1;
      usage.alu_used   = 1'b1;
      usage.shift_used = 1'b1;
      usage.uses_pc    = 1'b1;
      wb_ctrl.branch   = 1'b1;
      wb_ctrl.link     = instr[24];
    end
  end
endmodule

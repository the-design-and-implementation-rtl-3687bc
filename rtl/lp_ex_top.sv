// lp_ex_top: low-power decode and execute stages of an ARM9TDMI-style core.
//
// The ID stage decodes the instruction with the enhanced decoder, which
// also tells which function units (ALU, barrel shifter, multiplier) the
// instruction leaves idle and whether it is a dummy move or dummy shift.  The
// Partial-Latch-Control unit turns that into per-field load enables of the
// ID/EX inter-stage latch, so the control codes of idle units and operands
// nobody reads keep their previous values.  In EX, Operand-Selection Units hold
// the previous operands of idle units and the extra data-paths route dummy
// operations around the ALU and the shifter.  The results are the same as
// those of an unmodified datapath; only the switching inside idle units is
// avoided.
//
// The rest of the processor (fetch, register bank, memory and write-back
// stages, condition evaluation, CPSR) is outside this block:
//   ID side : id_valid, id_instr, id_pc (the value the PC reads as, i.e. the
//             instruction address + 8), read addresses ra1..ra3 out and the
//             register values rd1..rd3 in, in the same cycle (the register
//             bank is expected to forward the result of the instruction in EX);
//   EX side : ex_result (ALU/multiplier result, branch target, or the
//             updated base of a load/store), ex_mem_addr, ex_store_data,
//             ex_flags (the NZCV the instruction sets when ex_wb.set_flags),
//             ex_mem and ex_wb control codes for the later stages,
//             ex_status (which units worked or were bypassed);
//   cpsr_flags: the current NZCV, read in EX.
// Timing: one instruction per clock; an instruction presented in ID in cycle
// t has its results on the EX outputs during cycle t+1.  Reset is
// asynchronous and active low.  The memory- and write-back-stage control
// codes carry the condition field; the later stages are expected to discard an
// instruction whose condition fails.
module lp_ex_top
  import lp_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  // ID stage
  input  logic         id_valid,
  input  word_t        id_instr,
  input  word_t        id_pc,
  output reg_idx_t     ra1,
  output reg_idx_t     ra2,
  output reg_idx_t     ra3,
  input  word_t        rd1,
  input  word_t        rd2,
  input  word_t        rd3,
  // CPSR flags
  input  flags_t       cpsr_flags,
  // EX stage
  output word_t        ex_result,
  output word_t        ex_mem_addr,
  output word_t        ex_store_data,
  output flags_t       ex_flags,
  output mem_ctrl_t    ex_mem,
  output wb_ctrl_t     ex_wb,
  output unit_status_t ex_status
);
  ex_ctrl_t  d_ex, q_ex;
  mem_ctrl_t d_mem;
  wb_ctrl_t  d_wb;
  usage_t    usage;
  lctrl_t    lctrl;
  word_t     q_op1, q_op2, q_op3, q_pc;

  insn_decoder u_dec (
    .valid(id_valid), .instr(id_instr), .ex_ctrl(d_ex), .mem_ctrl(d_mem),
    .wb_ctrl(d_wb), .usage, .ra1, .ra2, .ra3
  );

  plc u_plc (.valid(id_valid), .usage, .lctrl);

  idex_latch u_idex (
    .clk, .rst_n, .lctrl,
    .d_ex, .d_mem, .d_wb, .d_op1(rd1), .d_op2(rd2), .d_op3(rd3), .d_pc(id_pc),
    .q_ex, .q_mem(ex_mem), .q_wb(ex_wb), .q_op1, .q_op2, .q_op3, .q_pc
  );

  ex_stage u_ex (
    .clk, .rst_n, .ctrl(q_ex), .op1(q_op1), .op2(q_op2), .op3(q_op3), .pc(q_pc),
    .flags_in(cpsr_flags), .result(ex_result), .flags(ex_flags), .status(ex_status)
  );

  assign ex_mem_addr   = ex_mem.post ? q_op1 : ex_result;
  assign ex_store_data = q_op3;
endmodule

// idex_latch: ID/EX inter-stage latch with partial loading.
//
// Holds the execution-stage control code (OSU control, ALU, shifter and
// multiplier control codes), the memory-stage and write-back-stage control
// codes, the three operands read from the register bank and the PC.  Each of
// these fields is a register with its own load enable from L_ctrl, so that a
// field the Partial-Latch-Control unit does not load keeps its previous value.
//
// Interface: clk, rst_n (asynchronous, active low, clears every field),
// lctrl, the ID-side values (d_*) and the EX-side registers (q_*).
// Timing: every field with its enable set is loaded at the rising clock edge.
module idex_latch
  import lp_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  lctrl_t    lctrl,
  input  ex_ctrl_t  d_ex,
  input  mem_ctrl_t d_mem,
  input  wb_ctrl_t  d_wb,
  input  word_t     d_op1,
  input  word_t     d_op2,
  input  word_t     d_op3,
  input  word_t     d_pc,
  output ex_ctrl_t  q_ex,
  output mem_ctrl_t q_mem,
  output wb_ctrl_t  q_wb,
  output word_t     q_op1,
  output word_t     q_op2,
  output word_t     q_op3,
  output word_t     q_pc
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_ex  <= '0;
      q_mem <= '0;
      q_wb  <= '0;
      q_op1 <= '0;
      q_op2 <= '0;
      q_op3 <= '0;
      q_pc  <= '0;
    end else begin
      if (lctrl.osu) q_ex.osu <= d_ex.osu;
      if (lctrl.alu) q_ex.alu <= d_ex.alu;
      if (lctrl.sh)  q_ex.sh  <= d_ex.sh;
      if (lctrl.mul) q_ex.mul <= d_ex.mul;
      if (lctrl.mem) q_mem    <= d_mem;
      if (lctrl.wb)  q_wb     <= d_wb;
      if (lctrl.op1) q_op1    <= d_op1;
      if (lctrl.op2) q_op2    <= d_op2;
      if (lctrl.op3) q_op3    <= d_op3;
      if (lctrl.pc)  q_pc     <= d_pc;
    end
  end
endmodule

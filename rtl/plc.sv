// plc: Partial-Latch-Control unit.
//
// Generates L_ctrl, the per-field load enables of the ID/EX inter-stage
// latch, from the decoder's unit-usage summary.  A field belonging to a
// function unit the next instruction leaves idle is not reloaded, so the
// unit's control code (and any operand register nobody reads) keeps the value
// of the previous cycle and the unit's inputs do not switch:
//   ALU control code        loaded only when the ALU computes
//   shifter control code    loaded only when the shifter computes
//   multiplier control code loaded only when the multiplier computes
//   operand1/2/3, PC        loaded only when the instruction reads them
// The OSU control signals and the memory- and write-back-stage control codes
// are loaded every cycle, since they describe the instruction itself.
// A bubble (valid = 0) reloads nothing but those always-loaded fields.
//
// Interface: valid, usage -> lctrl.  Purely combinational; the latch itself is
// idex_latch.  Which fields are partial is this design's reading of the
// statement that the unit "retains partial control codes or/and operand
// values" when a function unit is not used.
module plc
  import lp_pkg::*;
(
  input  logic   valid,
  input  usage_t usage,
  output lctrl_t lctrl
);
  always_comb begin
    lctrl.osu = 1'b1;
    lctrl.mem = 1'b1;
    lctrl.wb  = 1'b1;
    lctrl.alu = valid & usage.alu_used;
    lctrl.sh  = valid & usage.shift_used;
    lctrl.mul = valid & usage.mul_used;
    lctrl.op1 = valid & usage.reads1;
    lctrl.op2 = valid & usage.reads2;
    lctrl.op3 = valid & usage.reads3;
    lctrl.pc  = valid & usage.uses_pc;
  end
endmodule

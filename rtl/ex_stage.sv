// ex_stage: execution stage with Operand-Selection Units and bypass paths.
//
// The three operand muxes pick the function-unit operands from the ID/EX
// latch: the A mux gives the ALU's first operand (operand1 or the PC), the
// B mux the value to be shifted (operand2 or the immediate) and the C mux the
// shift amount (operand3[7:0] or the immediate amount of the shifter control
// code).  Every input of the ALU, the shifter and the multiplier passes
// through an OSU (osu) whose select is that unit's enable from the OSU control
// signals, so a unit that does not work this cycle keeps the operands of the
// last cycle it worked, while its control code is kept by the ID/EX latch.
//
// Two extra data-paths take dummy operations around the units:
//   * shift bypass: for LSL #0 or an unrotated immediate, the B-mux value goes
//     straight to the ALU's second operand and the shifter stays frozen; the
//     shifter carry is then the CPSR C flag, as ARM defines for LSL #0;
//   * move bypass: for MOV the second operand (from the shifter or from the
//     shift bypass) is the result and the ALU stays frozen.
// The result mux picks the multiplier, the move bypass or the ALU.
//
// Interface: clk, rst_n, ctrl (execution-stage control code), op1..op3, pc,
// flags_in (CPSR) -> result, flags (the NZCV the instruction would set),
// status (which units worked or were bypassed).
// Timing: combinational from the ID/EX latch to result; the OSU latches update
// at the rising clock edge.  Assertions check that the control code never
// enables a unit together with its own bypass, nor the multiplier together
// with the ALU or shifter.
// One OSU per function-unit input (including the one-bit carry and overflow
// inputs) is this design's choice; the original design shows OSUs between the
// operand muxes and the units without naming each one.
module ex_stage
  import lp_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  ex_ctrl_t     ctrl,
  input  word_t        op1,
  input  word_t        op2,
  input  word_t        op3,
  input  word_t        pc,
  input  flags_t       flags_in,
  output word_t        result,
  output flags_t       flags,
  output unit_status_t status
);
  // operand muxes
  word_t      a_mux, b_mux;
  logic [7:0] c_mux;
  assign a_mux = ctrl.osu.a_pc  ? pc : op1;
  assign b_mux = ctrl.osu.b_imm ? ctrl.osu.imm : op2;
  assign c_mux = ctrl.sh.amt_reg ? op3[7:0] : {3'b000, ctrl.sh.imm_amt};

  // shifter and its OSUs
  word_t      sh_val, sh_res;
  logic [7:0] sh_amt;
  logic       sh_cin, sh_cout;

  osu #(.W(32)) u_osu_sh_val (.clk, .rst_n, .sel(ctrl.osu.shift_en), .new_val(b_mux),      .out(sh_val));
  osu #(.W(8))  u_osu_sh_amt (.clk, .rst_n, .sel(ctrl.osu.shift_en), .new_val(c_mux),      .out(sh_amt));
  osu #(.W(1))  u_osu_sh_cin (.clk, .rst_n, .sel(ctrl.osu.shift_en), .new_val(flags_in.c), .out(sh_cin));

  arm_shifter u_shifter (
    .val(sh_val), .amt(sh_amt), .stype(ctrl.sh.stype), .imm_form(ctrl.sh.imm_form),
    .c_in(sh_cin), .res(sh_res), .c_out(sh_cout)
  );

  // shift bypass: second operand and shifter carry
  word_t b_path;
  logic  b_carry;
  assign b_path  = ctrl.osu.shift_byp ? b_mux      : sh_res;
  assign b_carry = ctrl.osu.shift_byp ? flags_in.c : sh_cout;

  // ALU and its OSUs
  word_t      alu_a, alu_b, alu_res;
  logic [2:0] alu_fin;
  flags_t     alu_flags;

  osu #(.W(32)) u_osu_alu_a (.clk, .rst_n, .sel(ctrl.osu.alu_en), .new_val(a_mux),  .out(alu_a));
  osu #(.W(32)) u_osu_alu_b (.clk, .rst_n, .sel(ctrl.osu.alu_en), .new_val(b_path), .out(alu_b));
  osu #(.W(3))  u_osu_alu_f (.clk, .rst_n, .sel(ctrl.osu.alu_en),
                             .new_val({flags_in.c, flags_in.v, b_carry}), .out(alu_fin));

  arm_alu u_alu (
    .a(alu_a), .b(alu_b), .op(ctrl.alu.op), .c_in(alu_fin[2]), .v_in(alu_fin[1]),
    .sh_carry(alu_fin[0]), .res(alu_res), .flags(alu_flags)
  );

  // multiplier and its OSUs: a = Rm (operand2), b = Rs (operand3), c = Rn (operand1)
  word_t mul_a, mul_b, mul_c, mul_res;

  osu #(.W(32)) u_osu_mul_a (.clk, .rst_n, .sel(ctrl.osu.mul_en), .new_val(op2), .out(mul_a));
  osu #(.W(32)) u_osu_mul_b (.clk, .rst_n, .sel(ctrl.osu.mul_en), .new_val(op3), .out(mul_b));
  osu #(.W(32)) u_osu_mul_c (.clk, .rst_n, .sel(ctrl.osu.mul_en), .new_val(op1), .out(mul_c));

  arm_multiplier u_mul (.a(mul_a), .b(mul_b), .c(mul_c), .acc(ctrl.mul.acc), .res(mul_res));

  // result mux and flags
  always_comb begin
    if (ctrl.osu.mul_en) begin
      result = mul_res;
      flags  = '{n: mul_res[31], z: (mul_res == '0), c: flags_in.c, v: flags_in.v};
    end else if (ctrl.osu.alu_byp) begin
      result = b_path;
      flags  = '{n: b_path[31], z: (b_path == '0), c: b_carry, v: flags_in.v};
    end else begin
      result = alu_res;
      flags  = alu_flags;
    end
  end

  // Rules of the execution-stage control code: a bypassed unit never works,
  // and the multiplier never works together with the ALU or the shifter.
  a_alu_byp_frozen: assert property (@(posedge clk) disable iff (!rst_n)
                                     !(ctrl.osu.alu_en && ctrl.osu.alu_byp));
  a_sh_byp_frozen:  assert property (@(posedge clk) disable iff (!rst_n)
                                     !(ctrl.osu.shift_en && ctrl.osu.shift_byp));
  a_mul_alone:      assert property (@(posedge clk) disable iff (!rst_n)
                                     !(ctrl.osu.mul_en && (ctrl.osu.alu_en || ctrl.osu.shift_en ||
                                                           ctrl.osu.alu_byp)));

  assign status = '{alu_active:   ctrl.osu.alu_en,
                    shift_active: ctrl.osu.shift_en,
                    mul_active:   ctrl.osu.mul_en,
                    alu_bypass:   ctrl.osu.alu_byp,
                    shift_bypass: ctrl.osu.shift_byp};
endmodule

// tb_ex_stage: checks the execution stage on its own.
// Each cycle it applies a random execution-stage control code (ALU with the
// shifter, ALU with the shift bypass, move through the shifter, move with both
// bypasses, multiply, idle) with random operands and CPSR flags, and compares
// the result and flags with the reference model.  It also checks that the
// inputs of every unit that does not work keep the values of the previous
// cycle, and that a unit's first operation after idle cycles is still right.
module tb_ex_stage;
  import lp_pkg::*;
  import arm_ref_pkg::*;
  logic         clk = 0, rst_n = 0;
  ex_ctrl_t     ctrl;
  word_t        op1, op2, op3, pc, result;
  flags_t       flags_in, flags;
  unit_status_t status;
  int checks = 0, failures = 0;
  int n_mode[6];

  ex_stage dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  word_t p_alu_a, p_alu_b, p_sh_val, p_mul_a, p_mul_b, p_mul_c;
  logic [7:0] p_sh_amt;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("%s wrong: ctrl %h op1 %h op2 %h op3 %h -> %h %b", what, ctrl, op1, op2, op3, result, flags);
    end
  endtask

  initial begin
    int    mode;
    word_t sv, bval, exp_res;
    bit    sc;
    flags_t ef;
    ref_out_t ro;
    ctrl = '0; op1 = '0; op2 = '0; op3 = '0; pc = '0; flags_in = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      p_alu_a = dut.alu_a; p_alu_b = dut.alu_b; p_sh_val = dut.sh_val; p_sh_amt = dut.sh_amt;
      p_mul_a = dut.mul_a; p_mul_b = dut.mul_b; p_mul_c = dut.mul_c;
      mode = $urandom_range(0, 5);
      n_mode[mode]++;
      op1 = $urandom; op2 = $urandom; op3 = $urandom_range(0, 1) ? $urandom : $urandom_range(0, 40);
      pc = $urandom; flags_in = flags_t'($urandom);
      ctrl = '0;
      ctrl.alu.op = alu_op_e'($urandom_range(0, 15));
      ctrl.sh.stype = shift_e'($urandom_range(0, 3));
      ctrl.sh.amt_reg = $urandom_range(0, 1);
      ctrl.sh.imm_form = ctrl.sh.amt_reg ? 1'b0 : 1'($urandom_range(0, 1));
      ctrl.sh.imm_amt = $urandom;
      ctrl.osu.a_pc = $urandom_range(0, 1);
      ctrl.osu.b_imm = $urandom_range(0, 1);
      ctrl.osu.imm = $urandom;
      ctrl.mul.acc = $urandom_range(0, 1);
      bval = ctrl.osu.b_imm ? ctrl.osu.imm : op2;
      ref_shift(bval, ctrl.sh.amt_reg ? int'(op3[7:0]) : int'(ctrl.sh.imm_amt), ctrl.sh.stype,
                ctrl.sh.imm_form, flags_in.c, sv, sc);
      case (mode)
        0: begin ctrl.osu.alu_en = 1; ctrl.osu.shift_en = 1; end
        1: begin ctrl.osu.alu_en = 1; ctrl.osu.shift_byp = 1; sv = bval; sc = flags_in.c; end
        2: begin ctrl.osu.alu_byp = 1; ctrl.osu.shift_en = 1; end
        3: begin ctrl.osu.alu_byp = 1; ctrl.osu.shift_byp = 1; sv = bval; sc = flags_in.c; end
        4: ctrl.osu.mul_en = 1;
        default: ;
      endcase
      if (mode <= 1) begin
        ro = ref_alu(ctrl.alu.op, ctrl.osu.a_pc ? pc : op1, sv, flags_in.c, flags_in.v, sc);
        exp_res = ro.res; ef = '{n: ro.n, z: ro.z, c: ro.c, v: ro.v};
      end else if (mode <= 3) begin
        exp_res = sv; ef = '{n: sv[31], z: sv == 0, c: sc, v: flags_in.v};
      end else begin
        exp_res = op2 * op3 + (ctrl.mul.acc ? op1 : 32'd0);
        ef = '{n: exp_res[31], z: exp_res == 0, c: flags_in.c, v: flags_in.v};
      end
      #1;
      if (mode != 5) begin
        chk(result == exp_res, "result");
        chk(flags == ef, "flags");
      end
      chk(status == {ctrl.osu.alu_en, ctrl.osu.shift_en, ctrl.osu.mul_en, ctrl.osu.alu_byp,
                     ctrl.osu.shift_byp}, "status");
      if (!ctrl.osu.alu_en) chk(dut.alu_a == p_alu_a && dut.alu_b == p_alu_b, "frozen ALU inputs");
      if (!ctrl.osu.shift_en) chk(dut.sh_val == p_sh_val && dut.sh_amt == p_sh_amt, "frozen shifter inputs");
      if (!ctrl.osu.mul_en)
        chk(dut.mul_a == p_mul_a && dut.mul_b == p_mul_b && dut.mul_c == p_mul_c, "frozen multiplier inputs");
    end
    foreach (n_mode[m]) begin
      checks++;
      if (n_mode[m] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

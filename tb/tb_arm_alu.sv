// tb_arm_alu: checks all sixteen ALU opcodes and their NZCV flags against a
// 64-bit integer model, with random and corner-case operands.
module tb_arm_alu;
  import lp_pkg::*;
  import arm_ref_pkg::*;
  word_t   a, b, res;
  alu_op_e op;
  logic    c_in, v_in, sh_carry;
  flags_t  flags;
  ref_out_t e;
  int checks = 0, failures = 0;
  word_t corner[6] = '{32'h0, 32'h1, 32'h7FFF_FFFF, 32'h8000_0000, 32'hFFFF_FFFF, 32'h8000_0001};

  arm_alu dut (.a, .b, .op, .c_in, .v_in, .sh_carry, .res, .flags);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one();
    #1;
    e = ref_alu(op, a, b, c_in, v_in, sh_carry);
    checks++;
    if (res !== e.res || flags.n !== e.n || flags.z !== e.z || flags.c !== e.c || flags.v !== e.v) begin
      failures++;
      $display("op=%0d a=%h b=%h cin=%0b: res=%h nzcv=%b expected %h %b%b%b%b", op, a, b, c_in,
               res, flags, e.res, e.n, e.z, e.c, e.v);
    end
  endtask

  initial begin
    for (int o = 0; o < 16; o++) begin
      foreach (corner[i]) foreach (corner[j]) for (int k = 0; k < 4; k++) begin
        op = alu_op_e'(o); a = corner[i]; b = corner[j];
        c_in = k[0]; v_in = k[1]; sh_carry = ~k[0];
        check_one();
      end
      for (int i = 0; i < 300; i++) begin
        op = alu_op_e'(o); a = $urandom; b = $urandom;
        c_in = $urandom_range(0, 1); v_in = $urandom_range(0, 1); sh_carry = $urandom_range(0, 1);
        check_one();
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_arm_shifter: checks the barrel shifter against a bit-serial model for all
// shift types, both amount encodings, amounts 0..40 and random amounts.
module tb_arm_shifter;
  import lp_pkg::*;
  import arm_ref_pkg::*;
  word_t      val, res;
  logic [7:0] amt;
  shift_e     stype;
  logic       imm_form, c_in, c_out;
  logic [31:0] er;
  bit          ec;
  int checks = 0, failures = 0;

  arm_shifter dut (.val, .amt, .stype, .imm_form, .c_in, .res, .c_out);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one();
    #1;
    ref_shift(val, amt, stype, imm_form, c_in, er, ec);
    checks++;
    if (res !== er || c_out !== ec) begin
      failures++;
      $display("val=%h amt=%0d type=%0d immf=%0b cin=%0b: res=%h c=%0b expected %h %0b",
               val, amt, stype, imm_form, c_in, res, c_out, er, ec);
    end
  endtask

  initial begin
    for (int t = 0; t < 4; t++)
      for (int f = 0; f < 2; f++)
        for (int s = 0; s <= 40; s++)
          for (int k = 0; k < 6; k++) begin
            if (f == 1 && s > 31) continue;
            val = $urandom; stype = shift_e'(t); imm_form = f[0]; amt = 8'(s);
            c_in = $urandom_range(0, 1);
            check_one();
          end
    for (int i = 0; i < 2000; i++) begin
      val = $urandom; stype = shift_e'($urandom_range(0, 3)); imm_form = $urandom_range(0, 1);
      amt = imm_form ? 8'($urandom_range(0, 31)) : 8'($urandom);
      c_in = $urandom_range(0, 1);
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_plc: exhaustive check of the Partial-Latch-Control enables over every
// combination of the valid bit and the decoder's usage flags.
module tb_plc;
  import lp_pkg::*;
  logic   valid;
  usage_t usage;
  lctrl_t lctrl;
  logic [9:0] exp;
  int checks = 0, failures = 0;

  plc dut (.valid, .usage, .lctrl);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      valid = i[7];
      usage = usage_t'(i[6:0]);
      #1;
      // {osu, alu, sh, mul, mem, wb, op1, op2, op3, pc}
      exp[9] = 1'b1;
      exp[8] = valid && usage.alu_used;
      exp[7] = valid && usage.shift_used;
      exp[6] = valid && usage.mul_used;
      exp[5] = 1'b1;
      exp[4] = 1'b1;
      exp[3] = valid && usage.reads1;
      exp[2] = valid && usage.reads2;
      exp[1] = valid && usage.reads3;
      exp[0] = valid && usage.uses_pc;
      checks++;
      if (lctrl !== exp) begin
        failures++;
        $display("valid=%0b usage=%b: lctrl=%b expected %b", valid, usage, lctrl, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

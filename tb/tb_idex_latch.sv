// tb_idex_latch: random loads of the ID/EX latch under random per-field
// enables; every field is compared each cycle with a model that loads only
// the enabled fields.  Also checks the reset values.
module tb_idex_latch;
  import lp_pkg::*;
  logic      clk = 0, rst_n = 0;
  lctrl_t    lctrl;
  ex_ctrl_t  d_ex, q_ex, m_ex;
  mem_ctrl_t d_mem, q_mem, m_mem;
  wb_ctrl_t  d_wb, q_wb, m_wb;
  word_t     d_op1, d_op2, d_op3, d_pc, q_op1, q_op2, q_op3, q_pc;
  word_t     m_op1, m_op2, m_op3, m_pc;
  int checks = 0, failures = 0;

  idex_latch dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [63:0] rnd64();
    return {$urandom, $urandom};
  endfunction

  task automatic compare(int cyc);
    checks++;
    if (q_ex !== m_ex || q_mem !== m_mem || q_wb !== m_wb || q_op1 !== m_op1 ||
        q_op2 !== m_op2 || q_op3 !== m_op3 || q_pc !== m_pc) begin
      failures++;
      $display("cycle %0d: latch differs from model (ex %h/%h op1 %h/%h)", cyc, q_ex, m_ex, q_op1, m_op1);
    end
  endtask

  initial begin
    lctrl = '1;
    d_ex = '1; d_mem = '1; d_wb = '1; d_op1 = '1; d_op2 = '1; d_op3 = '1; d_pc = '1;
    m_ex = '0; m_mem = '0; m_wb = '0; m_op1 = '0; m_op2 = '0; m_op3 = '0; m_pc = '0;
    #12;
    compare(-1);               // held in reset
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      rst_n = 1;
      lctrl = lctrl_t'($urandom);
      d_ex  = ex_ctrl_t'({rnd64(), rnd64()});
      d_mem = mem_ctrl_t'($urandom); d_wb = wb_ctrl_t'($urandom);
      d_op1 = $urandom; d_op2 = $urandom; d_op3 = $urandom; d_pc = $urandom;
      @(posedge clk);
      if (lctrl.osu) m_ex.osu = d_ex.osu;
      if (lctrl.alu) m_ex.alu = d_ex.alu;
      if (lctrl.sh)  m_ex.sh  = d_ex.sh;
      if (lctrl.mul) m_ex.mul = d_ex.mul;
      if (lctrl.mem) m_mem = d_mem;
      if (lctrl.wb)  m_wb  = d_wb;
      if (lctrl.op1) m_op1 = d_op1;
      if (lctrl.op2) m_op2 = d_op2;
      if (lctrl.op3) m_op3 = d_op3;
      if (lctrl.pc)  m_pc  = d_pc;
      #1 compare(i);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

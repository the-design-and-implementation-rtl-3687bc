// tb_insn_decoder: directed checks of the enhanced decoder.
// Encodes ARM instructions of every supported class, plus dummy moves and
// shifts, unsupported classes and bubbles, and compares the unit-usage flags,
// OSU enables, bypass flags, operand selects, control codes and register
// read addresses with values worked out by hand from the ARM encodings.
module tb_insn_decoder;
  import lp_pkg::*;
  logic      valid;
  word_t     instr;
  ex_ctrl_t  ex_ctrl;
  mem_ctrl_t mem_ctrl;
  wb_ctrl_t  wb_ctrl;
  usage_t    usage;
  reg_idx_t  ra1, ra2, ra3;
  int checks = 0, failures = 0;
  string tag;

  insn_decoder dut (.valid, .instr, .ex_ctrl, .mem_ctrl, .wb_ctrl, .usage, .ra1, .ra2, .ra3);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [3:0] AL = 4'hE;

  function automatic word_t dp_imm(int op, bit s, int rn, int rd, int rot, int imm8);
    return {AL, 2'b00, 1'b1, 4'(op), s, 4'(rn), 4'(rd), 4'(rot), 8'(imm8)};
  endfunction
  function automatic word_t dp_rsi(int op, bit s, int rn, int rd, int amt, int typ, int rm);
    return {AL, 2'b00, 1'b0, 4'(op), s, 4'(rn), 4'(rd), 5'(amt), 2'(typ), 1'b0, 4'(rm)};
  endfunction
  function automatic word_t dp_rsr(int op, bit s, int rn, int rd, int rs, int typ, int rm);
    return {AL, 2'b00, 1'b0, 4'(op), s, 4'(rn), 4'(rd), 4'(rs), 1'b0, 2'(typ), 1'b1, 4'(rm)};
  endfunction
  function automatic word_t mul(bit acc, bit s, int rd, int rn, int rs, int rm);
    return {AL, 6'b000000, acc, s, 4'(rd), 4'(rn), 4'(rs), 4'b1001, 4'(rm)};
  endfunction
  function automatic word_t ls_imm(bit p, bit u, bit b, bit w, bit l, int rn, int rd, int off);
    return {AL, 2'b01, 1'b0, p, u, b, w, l, 4'(rn), 4'(rd), 12'(off)};
  endfunction
  function automatic word_t ls_reg(bit p, bit u, bit b, bit w, bit l, int rn, int rd, int amt, int typ, int rm);
    return {AL, 2'b01, 1'b1, p, u, b, w, l, 4'(rn), 4'(rd), 5'(amt), 2'(typ), 1'b0, 4'(rm)};
  endfunction
  function automatic word_t br(bit l, int off);
    return {AL, 3'b101, l, 24'(off)};
  endfunction

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: %s = %0h, expected %0h (instr %h)", tag, what, got, exp, instr);
    end
  endtask

  // unit enables and bypasses: {alu_en, shift_en, mul_en, alu_byp, shift_byp}
  task automatic units(logic [4:0] exp);
    chk("units", {ex_ctrl.osu.alu_en, ex_ctrl.osu.shift_en, ex_ctrl.osu.mul_en,
                  ex_ctrl.osu.alu_byp, ex_ctrl.osu.shift_byp}, exp);
    chk("usage units", {usage.alu_used, usage.shift_used, usage.mul_used}, exp[4:2]);
  endtask
  // {reads1, reads2, reads3, uses_pc}
  task automatic reads(logic [3:0] exp);
    chk("reads", {usage.reads1, usage.reads2, usage.reads3, usage.uses_pc}, exp);
  endtask

  task automatic apply(string t, word_t i, logic v = 1'b1);
    tag = t; instr = i; valid = v; #1;
  endtask

  initial begin
    // ADD r3, r1, r2, LSL #4 : ALU and shifter both work
    apply("add lsl4", dp_rsi(4, 0, 1, 3, 4, 0, 2));
    units(5'b11000); reads(4'b1100);
    chk("ra1", ra1, 1); chk("ra2", ra2, 2); chk("rd", wb_ctrl.rd, 3); chk("rd_we", wb_ctrl.rd_we, 1);
    chk("alu op", ex_ctrl.alu.op, OP_ADD); chk("stype", ex_ctrl.sh.stype, SH_LSL);
    chk("imm_form", ex_ctrl.sh.imm_form, 1); chk("imm_amt", ex_ctrl.sh.imm_amt, 4);
    chk("b_imm", ex_ctrl.osu.b_imm, 0); chk("unsupported", wb_ctrl.unsupported, 0);

    // SUBS r5, r6, r7 : LSL #0 is a dummy shift
    apply("subs", dp_rsi(2, 1, 6, 5, 0, 0, 7));
    units(5'b10001); reads(4'b1100); chk("set_flags", wb_ctrl.set_flags, 1);

    // ADD r0, r1, r2, LSR #0 means LSR #32: not a dummy
    apply("lsr32", dp_rsi(4, 0, 1, 0, 0, 1, 2));
    units(5'b11000);

    // MOV r4, r9 : dummy move and dummy shift, nothing works
    apply("mov", dp_rsi(13, 0, 0, 4, 0, 0, 9));
    units(5'b00011); reads(4'b0100); chk("ra2", ra2, 9); chk("rd_we", wb_ctrl.rd_we, 1);

    // MOV r4, r9, ASR #3 : dummy move, shifter works
    apply("mov asr", dp_rsi(13, 0, 0, 4, 3, 2, 9));
    units(5'b01010); chk("stype", ex_ctrl.sh.stype, SH_ASR);

    // MVN r4, r9 : ALU works (not a move), shift dummy, no Rn
    apply("mvn", dp_rsi(15, 0, 0, 4, 0, 0, 9));
    units(5'b10001); reads(4'b0100);

    // MOV r2, #0xFF : immediate without rotation, all bypassed
    apply("mov imm", dp_imm(13, 0, 0, 2, 0, 8'hFF));
    units(5'b00011); reads(4'b0000); chk("b_imm", ex_ctrl.osu.b_imm, 1); chk("imm", ex_ctrl.osu.imm, 32'hFF);

    // ORR r2, r3, #0x3F000000 (0x3F ror 8): shifter rotates
    apply("orr imm", dp_imm(12, 0, 3, 2, 4, 8'h3F));
    units(5'b11000); reads(4'b1000); chk("stype", ex_ctrl.sh.stype, SH_ROR);
    chk("imm_amt", ex_ctrl.sh.imm_amt, 8); chk("imm_form", ex_ctrl.sh.imm_form, 0);

    // CMP r1, r2, ROR r3 : register-specified shift, no write-back
    apply("cmp rsr", dp_rsr(10, 1, 1, 0, 3, 3, 2));
    units(5'b11000); reads(4'b1110); chk("amt_reg", ex_ctrl.sh.amt_reg, 1); chk("ra3", ra3, 3);
    chk("rd_we", wb_ctrl.rd_we, 0); chk("set_flags", wb_ctrl.set_flags, 1);

    // MLA r8, r1, r2, r3 : multiplier only
    apply("mla", mul(1, 0, 8, 3, 2, 1));
    units(5'b00100); reads(4'b1110); chk("acc", ex_ctrl.mul.acc, 1);
    chk("ra1", ra1, 3); chk("ra2", ra2, 1); chk("ra3", ra3, 2); chk("rd", wb_ctrl.rd, 8);

    // MULS r8, r1, r2 : no accumulator read
    apply("muls", mul(0, 1, 8, 0, 2, 1));
    units(5'b00100); reads(4'b0110); chk("acc", ex_ctrl.mul.acc, 0); chk("set_flags", wb_ctrl.set_flags, 1);

    // LDR r1, [r2, #-8] : ALU subtracts, offset bypasses the shifter
    apply("ldr imm", ls_imm(1, 0, 0, 0, 1, 2, 1, 8));
    units(5'b10001); reads(4'b1000); chk("alu op", ex_ctrl.alu.op, OP_SUB);
    chk("load", mem_ctrl.load, 1); chk("store", mem_ctrl.store, 0); chk("imm", ex_ctrl.osu.imm, 8);
    chk("rd_we", wb_ctrl.rd_we, 0); chk("base_wb", wb_ctrl.base_wb, 0); chk("post", mem_ctrl.post, 0);

    // STRB r7, [r2], r4, LSL #2 : post-indexed, shifter works, Rd on port 3
    apply("strb post", ls_reg(0, 1, 1, 0, 0, 2, 7, 2, 0, 4));
    units(5'b11000); reads(4'b1110); chk("ra3", ra3, 7); chk("store", mem_ctrl.store, 1);
    chk("byte", mem_ctrl.byte_acc, 1); chk("post", mem_ctrl.post, 1); chk("base_wb", wb_ctrl.base_wb, 1);
    chk("alu op", ex_ctrl.alu.op, OP_ADD);

    // BL -3 : PC + (offset << 2)
    apply("bl", br(1, -3));
    units(5'b11000); reads(4'b0001); chk("a_pc", ex_ctrl.osu.a_pc, 1);
    chk("imm", ex_ctrl.osu.imm, 32'hFFFF_FFFD); chk("imm_amt", ex_ctrl.sh.imm_amt, 2);
    chk("branch", wb_ctrl.branch, 1); chk("link", wb_ctrl.link, 1); chk("alu op", ex_ctrl.alu.op, OP_ADD);

    // unsupported: LDM, UMULL, LDRH, MRS (TST without S)
    apply("ldm", {AL, 3'b100, 1'b0, 1'b1, 1'b0, 1'b0, 1'b1, 4'd1, 16'h00F0});
    units(5'b00000); reads(4'b0000); chk("unsupported", wb_ctrl.unsupported, 1);
    apply("umull", {AL, 5'b00001, 3'b000, 4'd1, 4'd2, 4'd3, 4'b1001, 4'd4});
    units(5'b00000); chk("unsupported", wb_ctrl.unsupported, 1);
    apply("ldrd", {AL, 3'b000, 5'b11100, 4'd1, 4'd2, 4'd0, 4'b1101, 4'd4});
    units(5'b00000); chk("unsupported", wb_ctrl.unsupported, 1);

    // LDRH r2, [r1, #0x34] : ALU adds, split immediate, shifter bypassed
    apply("ldrh imm", {AL, 3'b000, 5'b11101, 4'd1, 4'd2, 4'h3, 4'b1011, 4'h4});
    units(5'b10001); reads(4'b1000); chk("unsupported", wb_ctrl.unsupported, 0);
    chk("imm", ex_ctrl.osu.imm, 32'h34); chk("b_imm", ex_ctrl.osu.b_imm, 1);
    chk("half/byte/sign", {mem_ctrl.half, mem_ctrl.byte_acc, mem_ctrl.sign_ext}, 3'b100);
    chk("load", mem_ctrl.load, 1); chk("post", mem_ctrl.post, 0); chk("alu op", ex_ctrl.alu.op, OP_ADD);

    // LDRSB r2, [r1], -r6 : post-indexed, register offset subtracted
    apply("ldrsb reg", {AL, 3'b000, 5'b00001, 4'd1, 4'd2, 4'h0, 4'b1101, 4'd6});
    units(5'b10001); reads(4'b1100); chk("ra2", ra2, 6); chk("b_imm", ex_ctrl.osu.b_imm, 0);
    chk("half/byte/sign", {mem_ctrl.half, mem_ctrl.byte_acc, mem_ctrl.sign_ext}, 3'b011);
    chk("alu op", ex_ctrl.alu.op, OP_SUB); chk("post", mem_ctrl.post, 1); chk("base_wb", wb_ctrl.base_wb, 1);

    // STRH r9, [r3, r4]! : store data on port 3
    apply("strh reg", {AL, 3'b000, 5'b11010, 4'd3, 4'd9, 4'h0, 4'b1011, 4'd4});
    units(5'b10001); reads(4'b1110); chk("ra3", ra3, 9); chk("store", mem_ctrl.store, 1);
    chk("base_wb", wb_ctrl.base_wb, 1);

    // BX r5 : both bypasses, branch with exchange
    apply("bx", {AL, 24'h12FFF1, 4'd5});
    units(5'b00011); reads(4'b0100); chk("ra2", ra2, 5);
    chk("branch/exchange/link", {wb_ctrl.branch, wb_ctrl.exchange, wb_ctrl.link}, 3'b110);
    chk("rd_we", wb_ctrl.rd_we, 0); chk("unsupported", wb_ctrl.unsupported, 0);
    apply("mrs", {AL, 5'b00010, 2'b00, 1'b0, 4'hF, 4'd3, 12'h000});
    units(5'b00000); chk("unsupported", wb_ctrl.unsupported, 1); chk("rd_we", wb_ctrl.rd_we, 0);

    // bubble: nothing works, not valid, not flagged unsupported
    apply("bubble", dp_rsi(4, 0, 1, 3, 4, 0, 2), 1'b0);
    units(5'b00000); reads(4'b0000); chk("valid", wb_ctrl.valid, 0); chk("unsupported", wb_ctrl.unsupported, 0);
    chk("rd_we", wb_ctrl.rd_we, 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

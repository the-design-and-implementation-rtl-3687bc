// tb_lp_ex_top: end-to-end test of the low-power decode/execute stages.
//
// The testbench plays the rest of the processor: it fetches a random ARM
// instruction stream (data processing in all operand forms, MUL/MLA, single
// loads and stores, B/BL, unsupported instructions and bubbles), serves the
// register reads from an architectural register model, supplies the CPSR
// flags and performs write-back, loads (from a hashed memory image) and links.
// An independent reference model (arm_ref_pkg) predicts, for every
// instruction, the EX result, flags, memory address, store data, control codes
// and which units must work or be bypassed.  The mix follows the program
// statistics the design is based on: about one shift in three has an
// immediate amount of zero and about one ALU operation in six is a move.
//
// Each cycle it also checks the freeze mechanism itself: a unit that does not
// work must see exactly the operands and control code of the previous cycle.
// It counts every mechanism (frozen ALU/shifter/multiplier, move and shift
// bypass, partially loaded control codes, bubbles, unsupported instructions)
// and fails if one never happened, and it reports the bit toggles at the
// function-unit inputs with and without the OSUs.
// Halfword/signed transfers and BX are part of the stream too.
// Override N_INSTR with +n=<count>; the default is 20000.
module tb_lp_ex_top;
  import lp_pkg::*;
  import arm_ref_pkg::*;

  logic         clk = 0, rst_n = 0;
  logic         id_valid;
  word_t        id_instr, id_pc;
  reg_idx_t     ra1, ra2, ra3;
  word_t        rd1, rd2, rd3;
  flags_t       cpsr_flags;
  word_t        ex_result, ex_mem_addr, ex_store_data;
  flags_t       ex_flags;
  mem_ctrl_t    ex_mem;
  wb_ctrl_t     ex_wb;
  unit_status_t ex_status;

  lp_ex_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int unsigned n_instr = 20000;
  longint unsigned cycle = 0;

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired at cycle %0d", cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- architectural state kept by the testbench ----------------
  word_t  regs[16];
  flags_t flags;
  word_t  pc_addr;
  word_t  snap[16];   // register values an instruction reads

  function automatic word_t mem_word(word_t a);
    return (a * 32'h9E37_79B9) ^ 32'h5A5A_1234;
  endfunction

  // ---------------- expectation of one instruction ----------------
  typedef enum {K_BUBBLE, K_DP, K_MUL, K_LS, K_BR, K_UNSUP} kind_e;
  typedef struct {
    kind_e    kind;
    word_t    instr;
    word_t    result;
    flags_t   flags;       // flags after the instruction
    flags_t   flags_in;    // CPSR seen by the instruction
    bit       check_res;
    bit       set_flags;
    bit       rd_we;
    int       rd;
    bit       load, store, post;
    word_t    addr, sdata;
    bit       branch, link, exchange;
    bit       half, sign_ext, byte_acc;
    logic [4:0] status;    // {alu, shift, mul, alu_byp, shift_byp}
    bit       uses_c;      // result depends on the carry input
  } exp_t;

  // counters of mechanisms
  int n_alu_frozen, n_sh_frozen, n_mul_frozen, n_alu_byp, n_sh_byp, n_bubble, n_unsup;
  int n_alu_hold, n_sh_hold, n_mul_hold, n_carry_used, n_branch, n_load, n_store, n_mul, n_reg_shift;
  int n_half, n_bx;
  int n_shift_ops, n_shift_zero, n_alu_ops, n_moves;
  longint tog_raw[3], tog_osu[3];  // per unit: 0 ALU, 1 shifter, 2 multiplier

  function automatic int rreg();
    return $urandom_range(0, 14);
  endfunction

  // Generate one instruction and its expectation from the current state.
  function automatic exp_t gen();
    exp_t e;
    int   r, op, rn, rd, rm, rs, typ, amt, rot;
    bit   s, zero_shift;
    word_t a, b, sv;
    bit    sc;
    ref_out_t ro;
    e = '{kind: K_BUBBLE, default: 0};
    snap = regs;
    e.flags = flags;
    e.flags_in = flags;
    r = $urandom_range(0, 99);
    if (r < 7) begin
      e.kind = K_BUBBLE;
      e.instr = $urandom;
      return e;
    end
    if (r < 10) begin
      e.kind = K_UNSUP;
      case ($urandom_range(0, 2))
        0: e.instr = {4'hE, 3'b100, 5'b01001, 4'(rreg()), 16'h00F0};            // LDM
        1: e.instr = {4'hE, 5'b00001, 3'b000, 4'd1, 4'd2, 4'd3, 4'b1001, 4'd4}; // UMULL
        default: e.instr = {4'hE, 4'b1111, 24'h000011};                         // SWI
      endcase
      return e;
    end
    if (r < 70) begin
      // data processing; one ALU operation in six is a move
      e.kind = K_DP;
      if ($urandom_range(0, 5) == 0) op = 13;
      else begin
        op = $urandom_range(0, 14);
        if (op >= 13) op++;
      end
      s  = (op >= 8 && op <= 11) ? 1'b1 : 1'($urandom_range(0, 1));
      rn = rreg(); rd = rreg(); rm = rreg(); rs = rreg();
      case ($urandom_range(0, 2))
        0: begin  // immediate, unrotated in one case of three
          rot = ($urandom_range(0, 2) == 0) ? 0 : $urandom_range(1, 15);
          amt = $urandom_range(0, 255);
          e.instr = {4'hE, 3'b001, 4'(op), s, 4'(rn), 4'(rd), 4'(rot), 8'(amt)};
          ref_shift(32'(amt), rot * 2, 3, 0, flags.c, sv, sc);
          zero_shift = (rot == 0);
        end
        1: begin  // immediate shift, LSL #0 in one case of three
          zero_shift = ($urandom_range(0, 2) == 0);
          typ = zero_shift ? 0 : $urandom_range(0, 3);
          amt = zero_shift ? 0 : $urandom_range(0, 31);
          if (typ == 0 && amt == 0) zero_shift = 1;
          e.instr = {4'hE, 3'b000, 4'(op), s, 4'(rn), 4'(rd), 5'(amt), 2'(typ), 1'b0, 4'(rm)};
          ref_shift(regs[rm], amt, typ, 1, flags.c, sv, sc);
        end
        default: begin  // register-specified shift
          typ = $urandom_range(0, 3);
          zero_shift = 0;
          n_reg_shift++;
          if ($urandom_range(0, 1)) begin  // small amounts too
            regs[rs] = $urandom_range(0, 40);
            snap[rs] = regs[rs];
          end
          e.instr = {4'hE, 3'b000, 4'(op), s, 4'(rn), 4'(rd), 4'(rs), 1'b0, 2'(typ), 1'b1, 4'(rm)};
          ref_shift(regs[rm], regs[rs][7:0], typ, 0, flags.c, sv, sc);
        end
      endcase
      a  = regs[rn];
      ro = ref_alu(op, a, sv, flags.c, flags.v, sc);
      e.result = ro.res;
      e.check_res = 1;
      e.set_flags = s;
      e.rd_we = !(op >= 8 && op <= 11);
      e.rd = rd;
      e.uses_c = (op == 5 || op == 6 || op == 7);
      e.status = {op != 13, !zero_shift, 1'b0, op == 13, zero_shift};
      if (s) e.flags = '{n: ro.n, z: ro.z, c: ro.c, v: ro.v};
      if (e.rd_we) regs[rd] = ro.res;
      n_alu_ops++; if (op == 13) n_moves++;
      n_shift_ops++; if (zero_shift) n_shift_zero++;
    end else if (r < 80) begin
      e.kind = K_MUL;
      s = $urandom_range(0, 1);
      rd = rreg(); rn = rreg(); rm = rreg(); rs = rreg();
      op = $urandom_range(0, 1);  // accumulate
      e.instr = {4'hE, 6'b000000, 1'(op), s, 4'(rd), 4'(rn), 4'(rs), 4'b1001, 4'(rm)};
      e.result = regs[rm] * regs[rs] + (op ? regs[rn] : 32'd0);
      e.check_res = 1; e.set_flags = s; e.rd_we = 1; e.rd = rd;
      e.status = 5'b00100;
      if (s) begin e.flags.n = e.result[31]; e.flags.z = (e.result == 0); end
      regs[rd] = e.result;
      n_mul++;
    end else if (r < 90) begin
      // single load/store
      bit p, u, bb, w, l, regoff;
      word_t off;
      e.kind = K_LS;
      p = $urandom_range(0, 3) != 0; u = $urandom_range(0, 1); bb = $urandom_range(0, 1);
      w = p ? 1'($urandom_range(0, 1)) : 1'b0; l = $urandom_range(0, 1);
      regoff = $urandom_range(0, 1);
      rn = rreg(); rm = rreg();
      do rd = rreg(); while (rd == rn);
      if (regoff) begin
        zero_shift = ($urandom_range(0, 2) == 0);
        typ = zero_shift ? 0 : $urandom_range(0, 3);
        amt = zero_shift ? 0 : $urandom_range(0, 31);
        if (typ == 0 && amt == 0) zero_shift = 1;
        e.instr = {4'hE, 3'b011, p, u, bb, w, l, 4'(rn), 4'(rd), 5'(amt), 2'(typ), 1'b0, 4'(rm)};
        ref_shift(regs[rm], amt, typ, 1, flags.c, off, sc);
        n_shift_ops++; if (zero_shift) n_shift_zero++;
      end else begin
        zero_shift = 1;
        amt = $urandom_range(0, 4095);
        e.instr = {4'hE, 3'b010, p, u, bb, w, l, 4'(rn), 4'(rd), 12'(amt)};
        off = amt;
      end
      e.result = u ? regs[rn] + off : regs[rn] - off;
      e.check_res = 1;
      e.byte_acc = bb;
      e.post = !p;
      e.addr = p ? e.result : regs[rn];
      e.load = l; e.store = !l;
      e.sdata = regs[rd];
      e.rd = rd;
      e.status = {1'b1, !zero_shift, 1'b0, 1'b0, zero_shift};
      if (!p || w) regs[rn] = e.result;
      if (l) regs[rd] = mem_word(e.addr);
      if (l) n_load++; else n_store++;
    end else if (r < 95) begin
      // halfword and signed-byte load/store
      bit p, u, i, w, l;
      int sh;
      word_t off;
      e.kind = K_LS;
      p = $urandom_range(0, 3) != 0; u = $urandom_range(0, 1); i = $urandom_range(0, 1);
      w = p ? 1'($urandom_range(0, 1)) : 1'b0; l = $urandom_range(0, 1);
      sh = l ? $urandom_range(1, 3) : 1;
      rn = rreg(); rm = rreg();
      do rd = rreg(); while (rd == rn);
      amt = $urandom_range(0, 255);
      e.instr = {4'hE, 3'b000, p, u, i, w, l, 4'(rn), 4'(rd), i ? 4'(amt >> 4) : 4'd0, 1'b1, 2'(sh), 1'b1,
                 i ? 4'(amt) : 4'(rm)};
      off = i ? word_t'(amt) : regs[rm];
      e.result = u ? regs[rn] + off : regs[rn] - off;
      e.check_res = 1;
      e.post = !p;
      e.addr = p ? e.result : regs[rn];
      e.load = l; e.store = !l;
      e.half = sh[0]; e.byte_acc = !sh[0]; e.sign_ext = sh[1];
      e.sdata = regs[rd];
      e.status = 5'b10001;
      if (!p || w) regs[rn] = e.result;
      if (l) regs[rd] = mem_word(e.addr);
      if (l) n_load++; else n_store++;
      n_half++;
    end else if (r < 97) begin
      // BX
      e.kind = K_BR;
      rm = rreg();
      e.instr = {4'hE, 24'h12FFF1, 4'(rm)};
      e.result = regs[rm];
      e.check_res = 1; e.branch = 1; e.exchange = 1;
      e.status = 5'b00011;
      n_bx++;
    end else begin
      bit lk;
      int unsigned offs;
      e.kind = K_BR;
      lk = $urandom_range(0, 1);
      offs = $urandom;
      e.instr = {4'hE, 3'b101, lk, 24'(offs)};
      e.result = pc_addr + 32'd8 + {{6{offs[23]}}, offs[23:0], 2'b00};
      e.check_res = 1; e.branch = 1; e.link = lk;
      e.status = 5'b11000;
      if (lk) regs[14] = pc_addr + 32'd4;
      n_branch++;
    end
    return e;
  endfunction

  // ---------------- checking of the instruction in EX ----------------
  task automatic chk(bit ok, string what, exp_t e);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20)
        $display("cycle %0d instr %h: %s wrong (result %h expected %h, flags %b expected %b)",
                 cycle, e.instr, what, ex_result, e.result, ex_flags, e.flags);
    end
  endtask

  task automatic check_ex(exp_t e);
    bit v;
    v = (e.kind != K_BUBBLE);
    chk(ex_wb.valid == v, "valid", e);
    chk(ex_status == e.status, "unit status", e);
    if (!v) return;
    chk(ex_wb.unsupported == (e.kind == K_UNSUP), "unsupported", e);
    if (e.kind == K_UNSUP) return;
    if (e.check_res) chk(ex_result == e.result, "result", e);
    if (e.set_flags) chk(ex_flags == e.flags, "flags", e);
    chk(ex_wb.set_flags == e.set_flags, "set_flags", e);
    chk(ex_wb.rd_we == e.rd_we, "rd_we", e);
    if (e.rd_we) chk(ex_wb.rd == 4'(e.rd), "rd", e);
    chk(ex_mem.load == e.load && ex_mem.store == e.store, "load/store", e);
    if (e.load || e.store)
      chk(ex_mem.byte_acc == e.byte_acc && ex_mem.half == e.half && ex_mem.sign_ext == e.sign_ext,
          "transfer size", e);
    if (e.kind == K_LS) begin
      chk(ex_mem_addr == e.addr, "memory address", e);
      if (e.store) chk(ex_store_data == e.sdata, "store data", e);
    end
    chk(ex_wb.branch == e.branch && ex_wb.link == e.link && ex_wb.exchange == e.exchange,
        "branch/link/exchange", e);
    if (e.uses_c) n_carry_used++;
  endtask

  // ---------------- freeze checks and toggle counting ----------------
  word_t      p_alu_a, p_alu_b, p_sh_val, p_mul_a, p_mul_b, p_mul_c;
  logic [2:0] p_alu_f;
  logic [7:0] p_sh_amt;
  logic       p_sh_cin;
  alu_ctrl_t  p_alu_ctrl;
  shift_ctrl_t p_sh_ctrl;
  mul_ctrl_t  p_mul_ctrl;
  word_t      r_alu_a, r_alu_b, r_sh_val, r_mul_a, r_mul_b, r_mul_c;
  logic [7:0] r_sh_amt;

  task automatic check_freeze();
    exp_t dummy;
    dummy = '{kind: K_BUBBLE, default: 0};
    if (!ex_status.alu_active) begin
      n_alu_frozen++;
      chk(dut.u_ex.alu_a == p_alu_a && dut.u_ex.alu_b == p_alu_b && dut.u_ex.alu_fin == p_alu_f,
          "frozen ALU operands", dummy);
      chk(dut.q_ex.alu == p_alu_ctrl, "frozen ALU control code", dummy);
    end
    if (!ex_status.shift_active) begin
      n_sh_frozen++;
      chk(dut.u_ex.sh_val == p_sh_val && dut.u_ex.sh_amt == p_sh_amt && dut.u_ex.sh_cin == p_sh_cin,
          "frozen shifter operands", dummy);
      chk(dut.q_ex.sh == p_sh_ctrl, "frozen shifter control code", dummy);
    end
    if (!ex_status.mul_active) begin
      n_mul_frozen++;
      chk(dut.u_ex.mul_a == p_mul_a && dut.u_ex.mul_b == p_mul_b && dut.u_ex.mul_c == p_mul_c,
          "frozen multiplier operands", dummy);
      chk(dut.q_ex.mul == p_mul_ctrl, "frozen multiplier control code", dummy);
    end
    if (ex_status.alu_bypass) n_alu_byp++;
    if (ex_status.shift_bypass) n_sh_byp++;
    // toggles at the unit inputs with the OSUs (actual) and without (raw mux outputs)
    tog_osu[0] += $countones(dut.u_ex.alu_a ^ p_alu_a) + $countones(dut.u_ex.alu_b ^ p_alu_b);
    tog_osu[1] += $countones(dut.u_ex.sh_val ^ p_sh_val) + $countones(dut.u_ex.sh_amt ^ p_sh_amt);
    tog_osu[2] += $countones(dut.u_ex.mul_a ^ p_mul_a) + $countones(dut.u_ex.mul_b ^ p_mul_b)
                + $countones(dut.u_ex.mul_c ^ p_mul_c);
    tog_raw[0] += $countones(dut.u_ex.a_mux ^ r_alu_a) + $countones(dut.u_ex.b_path ^ r_alu_b);
    tog_raw[1] += $countones(dut.u_ex.b_mux ^ r_sh_val) + $countones(dut.u_ex.c_mux ^ r_sh_amt);
    tog_raw[2] += $countones(dut.q_op2 ^ r_mul_a) + $countones(dut.q_op3 ^ r_mul_b)
                + $countones(dut.q_op1 ^ r_mul_c);
  endtask

  task automatic sample_prev();
    p_alu_a = dut.u_ex.alu_a; p_alu_b = dut.u_ex.alu_b; p_alu_f = dut.u_ex.alu_fin;
    p_sh_val = dut.u_ex.sh_val; p_sh_amt = dut.u_ex.sh_amt; p_sh_cin = dut.u_ex.sh_cin;
    p_mul_a = dut.u_ex.mul_a; p_mul_b = dut.u_ex.mul_b; p_mul_c = dut.u_ex.mul_c;
    p_alu_ctrl = dut.q_ex.alu; p_sh_ctrl = dut.q_ex.sh; p_mul_ctrl = dut.q_ex.mul;
    r_alu_a = dut.u_ex.a_mux; r_alu_b = dut.u_ex.b_path; r_sh_val = dut.u_ex.b_mux;
    r_sh_amt = dut.u_ex.c_mux; r_mul_a = dut.q_op2; r_mul_b = dut.q_op3; r_mul_c = dut.q_op1;
  endtask

  // ---------------- main loop ----------------
  exp_t ex_q, cur;
  bit   ex_full;

  initial begin
    void'($value$plusargs("n=%d", n_instr));
    foreach (regs[i]) regs[i] = $urandom;
    flags = '{n: 0, z: 0, c: 1, v: 0};
    pc_addr = 32'h0000_8000;
    id_valid = 0; id_instr = '0; id_pc = '0; rd1 = '0; rd2 = '0; rd3 = '0;
    cpsr_flags = flags;
    ex_full = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    sample_prev();
    for (int unsigned i = 0; i <= n_instr; i++) begin
      // EX stage: the instruction issued last cycle
      if (ex_full) begin
        cpsr_flags = ex_q.flags_in;
        #1;
        check_ex(ex_q);
        check_freeze();
        sample_prev();
        if (ex_q.kind == K_BUBBLE) n_bubble++;
        if (ex_q.kind == K_UNSUP) n_unsup++;
      end
      // ID stage: the next instruction
      if (i < n_instr) begin
        cur = gen();
        id_valid = (cur.kind != K_BUBBLE);
        id_instr = cur.instr;
        id_pc    = pc_addr + 32'd8;
        #1;
        rd1 = (ra1 == 4'd15) ? id_pc : snap[ra1];
        rd2 = (ra2 == 4'd15) ? id_pc : snap[ra2];
        rd3 = (ra3 == 4'd15) ? id_pc : snap[ra3];
        if (cur.kind != K_BUBBLE) begin
          if (!dut.lctrl.alu) n_alu_hold++;
          if (!dut.lctrl.sh)  n_sh_hold++;
          if (!dut.lctrl.mul) n_mul_hold++;
        end
        flags = cur.flags;
        pc_addr += 4;
        ex_q = cur;
        ex_full = 1;
      end else begin
        id_valid = 0;
        ex_full = 0;
      end
      @(negedge clk);
      cycle++;
    end

    $display("instructions %0d, cycles %0d", n_instr, cycle);
    $display("ALU frozen %0d, shifter frozen %0d, multiplier frozen %0d cycles",
             n_alu_frozen, n_sh_frozen, n_mul_frozen);
    $display("move bypass %0d, shift bypass %0d, bubbles %0d, unsupported %0d",
             n_alu_byp, n_sh_byp, n_bubble, n_unsup);
    $display("control code kept by PLC: ALU %0d, shifter %0d, multiplier %0d",
             n_alu_hold, n_sh_hold, n_mul_hold);
    $display("carry-in used %0d, register shifts %0d, branches %0d, loads %0d, stores %0d, multiplies %0d",
             n_carry_used, n_reg_shift, n_branch, n_load, n_store, n_mul);
    $display("halfword transfers %0d, BX %0d", n_half, n_bx);
    $display("mix: zero shifts %0d of %0d shift operations, moves %0d of %0d ALU operations",
             n_shift_zero, n_shift_ops, n_moves, n_alu_ops);
    foreach (tog_raw[u])
      $display("unit %0d (0 ALU, 1 shifter, 2 multiplier): input toggles without OSU %0d, with OSU %0d (%0d%%)",
               u, tog_raw[u], tog_osu[u], tog_raw[u] ? (100 * tog_osu[u]) / tog_raw[u] : 0);
    // every mechanism must have happened
    begin
      int cnt[18];
      cnt = '{n_alu_frozen, n_sh_frozen, n_mul_frozen, n_alu_byp, n_sh_byp, n_bubble, n_unsup,
                      n_alu_hold, n_sh_hold, n_mul_hold, n_carry_used, n_reg_shift, n_branch, n_load,
                      n_store, n_mul, n_half, n_bx};
      foreach (cnt[k]) begin
        checks++;
        if (cnt[k] == 0) begin
          failures++;
          $display("mechanism %0d never happened", k);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

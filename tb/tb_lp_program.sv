// tb_lp_program: runs two small ARM programs through the low-power ID/EX stages.
//
// The testbench is the host core around lp_ex_top:
//   - fetch from a program array;
//   - a register bank that forwards the EX result;
//   - a byte-addressed data memory;
//   - the CPSR, condition evaluation and write-back;
//   - branches, which squash the next fetched instruction with one bubble.
// It assembles the programs itself and runs them to the end. It then compares
// the memory they leave with a reference computed directly in SystemVerilog.
//
// Program 1 encodes an IMA-ADPCM-style stream of 16-bit samples, in the
// manner of the rawcaudio media benchmark. It has signed halfword loads,
// conditional moves, compares, shifts,
// table lookups with scaled register offsets and byte stores. Its step-size
// table is computed by the formula s[0] = 7, s[i+1] = min(s[i] + s[i]/10 + 1,
// 32767), with 89 entries. The index table is {-1,-1,-1,-1,2,4,6,8} for both
// signs.
//
// Program 2 is a dot product of two 32-entry vectors with MLA, as in a FIR
// filter.
//
// The testbench reports how often each unit was frozen or bypassed. It fails
// if any of these never happened: a frozen unit, a bypass, a bubble or a
// multiply. It also fails on any unsupported instruction.
module tb_lp_program;
  import lp_pkg::*;

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
  int cycles = 0;

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired after %0d cycles", cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- host state ----------------
  word_t      prog[512];
  int         plen;
  logic [7:0] mem[int unsigned];
  word_t      regs[16];
  flags_t     cpsr;

  function automatic word_t rd_word(word_t a);
    return {mem[a + 3], mem[a + 2], mem[a + 1], mem[a]};
  endfunction
  function automatic void wr_word(word_t a, word_t d);
    mem[a] = d[7:0]; mem[a + 1] = d[15:8]; mem[a + 2] = d[23:16]; mem[a + 3] = d[31:24];
  endfunction

  // ---------------- assembler ----------------
  localparam logic [3:0] EQ = 4'h0, NE = 4'h1, GE = 4'hA, LT = 4'hB, GT = 4'hC, AL = 4'hE;
  localparam int AND_ = 0, SUB = 2, RSB = 3, ADD = 4, CMP = 10, ORR = 12, MOV = 13, MVN = 15;

  function automatic void emit(word_t w);
    prog[plen] = w;
    plen++;
  endfunction

  // data processing with an immediate; finds the rotation
  function automatic void dpi(logic [3:0] c, int op, bit s, int rn, int rd, word_t imm);
    for (int r = 0; r < 16; r++) begin
      word_t v;
      v = (imm << (2 * r)) | (imm >> ((32 - 2 * r) % 32));
      if (r == 0) v = imm;
      if (v < 256) begin
        emit({c, 3'b001, 4'(op), s, 4'(rn), 4'(rd), 4'(r), 8'(v)});
        return;
      end
    end
    $fatal(1, "immediate %h cannot be encoded", imm);
  endfunction
  // data processing with a register and an immediate shift (typ: 0 LSL, 1 LSR, 2 ASR, 3 ROR)
  function automatic void dpr(logic [3:0] c, int op, bit s, int rn, int rd, int rm,
                              int typ = 0, int amt = 0);
    emit({c, 3'b000, 4'(op), s, 4'(rn), 4'(rd), 5'(amt), 2'(typ), 1'b0, 4'(rm)});
  endfunction
  function automatic void mla(int rd, int rm, int rs, int rn);
    emit({AL, 6'b000000, 1'b1, 1'b0, 4'(rd), 4'(rn), 4'(rs), 4'b1001, 4'(rm)});
  endfunction
  // load/store, immediate offset, post-indexed (P=0) or pre-indexed (P=1)
  function automatic void ls_imm(bit l, bit b, bit p, int rn, int rd, int off);
    emit({AL, 3'b010, p, 1'b1, b, 1'b0, l, 4'(rn), 4'(rd), 12'(off)});
  endfunction
  // load, pre-indexed scaled register offset, no write-back
  function automatic void ldr_reg(int rd, int rn, int rm, int lsl);
    emit({AL, 3'b011, 1'b1, 1'b1, 1'b0, 1'b0, 1'b1, 4'(rn), 4'(rd), 5'(lsl), 2'b00, 1'b0, 4'(rm)});
  endfunction
  // LDRSH, post-indexed by an immediate
  function automatic void ldrsh_post(int rd, int rn, int off);
    emit({AL, 3'b000, 1'b0, 1'b1, 1'b1, 1'b0, 1'b1, 4'(rn), 4'(rd), 4'(off >> 4), 4'b1111, 4'(off)});
  endfunction
  function automatic void br(logic [3:0] c, int target);
    int off;
    off = target - (plen + 2);
    emit({c, 3'b101, 1'b0, 24'(off)});
  endfunction

  // ---------------- programs and reference ----------------
  localparam int NS = 64, NF = 32;
  localparam word_t IN = 32'h1000, OUT = 32'h2000, STEPS = 32'h3000, IDX = 32'h3400;
  localparam word_t FX = 32'h4000, FH = 32'h4400, FRES = 32'h4800;
  int steptab[89];
  int idxtab[16] = '{-1, -1, -1, -1, 2, 4, 6, 8, -1, -1, -1, -1, 2, 4, 6, 8};
  int samples[NS];
  logic [7:0] exp_codes[NS];
  word_t fx[NF], fh[NF], exp_dot;
  int halt_pc;

  task automatic build();
    int loop, fir;
    plen = 0;
    // program 1: ADPCM-style encoder
    dpi(AL, MOV, 0, 0, 0, IN);
    dpi(AL, MOV, 0, 0, 1, OUT);
    dpi(AL, MOV, 0, 0, 2, NS);
    dpi(AL, MOV, 0, 0, 3, 0);            // valpred
    dpi(AL, MOV, 0, 0, 4, 0);            // index
    dpi(AL, MOV, 0, 0, 5, 7);            // step = steptab[0]
    dpi(AL, MOV, 0, 0, 6, STEPS);
    dpi(AL, MOV, 0, 0, 7, IDX);
    loop = plen;
    ldrsh_post(8, 0, 2);                 // LDRSH r8, [r0], #2
    dpr(AL, SUB, 1, 8, 8, 3);            // SUBS r8, r8, r3
    dpi(LT, MOV, 0, 0, 9, 8);            // sign
    dpi(GE, MOV, 0, 0, 9, 0);
    dpi(LT, RSB, 0, 8, 8, 0);            // diff = -diff
    dpi(AL, MOV, 0, 0, 10, 0);           // delta
    dpr(AL, MOV, 0, 0, 11, 5, 2, 3);     // vpdiff = step >> 3
    for (int k = 2; k >= 0; k--) begin
      dpr(AL, CMP, 1, 8, 0, 5);
      dpi(GE, ORR, 0, 10, 10, 1 << k);
      if (k != 0) dpr(GE, SUB, 0, 8, 8, 5);
      dpr(GE, ADD, 0, 11, 11, 5);
      if (k != 0) dpr(AL, MOV, 0, 0, 5, 5, 2, 1);   // step >>= 1
    end
    dpi(AL, CMP, 1, 9, 0, 0);
    dpr(NE, SUB, 0, 3, 3, 11);
    dpr(EQ, ADD, 0, 3, 3, 11);
    dpi(AL, MOV, 0, 0, 12, 32'h7F00);
    dpi(AL, ORR, 0, 12, 12, 32'hFF);     // 32767
    dpr(AL, CMP, 1, 3, 0, 12);
    dpr(GT, MOV, 0, 0, 3, 12);
    dpr(AL, MVN, 0, 0, 12, 12);          // -32768
    dpr(AL, CMP, 1, 3, 0, 12);
    dpr(LT, MOV, 0, 0, 3, 12);
    dpr(AL, ORR, 0, 10, 10, 9);          // delta |= sign
    ldr_reg(12, 7, 10, 2);               // indexTable[delta]
    dpr(AL, ADD, 0, 4, 4, 12);
    dpi(AL, CMP, 1, 4, 0, 0);
    dpi(LT, MOV, 0, 0, 4, 0);
    dpi(AL, CMP, 1, 4, 0, 88);
    dpi(GT, MOV, 0, 0, 4, 88);
    ldr_reg(5, 6, 4, 2);                 // step = steptab[index]
    ls_imm(0, 1, 0, 1, 10, 1);           // STRB r10, [r1], #1
    dpi(AL, SUB, 1, 2, 2, 1);
    br(NE, loop);
    // program 2: dot product
    dpi(AL, MOV, 0, 0, 0, FX);
    dpi(AL, MOV, 0, 0, 1, FH);
    dpi(AL, MOV, 0, 0, 2, NF);
    dpi(AL, MOV, 0, 0, 3, 0);
    fir = plen;
    ls_imm(1, 0, 0, 0, 4, 4);
    ls_imm(1, 0, 0, 1, 5, 4);
    mla(3, 4, 5, 3);
    dpi(AL, SUB, 1, 2, 2, 1);
    br(NE, fir);
    dpi(AL, MOV, 0, 0, 9, FRES);
    ls_imm(0, 0, 1, 9, 3, 0);            // STR r3, [r9]
    halt_pc = plen;
    br(AL, halt_pc);                     // B .
  endtask

  task automatic make_data();
    int s, valpred, index, step, diff, sign, delta, vpdiff;
    steptab[0] = 7;
    for (int i = 1; i < 89; i++) begin
      s = steptab[i - 1] + steptab[i - 1] / 10 + 1;
      steptab[i] = (s > 32767) ? 32767 : s;
    end
    foreach (steptab[i]) wr_word(STEPS + 4 * i, steptab[i]);
    foreach (idxtab[i]) wr_word(IDX + 4 * i, idxtab[i]);
    foreach (samples[i]) begin
      samples[i] = ((i * 2731) % 6000) - 3000 + int'($urandom_range(0, 400)) - 200;
      if (i > 40) samples[i] = samples[i] * 8;
      mem[IN + 2 * i] = samples[i][7:0];
      mem[IN + 2 * i + 1] = samples[i][15:8];
    end
    // reference encoder
    valpred = 0; index = 0; step = steptab[0];
    foreach (samples[i]) begin
      diff = samples[i] - valpred;
      sign = (diff < 0) ? 8 : 0;
      if (sign != 0) diff = -diff;
      delta = 0;
      vpdiff = step >>> 3;
      if (diff >= step) begin delta = 4; diff -= step; vpdiff += step; end
      step = step >>> 1;
      if (diff >= step) begin delta |= 2; diff -= step; vpdiff += step; end
      step = step >>> 1;
      if (diff >= step) begin delta |= 1; vpdiff += step; end
      if (sign != 0) valpred -= vpdiff; else valpred += vpdiff;
      if (valpred > 32767) valpred = 32767;
      if (valpred < -32768) valpred = -32768;
      delta |= sign;
      index += idxtab[delta];
      if (index < 0) index = 0;
      if (index > 88) index = 88;
      step = steptab[index];
      exp_codes[i] = 8'(delta);
    end
    exp_dot = 0;
    for (int i = 0; i < NF; i++) begin
      fx[i] = $urandom_range(0, 2000) - 1000;
      fh[i] = $urandom_range(0, 200) - 100;
      wr_word(FX + 4 * i, fx[i]);
      wr_word(FH + 4 * i, fh[i]);
      exp_dot += fx[i] * fh[i];
    end
  endtask

  function automatic bit cond_ok(logic [3:0] c, flags_t f);
    case (c)
      4'h0: return f.z;
      4'h1: return !f.z;
      4'h2: return f.c;
      4'h3: return !f.c;
      4'h4: return f.n;
      4'h5: return !f.n;
      4'h6: return f.v;
      4'h7: return !f.v;
      4'h8: return f.c && !f.z;
      4'h9: return !f.c || f.z;
      4'hA: return f.n == f.v;
      4'hB: return f.n != f.v;
      4'hC: return !f.z && (f.n == f.v);
      4'hD: return f.z || (f.n != f.v);
      default: return 1'b1;
    endcase
  endfunction

  // ---------------- run ----------------
  // input toggles of the units with the OSUs (osu) and at the raw mux outputs (raw)
  longint tog_raw[3], tog_osu[3];
  word_t  p[7], r[7];
  task automatic count_toggles();
    word_t c[7], w[7];
    c = '{dut.u_ex.alu_a, dut.u_ex.alu_b, dut.u_ex.sh_val, word_t'(dut.u_ex.sh_amt),
          dut.u_ex.mul_a, dut.u_ex.mul_b, dut.u_ex.mul_c};
    w = '{dut.u_ex.a_mux, dut.u_ex.b_path, dut.u_ex.b_mux, word_t'(dut.u_ex.c_mux),
          dut.q_op2, dut.q_op3, dut.q_op1};
    for (int i = 0; i < 7; i++) begin
      int u;
      u = (i < 2) ? 0 : (i < 4) ? 1 : 2;
      tog_osu[u] += $countones(c[i] ^ p[i]);
      tog_raw[u] += $countones(w[i] ^ r[i]);
    end
    p = c; r = w;
  endtask

  int n_exec, n_squash, n_alu_frozen, n_sh_frozen, n_mul_frozen, n_alu_byp, n_sh_byp, n_mul, n_bubbles;

  initial begin
    int  fetch;
    bit  halted, squash;
    word_t ex_addr;
    build();
    make_data();
    foreach (regs[i]) regs[i] = '0;
    cpsr = '0;
    id_valid = 0; id_instr = '0; id_pc = '0; rd1 = '0; rd2 = '0; rd3 = '0; cpsr_flags = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    fetch = 0; halted = 0; squash = 0;
    foreach (p[i]) begin p[i] = '0; r[i] = '0; end
    while (!halted) begin
      // EX: complete the instruction issued last cycle
      cpsr_flags = cpsr;
      #1;
      squash = 0;
      count_toggles();
      if (!ex_status.alu_active) n_alu_frozen++;
      if (!ex_status.shift_active) n_sh_frozen++;
      if (!ex_status.mul_active) n_mul_frozen++;
      if (ex_status.alu_bypass) n_alu_byp++;
      if (ex_status.shift_bypass) n_sh_byp++;
      if (ex_status.mul_active) n_mul++;
      if (!ex_wb.valid) n_bubbles++;
      if (ex_wb.valid) begin
        checks++;
        if (ex_wb.unsupported) begin
          failures++;
          $display("unsupported instruction in EX");
        end
        if (cond_ok(ex_wb.cond, cpsr)) begin
          n_exec++;
          ex_addr = ex_mem_addr;
          if (ex_wb.set_flags) cpsr = ex_flags;
          if (ex_wb.rd_we) regs[ex_wb.rd] = ex_result;
          if (ex_mem.store) begin
            if (ex_mem.byte_acc) mem[ex_addr] = ex_store_data[7:0];
            else if (ex_mem.half) begin
              mem[ex_addr] = ex_store_data[7:0];
              mem[ex_addr + 1] = ex_store_data[15:8];
            end else wr_word(ex_addr, ex_store_data);
          end
          if (ex_mem.load) begin
            word_t v;
            if (ex_mem.half) begin
              v = {16'h0, mem[ex_addr + 1], mem[ex_addr]};
              if (ex_mem.sign_ext) v = {{16{v[15]}}, v[15:0]};
            end else if (ex_mem.byte_acc) begin
              v = {24'h0, mem[ex_addr]};
              if (ex_mem.sign_ext) v = {{24{v[7]}}, v[7:0]};
            end else v = rd_word(ex_addr);
            regs[ex_wb.rd] = v;
          end
          if (ex_wb.base_wb) regs[ex_wb.rn] = ex_result;
          if (ex_wb.branch) begin
            if (ex_result == 4 * halt_pc) halted = 1;
            fetch = ex_result / 4;
            squash = 1;
          end
        end
      end
      // ID: issue the next instruction, or a bubble after a taken branch
      if (squash || halted) begin
        id_valid = 0;
      end else begin
        id_valid = 1;
        id_instr = prog[fetch];
        id_pc    = 4 * fetch + 8;
        #1;
        rd1 = (ra1 == 4'd15) ? id_pc : regs[ra1];
        rd2 = (ra2 == 4'd15) ? id_pc : regs[ra2];
        rd3 = (ra3 == 4'd15) ? id_pc : regs[ra3];
        fetch++;
      end
      @(negedge clk);
      cycles++;
    end

    foreach (exp_codes[i]) begin
      checks++;
      if (mem[OUT + i] !== exp_codes[i]) begin
        failures++;
        if (failures < 10) $display("ADPCM code %0d: %h, expected %h", i, mem[OUT + i], exp_codes[i]);
      end
    end
    checks++;
    if (rd_word(FRES) !== exp_dot) begin
      failures++;
      $display("dot product %h, expected %h", rd_word(FRES), exp_dot);
    end
    $display("%0d cycles, %0d instructions executed", cycles, n_exec);
    $display("ALU frozen %0d, shifter frozen %0d, multiplier frozen %0d cycles; multiplies %0d",
             n_alu_frozen, n_sh_frozen, n_mul_frozen, n_mul);
    $display("move bypass %0d, shift bypass %0d, bubbles %0d", n_alu_byp, n_sh_byp, n_bubbles);
    foreach (tog_raw[u])
      $display("unit %0d (0 ALU, 1 shifter, 2 multiplier): input toggles without OSU %0d, with OSU %0d (%0d%%)",
               u, tog_raw[u], tog_osu[u], tog_raw[u] ? (100 * tog_osu[u]) / tog_raw[u] : 0);
    begin
      int cnt[7];
      cnt = '{n_alu_frozen, n_sh_frozen, n_mul_frozen, n_alu_byp, n_sh_byp, n_mul, n_bubbles};
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

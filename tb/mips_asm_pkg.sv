// mips_asm_pkg: testbench helpers for the single-cycle MIPS processor.
//
// Instruction encoders (a tiny assembler written as functions) and mips_ref,
// an instruction-level reference model. The model executes one instruction
// per call from its own copy of program and data memory and reports what the
// hardware must do in that cycle: the register write, the store and the
// next PC. It is written from the instruction definitions alone and shares
// no code with the RTL. Memory is byte addressed and little endian.
package mips_asm_pkg;

  // ---- encoders -------------------------------------------------------
  function automatic logic [31:0] enc_r(input logic [5:0] fn, input int rd, input int rs,
                                        input int rt, input int sh = 0);
    return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'(sh), fn};
  endfunction
  function automatic logic [31:0] enc_i(input logic [5:0] op, input int rt, input int rs,
                                        input int imm);
    return {op, 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  function automatic logic [31:0] enc_j(input logic [5:0] op, input logic [31:0] addr);
    return {op, addr[27:2]};
  endfunction

  function automatic logic [31:0] ADDU(int rd, int rs, int rt); return enc_r(6'h21, rd, rs, rt); endfunction
  function automatic logic [31:0] ADD (int rd, int rs, int rt); return enc_r(6'h20, rd, rs, rt); endfunction
  function automatic logic [31:0] SUBU(int rd, int rs, int rt); return enc_r(6'h23, rd, rs, rt); endfunction
  function automatic logic [31:0] SUB (int rd, int rs, int rt); return enc_r(6'h22, rd, rs, rt); endfunction
  function automatic logic [31:0] AND_(int rd, int rs, int rt); return enc_r(6'h24, rd, rs, rt); endfunction
  function automatic logic [31:0] OR_ (int rd, int rs, int rt); return enc_r(6'h25, rd, rs, rt); endfunction
  function automatic logic [31:0] XOR_(int rd, int rs, int rt); return enc_r(6'h26, rd, rs, rt); endfunction
  function automatic logic [31:0] NOR_(int rd, int rs, int rt); return enc_r(6'h27, rd, rs, rt); endfunction
  function automatic logic [31:0] SLT (int rd, int rs, int rt); return enc_r(6'h2A, rd, rs, rt); endfunction
  function automatic logic [31:0] SLL (int rd, int rt, int sh); return enc_r(6'h00, rd, 0, rt, sh); endfunction
  function automatic logic [31:0] SRL (int rd, int rt, int sh); return enc_r(6'h02, rd, 0, rt, sh); endfunction
  function automatic logic [31:0] SRA (int rd, int rt, int sh); return enc_r(6'h03, rd, 0, rt, sh); endfunction
  function automatic logic [31:0] JR  (int rs);                 return enc_r(6'h08, 0, rs, 0);   endfunction
  function automatic logic [31:0] ADDI (int rt, int rs, int imm); return enc_i(6'h08, rt, rs, imm); endfunction
  function automatic logic [31:0] ADDIU(int rt, int rs, int imm); return enc_i(6'h09, rt, rs, imm); endfunction
  function automatic logic [31:0] SLTI (int rt, int rs, int imm); return enc_i(6'h0A, rt, rs, imm); endfunction
  function automatic logic [31:0] ANDI (int rt, int rs, int imm); return enc_i(6'h0C, rt, rs, imm); endfunction
  function automatic logic [31:0] ORI  (int rt, int rs, int imm); return enc_i(6'h0D, rt, rs, imm); endfunction
  function automatic logic [31:0] XORI (int rt, int rs, int imm); return enc_i(6'h0E, rt, rs, imm); endfunction
  function automatic logic [31:0] LUI  (int rt, int imm);         return enc_i(6'h0F, rt, 0, imm);  endfunction
  function automatic logic [31:0] LB   (int rt, int off, int rs); return enc_i(6'h20, rt, rs, off); endfunction
  function automatic logic [31:0] LH   (int rt, int off, int rs); return enc_i(6'h21, rt, rs, off); endfunction
  function automatic logic [31:0] LW   (int rt, int off, int rs); return enc_i(6'h23, rt, rs, off); endfunction
  function automatic logic [31:0] LBU  (int rt, int off, int rs); return enc_i(6'h24, rt, rs, off); endfunction
  function automatic logic [31:0] LHU  (int rt, int off, int rs); return enc_i(6'h25, rt, rs, off); endfunction
  function automatic logic [31:0] SB   (int rt, int off, int rs); return enc_i(6'h28, rt, rs, off); endfunction
  function automatic logic [31:0] SH   (int rt, int off, int rs); return enc_i(6'h29, rt, rs, off); endfunction
  function automatic logic [31:0] SW   (int rt, int off, int rs); return enc_i(6'h2B, rt, rs, off); endfunction
  function automatic logic [31:0] BEQ  (int rs, int rt, int off); return enc_i(6'h04, rt, rs, off); endfunction
  function automatic logic [31:0] BNE  (int rs, int rt, int off); return enc_i(6'h05, rt, rs, off); endfunction
  function automatic logic [31:0] BLEZ (int rs, int off);         return enc_i(6'h06, 0, rs, off);  endfunction
  function automatic logic [31:0] BGTZ (int rs, int off);         return enc_i(6'h07, 0, rs, off);  endfunction
  function automatic logic [31:0] BLTZ (int rs, int off);         return enc_i(6'h01, 0, rs, off);  endfunction
  function automatic logic [31:0] BGEZ (int rs, int off);         return enc_i(6'h01, 1, rs, off);  endfunction
  function automatic logic [31:0] J    (logic [31:0] a);          return enc_j(6'h02, a);           endfunction
  function automatic logic [31:0] JAL  (logic [31:0] a);          return enc_j(6'h03, a);           endfunction
  localparam logic [31:0] NOP = 32'h0000_0000;  // sll r0, r0, 0

  // ---- what one instruction does --------------------------------------
  typedef struct {
    bit          reg_we;   // a register other than r0 is written
    int          rw;
    logic [31:0] wdata;
    bit          st;       // a store happens
    logic [1:0]  st_mc;    // 01 byte, 10 half, 11 word
    logic [31:0] st_addr;
    logic [31:0] st_data;  // register value handed to memory
    logic [31:0] next_pc;
    string       kind;     // instruction class, for coverage counts
    bit          taken;    // branch taken
  } effect_t;

  class mips_ref;
    logic [31:0] r [32];
    logic [31:0] pc;
    logic [31:0] imem [logic [31:0]];
    logic [7:0]  dmem [logic [31:0]];
    logic [31:0] imask;  // program memory repeats: address bits kept

    function new(logic [31:0] imem_mask = 32'hFFFF_FFFF);
      foreach (r[i]) r[i] = 0;
      pc = 0;
      imask = imem_mask;
    endfunction

    function logic [31:0] fetch(logic [31:0] a);
      logic [31:0] wa = {a[31:2], 2'b00} & imask;
      if (imem.exists(wa)) return imem[wa];
      return 32'h0;
    endfunction

    function logic [7:0] rd8(logic [31:0] a);
      if (dmem.exists(a)) return dmem[a];
      return 8'h0;
    endfunction

    function logic [31:0] rd32(logic [31:0] a);
      return {rd8(a + 3), rd8(a + 2), rd8(a + 1), rd8(a)};
    endfunction

    function effect_t step();
      effect_t e;
      logic [31:0] in = fetch(pc);
      logic [5:0] op = in[31:26];
      logic [5:0] fn = in[5:0];
      int rs = int'(in[25:21]);
      int rt = int'(in[20:16]);
      int rd = int'(in[15:11]);
      int sh = int'(in[10:6]);
      logic [31:0] simm = {{16{in[15]}}, in[15:0]};
      logic [31:0] zimm = {16'h0, in[15:0]};
      logic [31:0] a = r[rs];
      logic [31:0] b = r[rt];
      logic [31:0] ea = a + simm;
      logic [31:0] seq = pc + 4;
      logic [31:0] bt = pc + 4 + (simm << 2);
      e.reg_we = 0; e.rw = 0; e.wdata = 0; e.st = 0; e.st_mc = 0; e.st_addr = 0;
      e.st_data = 0; e.next_pc = seq; e.kind = "other"; e.taken = 0;
      case (op)
        6'h00: begin
          e.reg_we = 1; e.rw = rd;
          case (fn)
            6'h00: begin e.wdata = b << sh; e.kind = "sll"; end
            6'h02: begin e.wdata = b >> sh; e.kind = "srl"; end
            6'h03: begin e.wdata = 32'($signed(b) >>> sh); e.kind = "sra"; end
            6'h08: begin e.reg_we = 0; e.next_pc = a; e.kind = "jr"; end
            6'h20, 6'h21: begin e.wdata = a + b; e.kind = "add"; end
            6'h22, 6'h23: begin e.wdata = a - b; e.kind = "sub"; end
            6'h24: begin e.wdata = a & b; e.kind = "and"; end
            6'h25: begin e.wdata = a | b; e.kind = "or"; end
            6'h26: begin e.wdata = a ^ b; e.kind = "xor"; end
            6'h27: begin e.wdata = ~(a | b); e.kind = "nor"; end
            6'h2A: begin e.wdata = ($signed(a) < $signed(b)) ? 1 : 0; e.kind = "slt"; end
            default: begin e.reg_we = 0; e.kind = "illegal"; end
          endcase
        end
        6'h01: begin
          e.kind = "bz";
          if (rt == 0 && $signed(a) < 0) e.taken = 1;
          if (rt == 1 && $signed(a) >= 0) e.taken = 1;
          if (rt > 1) e.kind = "illegal";
        end
        6'h02: begin e.next_pc = {seq[31:28], in[25:0], 2'b00}; e.kind = "j"; end
        6'h03: begin
          e.next_pc = {seq[31:28], in[25:0], 2'b00}; e.kind = "jal";
          e.reg_we = 1; e.rw = 31; e.wdata = pc + 8;
        end
        6'h04: begin e.kind = "beq"; e.taken = (a == b); end
        6'h05: begin e.kind = "bne"; e.taken = (a != b); end
        6'h06: begin e.kind = "bz"; e.taken = ($signed(a) <= 0); end
        6'h07: begin e.kind = "bz"; e.taken = ($signed(a) > 0); end
        6'h08, 6'h09: begin e.reg_we = 1; e.rw = rt; e.wdata = a + simm; e.kind = "addi"; end
        6'h0A: begin e.reg_we = 1; e.rw = rt; e.wdata = ($signed(a) < $signed(simm)) ? 1 : 0; e.kind = "slti"; end
        6'h0C: begin e.reg_we = 1; e.rw = rt; e.wdata = a & zimm; e.kind = "logi"; end
        6'h0D: begin e.reg_we = 1; e.rw = rt; e.wdata = a | zimm; e.kind = "logi"; end
        6'h0E: begin e.reg_we = 1; e.rw = rt; e.wdata = a ^ zimm; e.kind = "logi"; end
        6'h0F: begin e.reg_we = 1; e.rw = rt; e.wdata = {in[15:0], 16'h0}; e.kind = "lui"; end
        6'h20: begin e.reg_we = 1; e.rw = rt; e.wdata = {{24{rd8(ea)[7]}}, rd8(ea)}; e.kind = "lb"; end
        6'h24: begin e.reg_we = 1; e.rw = rt; e.wdata = {24'h0, rd8(ea)}; e.kind = "lbu"; end
        6'h21: begin
          logic [31:0] ha = {ea[31:1], 1'b0};
          e.reg_we = 1; e.rw = rt; e.wdata = {{16{rd8(ha + 1)[7]}}, rd8(ha + 1), rd8(ha)}; e.kind = "lh";
        end
        6'h25: begin
          logic [31:0] ha = {ea[31:1], 1'b0};
          e.reg_we = 1; e.rw = rt; e.wdata = {16'h0, rd8(ha + 1), rd8(ha)}; e.kind = "lhu";
        end
        6'h23: begin e.reg_we = 1; e.rw = rt; e.wdata = rd32({ea[31:2], 2'b00}); e.kind = "lw"; end
        6'h28: begin
          e.st = 1; e.st_mc = 2'b01; e.st_addr = ea; e.st_data = b; e.kind = "sb";
          dmem[ea] = b[7:0];
        end
        6'h29: begin
          logic [31:0] ha = {ea[31:1], 1'b0};
          e.st = 1; e.st_mc = 2'b10; e.st_addr = ea; e.st_data = b; e.kind = "sh";
          dmem[ha] = b[7:0]; dmem[ha + 1] = b[15:8];
        end
        6'h2B: begin
          logic [31:0] wa = {ea[31:2], 2'b00};
          e.st = 1; e.st_mc = 2'b11; e.st_addr = ea; e.st_data = b; e.kind = "sw";
          for (int k = 0; k < 4; k++) dmem[wa + k] = b[8*k +: 8];
        end
        default: e.kind = "illegal";
      endcase
      if (e.taken) e.next_pc = bt;
      if (e.reg_we && e.rw == 0) e.reg_we = 0;
      if (e.reg_we) r[e.rw] = e.wdata;
      pc = e.next_pc;
      return e;
    endfunction
  endclass


  // ---- program builder --------------------------------------------------
  // Builds the test program: worked examples with hand-computed results
  // (stored to data memory, listed in exp_addr / exp_val), then a stretch of
  // random instructions, then a branch-to-self at end_pc.
  class prog_builder;
    logic [31:0] img [logic [31:0]];
    logic [31:0] at;
    logic [31:0] exp_addr [$];
    logic [31:0] exp_val  [$];
    logic [31:0] end_pc;
    bit          no_land [logic [31:0]];  // inside a LUI/ORI/JR group
    logic [31:0] jr_groups [$];              // start of each LUI/ORI/JR group

    function void org(logic [31:0] a); at = a; endfunction
    function void emit(logic [31:0] w);
      img[at & 32'h0000_FFFF] = w;
      at += 4;
    endfunction
    // branch offset from an instruction about to be placed at 'at'
    function int off_to(logic [31:0] tgt);
      return (int'(tgt & 32'h0FFF_FFFF) - int'((at & 32'h0FFF_FFFF) + 4)) / 4;
    endfunction
    function void li(int r, logic [31:0] v);
      emit(LUI(r, int'(v[31:16])));
      emit(ORI(r, r, int'(v[15:0])));
    endfunction
    function void keep(int r, logic [31:0] addr, logic [31:0] val);
      emit(SW(r, int'(addr), 0));
      exp_addr.push_back(addr);
      exp_val.push_back(val);
    endfunction

    // Random stretch: n instructions with forward control flow only. r28 is
    // the base of the 256-byte scratch area used by loads and stores and is
    // never overwritten.
    function void random_code(int n);
      int i = 0;
      while (i < n) begin
        int unsigned c = $urandom_range(0, 15);
        int rd = pick_rd();
        int rs = $urandom_range(0, 31);
        int rt = $urandom_range(0, 31);
        int imm = int'($urandom_range(0, 65535));
        int off = int'($urandom_range(0, 255));
        case (c)
          0, 1: begin
            logic [5:0] fns [10] = '{6'h20, 6'h21, 6'h22, 6'h23, 6'h24, 6'h25, 6'h26, 6'h27, 6'h2A, 6'h2A};
            emit(enc_r(fns[$urandom_range(0, 9)], rd, rs, rt));
          end
          2: begin
            logic [5:0] fns [3] = '{6'h00, 6'h02, 6'h03};
            emit(enc_r(fns[$urandom_range(0, 2)], rd, 0, rt, int'($urandom_range(0, 31))));
          end
          3, 4: begin
            logic [5:0] ops [6] = '{6'h08, 6'h09, 6'h0A, 6'h0C, 6'h0D, 6'h0E};
            emit(enc_i(ops[$urandom_range(0, 5)], rd, rs, imm));
          end
          5: emit(LUI(rd, imm));
          6, 7: begin
            logic [5:0] ops [5] = '{6'h20, 6'h21, 6'h23, 6'h24, 6'h25};
            emit(enc_i(ops[$urandom_range(0, 4)], rd, 28, off));
          end
          8, 9: begin
            logic [5:0] ops [3] = '{6'h28, 6'h29, 6'h2B};
            emit(enc_i(ops[$urandom_range(0, 2)], rt, 28, off));
          end
          10, 11: begin
            int k = int'($urandom_range(0, 3));
            case ($urandom_range(0, 5))
              0: emit(BEQ(rs, rt, k));
              1: emit(BNE(rs, rt, k));
              2: emit(BLTZ(rs, k));
              3: emit(BGEZ(rs, k));
              4: emit(BLEZ(rs, k));
              default: emit(BGTZ(rs, k));
            endcase
          end
          12: emit(J(at + 4 * (1 + $urandom_range(0, 2))));
          13: emit(JAL(at + 4 * (1 + $urandom_range(0, 2))));
          14: begin
            // jump through a register to a point 0..2 instructions ahead
            logic [31:0] t = at + 12 + 4 * $urandom_range(0, 2);
            int r = pick_rd();
            jr_groups.push_back(at);
            no_land[at + 4] = 1'b1;
            no_land[at + 8] = 1'b1;
            emit(LUI(r, int'(t[31:16])));
            emit(ORI(r, r, int'(t[15:0])));
            emit(JR(r));
            i += 2;
          end
          default: emit(ADDU(0, rs, rt));  // write to r0, discarded
        endcase
        i++;
      end
    endfunction

    // Retarget any branch or jump that would land inside a LUI/ORI/JR group
    // (skipping the LUI would jump through a stale register) to the next
    // instruction.
    function void fix_targets(logic [31:0] from, logic [31:0] upto);
      for (logic [31:0] a = from; a < upto; a += 4) begin
        logic [31:0] w = img[a];
        logic [5:0]  op = w[31:26];
        logic [31:0] t;
        if (op inside {6'h01, 6'h04, 6'h05, 6'h06, 6'h07}) begin
          t = a + 4 + {{14{w[15]}}, w[15:0], 2'b00};
          if (no_land.exists(t)) img[a] = {w[31:16], 16'h0000};
        end else if (op inside {6'h02, 6'h03}) begin
          t = {16'h0, w[13:0], 2'b00};
          if (no_land.exists(t)) img[a] = enc_j(op, a + 4);
        end
      end
      foreach (jr_groups[i]) begin
        logic [31:0] g, t;
        g = jr_groups[i];
        t = {img[g][15:0], img[g + 4][15:0]};
        if (no_land.exists(t)) begin
          t = g + 12;
          img[g]     = {img[g][31:16], t[31:16]};
          img[g + 4] = {img[g + 4][31:16], t[15:0]};
        end
      end
    endfunction

    function int pick_rd();
      int r;
      do r = int'($urandom_range(1, 31)); while (r == 28);
      return r;
    endfunction

    function void build(int n_random);
      logic [31:0] p, loop, sub_at;
      at = 0;
      // scratch area base and clear loop (backward branch)
      emit(LUI(28, 0));
      emit(ORI(28, 28, 'h8000));
      emit(ADDI(1, 0, 64));
      loop = at;
      emit(ADDI(1, 1, -1));
      emit(SLL(2, 1, 2));
      emit(ADDU(2, 2, 28));
      emit(SW(0, 0, 2));
      emit(BNE(1, 0, off_to(loop)));

      // for (i = 0; i < 10; i++): count r1 up to r2 = 10
      emit(ADDI(2, 0, 10));
      emit(ADDI(1, 0, 0));
      loop = at;
      emit(SLT(3, 1, 2));
      emit(BEQ(3, 0, off_to(loop + 16)));
      emit(ADDI(1, 1, 1));
      emit(J(loop));
      keep(1, 32'h400, 10);

      // memory layout: sb / lb / sw / lb, little endian
      emit(SW(0, 0, 0));
      emit(ADDI(5, 0, 5));
      emit(SB(5, 2, 0));
      emit(LB(6, 2, 0));
      emit(SW(5, 8, 0));
      emit(LB(7, 8, 0));
      emit(LB(8, 11, 0));
      keep(6, 32'h404, 5);
      keep(7, 32'h408, 5);
      keep(8, 32'h40C, 0);
      exp_addr.push_back(32'h0); exp_val.push_back(32'h0005_0000);
      exp_addr.push_back(32'h8); exp_val.push_back(32'h0000_0005);

      // A[12] = h + A[8] with A at r3 = 0x200, h in r2 = 7, A[8] = 35
      emit(ADDI(3, 0, 'h200));
      emit(ADDI(2, 0, 7));
      emit(ADDI(9, 0, 35));
      emit(SW(9, 32, 3));
      emit(LW(4, 32, 3));
      emit(ADD(5, 4, 2));
      emit(SW(5, 48, 3));
      exp_addr.push_back(32'h230); exp_val.push_back(42);

      // r5 = 0xdeadbeef; r4 = r3 * 8
      emit(LUI(5, 'hdead));
      emit(ORI(5, 5, 'hbeef));
      keep(5, 32'h410, 32'hdeadbeef);
      emit(ADDI(3, 0, 'h123));
      emit(SLL(4, 3, 3));
      keep(4, 32'h414, 32'h918);

      // if (i == j) i = i * 4; else j = i - j;  once equal, once not
      for (int t = 0; t < 2; t++) begin
        emit(ADDI(1, 0, t == 0 ? 6 : 9));
        emit(ADDI(2, 0, t == 0 ? 6 : 4));
        p = at;
        emit(BEQ(1, 2, off_to(p + 12)));
        emit(SUBU(2, 1, 2));
        emit(J(p + 16));
        emit(SLL(1, 1, 2));
        keep(1, 32'h418 + 8 * t, t == 0 ? 24 : 9);
        keep(2, 32'h41C + 8 * t, t == 0 ? 6 : 5);
      end

      // subroutine call: JAL links PC + 8, JR r31 returns there
      sub_at = 32'h1800;
      emit(ADDI(12, 0, 0));
      p = at;
      emit(JAL(sub_at));
      emit(ADDI(12, 0, 1));          // at PC + 4: never executed
      keep(12, 32'h430, 0);
      keep(13, 32'h434, 32'h99);
      keep(31, 32'h438, p + 8);

      // branch conditions: a taken branch skips the ORI that follows it
      emit(ADDI(14, 0, -3));
      emit(ADDI(15, 0, 0));
      emit(ADDI(2, 0, 5));
      emit(BLTZ(14, 1)); emit(ORI(15, 15, 'h001));  // taken
      emit(BGEZ(14, 1)); emit(ORI(15, 15, 'h002));  // not taken
      emit(BLEZ(0, 1));  emit(ORI(15, 15, 'h004));  // taken
      emit(BGTZ(0, 1));  emit(ORI(15, 15, 'h008));  // not taken
      emit(BGTZ(2, 1));  emit(ORI(15, 15, 'h010));  // taken
      emit(BGEZ(0, 1));  emit(ORI(15, 15, 'h020));  // taken
      emit(BNE(14, 0, 1)); emit(ORI(15, 15, 'h040)); // taken
      emit(BEQ(14, 0, 1)); emit(ORI(15, 15, 'h080)); // not taken
      emit(BLEZ(14, 1)); emit(ORI(15, 15, 'h100));  // taken
      emit(BLTZ(0, 1));  emit(ORI(15, 15, 'h200));  // not taken
      keep(15, 32'h43C, 32'h28A);

      // byte and halfword loads and stores
      emit(SW(0, 'h444, 0));
      emit(LUI(16, 'h80F1));
      emit(ORI(16, 16, 'h7F02));
      emit(SW(16, 'h440, 0));
      emit(LB(17, 'h443, 0));
      emit(LBU(18, 'h443, 0));
      emit(LH(19, 'h442, 0));
      emit(LHU(20, 'h440, 0));
      emit(LB(21, 'h441, 0));
      emit(SH(16, 'h446, 0));
      keep(17, 32'h448, 32'hFFFF_FF80);
      keep(18, 32'h44C, 32'h0000_0080);
      keep(19, 32'h450, 32'hFFFF_80F1);
      keep(20, 32'h454, 32'h0000_7F02);
      keep(21, 32'h458, 32'h0000_007F);
      exp_addr.push_back(32'h444); exp_val.push_back(32'h7F02_0000);

      // remaining ALU operations; a write to r0 is discarded
      emit(ADDI(22, 0, -16));
      emit(SRA(23, 22, 2));      keep(23, 32'h45C, 32'hFFFF_FFFC);
      emit(SRL(24, 22, 28));     keep(24, 32'h460, 32'h0000_000F);
      emit(NOR_(25, 22, 0));     keep(25, 32'h464, 32'h0000_000F);
      emit(XOR_(26, 22, 16));    keep(26, 32'h468, 32'h7F0E_80F2);
      emit(SUB(27, 0, 22));      keep(27, 32'h46C, 32'h0000_0010);
      emit(ANDI(9, 22, 'hFF0F)); keep(9, 32'h470, 32'h0000_FF00);
      emit(XORI(10, 22, 'hFFFF)); keep(10, 32'h474, 32'hFFFF_000F);
      emit(SLTI(11, 22, -15));   keep(11, 32'h478, 1);
      emit(SLT(12, 0, 22));      keep(12, 32'h47C, 0);
      emit(AND_(13, 16, 22));    keep(13, 32'h480, 32'h80F1_7F00);
      emit(OR_(1, 16, 22));      keep(1, 32'h484, 32'hFFFF_FFF2);
      emit(SUBU(2, 22, 16));     keep(2, 32'h488, 32'h7F0E_80EE);
      emit(ADDIU(3, 22, 20));    keep(3, 32'h48C, 4);
      emit(ADDI(0, 0, 123));     keep(0, 32'h490, 0);

      // jump through a register to 0xdecafe00 if r3 == 0, else 0xabcd1234
      for (int t = 0; t < 2; t++) begin
        emit(ADDI(3, 0, t));
        emit(LUI(4, 'hdeca)); emit(ORI(4, 4, 'hfe00));
        emit(LUI(5, 'habcd)); emit(ORI(5, 5, 'h1234));
        p = at;
        emit(BNE(3, 0, 1));
        emit(JR(4));
        emit(JR(5));
        keep(11, 32'h494 + 4 * t, t == 0 ? 32'h77 : 32'h55);
        // landing points; they jump back to p + 12 with the high PC bits
        // of the landing address
        begin
          logic [31:0] save = at;
          org(t == 0 ? 32'hdecafe00 : 32'habcd1234);
          emit(ADDI(11, 0, t == 0 ? 'h77 : 'h55));
          emit(J(p + 12));
          org(save);
        end
      end

      // random stretch, far from the landing points
      emit(J(32'h2000));
      org(32'h2000);
      random_code(n_random);
      fix_targets(32'h2000, at);
      repeat (4) emit(NOP);  // landing room for the last forward jumps
      end_pc = at;
      emit(BEQ(0, 0, -1));

      // subroutine body
      org(sub_at);
      emit(ADDI(13, 0, 'h99));
      emit(JR(31));
    endfunction
  endclass

endpackage

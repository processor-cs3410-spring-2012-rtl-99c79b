// tb_control: self-checking test of the instruction decoder.
//
// Generates every supported instruction with random register fields and
// immediates, plus unsupported encodings, and random comparator outcomes.
// For each, the expected register indices, write enable and destination,
// ALU operation and operand selects, extend mode, memory enable and control
// code, load kind, writeback source, compare mode and next-PC select are
// taken from a table written in the testbench from the instruction set, and
// compared with the decoder's outputs.
module tb_control;
  import mips_pkg::*;

  logic [31:0] inst;
  logic        eq, cmp;
  logic [4:0]  ra, rb;
  ctrl_t       ctrl;
  pc_sel_e     pc_sel;
  int checks = 0, failures = 0;

  control dut (.inst, .eq, .cmp, .ra, .rb, .ctrl, .pc_sel);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL inst=%h: %s", inst, what);
    end
  endtask

  typedef struct {
    string      name;
    logic [5:0] op;
    logic [5:0] fn;   // R-type function, or REGIMM sub-opcode
  } form_t;

  initial begin
    static form_t forms [$] = '{
      '{"sll", 6'h00, 6'h00}, '{"srl", 6'h00, 6'h02}, '{"sra", 6'h00, 6'h03},
      '{"jr", 6'h00, 6'h08}, '{"add", 6'h00, 6'h20}, '{"addu", 6'h00, 6'h21},
      '{"sub", 6'h00, 6'h22}, '{"subu", 6'h00, 6'h23}, '{"and", 6'h00, 6'h24},
      '{"or", 6'h00, 6'h25}, '{"xor", 6'h00, 6'h26}, '{"nor", 6'h00, 6'h27},
      '{"slt", 6'h00, 6'h2A}, '{"rbad", 6'h00, 6'h18},
      '{"bltz", 6'h01, 6'h00}, '{"bgez", 6'h01, 6'h01}, '{"ribad", 6'h01, 6'h10},
      '{"j", 6'h02, 0}, '{"jal", 6'h03, 0}, '{"beq", 6'h04, 0}, '{"bne", 6'h05, 0},
      '{"blez", 6'h06, 0}, '{"bgtz", 6'h07, 0}, '{"addi", 6'h08, 0}, '{"addiu", 6'h09, 0},
      '{"slti", 6'h0A, 0}, '{"andi", 6'h0C, 0}, '{"ori", 6'h0D, 0}, '{"xori", 6'h0E, 0},
      '{"lui", 6'h0F, 0}, '{"lb", 6'h20, 0}, '{"lh", 6'h21, 0}, '{"lw", 6'h23, 0},
      '{"lbu", 6'h24, 0}, '{"lhu", 6'h25, 0}, '{"sb", 6'h28, 0}, '{"sh", 6'h29, 0},
      '{"sw", 6'h2B, 0}, '{"bad", 6'h3F, 0}, '{"bad", 6'h10, 0}
    };
    repeat (200) foreach (forms[k]) begin
      form_t f;
      logic [4:0] rs, rt, rd;
      // expected values
      bit e_we, e_bimm, e_zero, e_s16, e_mem, e_ill;
      int e_rw;
      alu_op_e e_alu;
      mem_ctrl_e e_mc;
      load_kind_e e_lk;
      wb_sel_e e_wb;
      pc_sel_e e_pc;
      bit uses_alu, is_cmp;
      cmp_op_e e_cmp;

      f = forms[k];
      rs = 5'($urandom); rt = 5'($urandom); rd = 5'($urandom);
      if (f.op == 6'h00)      inst = {f.op, rs, rt, rd, 5'($urandom), f.fn};
      else if (f.op == 6'h01) inst = {f.op, rs, f.fn[4:0], 16'($urandom)};
      else                    inst = {f.op, rs, rt, 16'($urandom)};
      eq = 1'($urandom); cmp = 1'($urandom);

      e_we = 0; e_rw = int'(rt); e_bimm = 0; e_zero = 0; e_s16 = 0; e_mem = 0; e_ill = 0;
      e_alu = ALU_ADD; e_mc = MC_READ_WORD; e_lk = LD_WORD; e_wb = WB_ALU; e_pc = PC_SEQ;
      uses_alu = 0; is_cmp = 0; e_cmp = CMP_LTZ;
      case (f.name)
        "sll", "srl", "sra", "add", "addu", "sub", "subu", "and", "or", "xor", "nor", "slt": begin
          e_we = 1; e_rw = int'(rd); uses_alu = 1;
          case (f.name)
            "sll": e_alu = ALU_SLL;  "srl": e_alu = ALU_SRL;  "sra": e_alu = ALU_SRA;
            "sub", "subu": e_alu = ALU_SUB;
            "and": e_alu = ALU_AND;  "or": e_alu = ALU_OR;    "xor": e_alu = ALU_XOR;
            "nor": e_alu = ALU_NOR;  "slt": e_alu = ALU_SLT;
            default: e_alu = ALU_ADD;
          endcase
        end
        "jr": e_pc = PC_JR;
        "j": e_pc = PC_JUMP;
        "jal": begin e_pc = PC_JUMP; e_we = 1; e_rw = 31; e_wb = WB_LINK; end
        "beq": e_pc = eq ? PC_BRANCH : PC_SEQ;
        "bne": e_pc = eq ? PC_SEQ : PC_BRANCH;
        "bltz", "bgez", "blez", "bgtz": begin
          is_cmp = 1;
          e_pc = cmp ? PC_BRANCH : PC_SEQ;
          case (f.name)
            "bltz": e_cmp = CMP_LTZ;  "bgez": e_cmp = CMP_GEZ;
            "blez": e_cmp = CMP_LEZ;  default: e_cmp = CMP_GTZ;
          endcase
        end
        "addi", "addiu", "slti", "andi", "ori", "xori", "lui": begin
          e_we = 1; e_bimm = 1; uses_alu = 1;
          case (f.name)
            "slti": e_alu = ALU_SLT;
            "andi": begin e_alu = ALU_AND; e_zero = 1; end
            "ori":  begin e_alu = ALU_OR;  e_zero = 1; end
            "xori": begin e_alu = ALU_XOR; e_zero = 1; end
            "lui":  begin e_alu = ALU_SLL; e_zero = 1; e_s16 = 1; end
            default: e_alu = ALU_ADD;
          endcase
        end
        "lb", "lh", "lw", "lbu", "lhu": begin
          e_we = 1; e_bimm = 1; e_mem = 1; e_wb = WB_MEM; uses_alu = 1;
          case (f.name)
            "lb": e_lk = LD_BYTE;  "lbu": e_lk = LD_BYTEU;
            "lh": e_lk = LD_HALF;  "lhu": e_lk = LD_HALFU;
            default: e_lk = LD_WORD;
          endcase
        end
        "sb", "sh", "sw": begin
          e_bimm = 1; e_mem = 1; uses_alu = 1;
          case (f.name)
            "sb": e_mc = MC_WRITE_BYTE;  "sh": e_mc = MC_WRITE_HALF;
            default: e_mc = MC_WRITE_WORD;
          endcase
        end
        default: e_ill = 1;
      endcase
      #1;
      check(ra == rs && rb == inst[20:16], $sformatf("%s read indices", f.name));
      check(ctrl.reg_we == e_we, $sformatf("%s reg_we=%b", f.name, ctrl.reg_we));
      if (e_we) check(ctrl.rw == 5'(e_rw), $sformatf("%s rw=%0d expected %0d", f.name, ctrl.rw, e_rw));
      check(ctrl.mem_en == e_mem, $sformatf("%s mem_en", f.name));
      if (e_mem) check(ctrl.mc == e_mc, $sformatf("%s mc", f.name));
      if (e_mem && e_we) check(ctrl.load_kind == e_lk, $sformatf("%s load kind", f.name));
      if (e_we) check(ctrl.wb_sel == e_wb, $sformatf("%s wb_sel", f.name));
      if (uses_alu) begin
        check(ctrl.alu_op == e_alu, $sformatf("%s alu_op=%s", f.name, ctrl.alu_op.name()));
        check(ctrl.alu_b_imm == e_bimm, $sformatf("%s alu_b_imm", f.name));
        if (e_bimm) check(ctrl.imm_zero == e_zero, $sformatf("%s imm_zero", f.name));
        check(ctrl.shamt_16 == e_s16, $sformatf("%s shamt_16", f.name));
      end
      if (is_cmp) check(ctrl.cmp_op == e_cmp, $sformatf("%s cmp_op", f.name));
      check(pc_sel == e_pc, $sformatf("%s pc_sel=%s eq=%b cmp=%b", f.name, pc_sel.name(), eq, cmp));
      check(ctrl.illegal == e_ill, $sformatf("%s illegal", f.name));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// control: instruction decoder of the single-cycle MIPS processor.
//
// Takes the 32-bit instruction and produces, combinationally,
//   - the three register indices of the register file: ra = rs, rb = rt and
//     the write index rw (rd for R-type, rt for I-type, r31 for JAL),
//   - the control word ctrl (ALU operation and operand selects, extend mode,
//     shift-amount select, data-memory enable and control code, load kind,
//     writeback source, branch kind, compare mode, jump flags),
//   - the next-PC select, which also uses the outcomes eq and cmp of the
//     branch comparators.
// Supported: R-type SLL SRL SRA JR ADD ADDU SUB SUBU AND OR XOR NOR SLT;
// I-type ADDI ADDIU SLTI ANDI ORI XORI LUI, LB LBU LH LHU LW, SB SH SW,
// BEQ BNE BLEZ BGTZ and REGIMM BLTZ BGEZ; J-type J and JAL. Any other
// encoding sets ctrl.illegal and executes as a no-op that writes nothing.
//
// The instruction set, field layout and semantics follow MIPS as the
// processor defines it. ADD, SUB and ADDI behave as ADDU, SUBU and ADDIU:
// no overflow trap is implemented. There are no branch delay slots.
module control
  import mips_pkg::*;
(
  input  logic [31:0] inst,
  input  logic        eq,       // R[rs] == R[rt]
  input  logic        cmp,      // outcome of the zero test chosen by ctrl.cmp_op
  output logic [4:0]  ra,
  output logic [4:0]  rb,
  output ctrl_t       ctrl,
  output pc_sel_e     pc_sel
);

  logic [5:0] op_f, fn_f;
  logic [4:0] rs_f, rt_f, rd_f;

  always_comb begin
    op_f = inst[31:26];
    rs_f = inst[25:21];
    rt_f = inst[20:16];
    rd_f = inst[15:11];
    fn_f = inst[5:0];
    ra   = rs_f;
    rb   = rt_f;
  end

  // Decode: depends on the instruction only
  always_comb begin
    ctrl           = '0;
    ctrl.alu_op    = ALU_ADD;
    ctrl.mc        = MC_READ_WORD;
    ctrl.load_kind = LD_WORD;
    ctrl.wb_sel    = WB_ALU;
    ctrl.br_kind   = BR_NONE;
    ctrl.cmp_op    = CMP_LTZ;
    ctrl.rw        = rt_f;

    unique case (op_f)
      OP_RTYPE: begin
        ctrl.rw     = rd_f;
        ctrl.reg_we = 1'b1;
        unique case (fn_f)
          FN_SLL:  ctrl.alu_op = ALU_SLL;
          FN_SRL:  ctrl.alu_op = ALU_SRL;
          FN_SRA:  ctrl.alu_op = ALU_SRA;
          FN_ADD, FN_ADDU: ctrl.alu_op = ALU_ADD;
          FN_SUB, FN_SUBU: ctrl.alu_op = ALU_SUB;
          FN_AND:  ctrl.alu_op = ALU_AND;
          FN_OR:   ctrl.alu_op = ALU_OR;
          FN_XOR:  ctrl.alu_op = ALU_XOR;
          FN_NOR:  ctrl.alu_op = ALU_NOR;
          FN_SLT:  ctrl.alu_op = ALU_SLT;
          FN_JR: begin
            ctrl.reg_we = 1'b0;
            ctrl.jr     = 1'b1;
          end
          default: begin
            ctrl.reg_we  = 1'b0;
            ctrl.illegal = 1'b1;
          end
        endcase
      end
      OP_REGIMM: begin
        ctrl.br_kind = BR_CMP;
        if (rt_f == RI_BLTZ)      ctrl.cmp_op = CMP_LTZ;
        else if (rt_f == RI_BGEZ) ctrl.cmp_op = CMP_GEZ;
        else begin
          ctrl.br_kind = BR_NONE;
          ctrl.illegal = 1'b1;
        end
      end
      OP_J:    ctrl.jump = 1'b1;
      OP_JAL: begin
        ctrl.jump   = 1'b1;
        ctrl.reg_we = 1'b1;
        ctrl.rw     = RA_REG;
        ctrl.wb_sel = WB_LINK;
      end
      OP_BEQ:  ctrl.br_kind = BR_EQ;
      OP_BNE:  ctrl.br_kind = BR_NE;
      OP_BLEZ: begin
        ctrl.br_kind = BR_CMP;
        ctrl.cmp_op  = CMP_LEZ;
      end
      OP_BGTZ: begin
        ctrl.br_kind = BR_CMP;
        ctrl.cmp_op  = CMP_GTZ;
      end
      OP_ADDI, OP_ADDIU: begin
        ctrl.reg_we    = 1'b1;
        ctrl.alu_b_imm = 1'b1;
        ctrl.alu_op    = ALU_ADD;
      end
      OP_SLTI: begin
        ctrl.reg_we    = 1'b1;
        ctrl.alu_b_imm = 1'b1;
        ctrl.alu_op    = ALU_SLT;
      end
      OP_ANDI, OP_ORI, OP_XORI: begin
        ctrl.reg_we    = 1'b1;
        ctrl.alu_b_imm = 1'b1;
        ctrl.imm_zero  = 1'b1;
        ctrl.alu_op    = (op_f == OP_ANDI) ? ALU_AND :
                         (op_f == OP_ORI)  ? ALU_OR  : ALU_XOR;
      end
      OP_LUI: begin
        ctrl.reg_we    = 1'b1;
        ctrl.alu_b_imm = 1'b1;
        ctrl.imm_zero  = 1'b1;
        ctrl.shamt_16  = 1'b1;
        ctrl.alu_op    = ALU_SLL;
      end
      OP_LB, OP_LBU, OP_LH, OP_LHU, OP_LW: begin
        ctrl.reg_we    = 1'b1;
        ctrl.alu_b_imm = 1'b1;
        ctrl.mem_en    = 1'b1;
        ctrl.mc        = MC_READ_WORD;
        ctrl.wb_sel    = WB_MEM;
        ctrl.load_kind = (op_f == OP_LB)  ? LD_BYTE  :
                         (op_f == OP_LBU) ? LD_BYTEU :
                         (op_f == OP_LH)  ? LD_HALF  :
                         (op_f == OP_LHU) ? LD_HALFU : LD_WORD;
      end
      OP_SB, OP_SH, OP_SW: begin
        ctrl.alu_b_imm = 1'b1;
        ctrl.mem_en    = 1'b1;
        ctrl.mc        = (op_f == OP_SB) ? MC_WRITE_BYTE :
                         (op_f == OP_SH) ? MC_WRITE_HALF : MC_WRITE_WORD;
      end
      default: ctrl.illegal = 1'b1;
    endcase
  end

  // Next-PC select: the decoded kind combined with the comparator outcomes
  always_comb begin
    pc_sel = PC_SEQ;
    if (ctrl.jump) pc_sel = PC_JUMP;
    else if (ctrl.jr) pc_sel = PC_JR;
    else begin
      unique case (ctrl.br_kind)
        BR_EQ:   if (eq)  pc_sel = PC_BRANCH;
        BR_NE:   if (!eq) pc_sel = PC_BRANCH;
        BR_CMP:  if (cmp) pc_sel = PC_BRANCH;
        default: pc_sel = PC_SEQ;
      endcase
    end
  end

endmodule

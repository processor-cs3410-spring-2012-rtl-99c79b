// mips_pkg: types and constants shared by the single-cycle MIPS processor.
//
// Holds the instruction-field encodings (opcodes, R-type function codes,
// REGIMM sub-opcodes), the ALU operation set, the 2-bit data-memory control
// code, the next-PC selector, the writeback selector, the load kinds and the
// control word that the decoder hands to the datapath.
//
// The numeric opcode and function values are the standard MIPS32 encodings.
// The memory control code (00 read word, 01 write byte, 10 write halfword,
// 11 write word) is the one defined for this processor's memory. The
// enumerations of ALU operations, PC sources and writeback sources are this
// design's own choice of names and encodings.
package mips_pkg;

  localparam int unsigned XLEN = 32;  // data and address width
  localparam int unsigned NREG = 32;  // architectural registers
  localparam logic [4:0]  RA_REG = 5'd31;  // link register written by JAL

  // Major opcodes, instruction bits [31:26]
  typedef enum logic [5:0] {
    OP_RTYPE = 6'h00,
    OP_REGIMM = 6'h01,  // BLTZ / BGEZ, selected by the rt field
    OP_J     = 6'h02,
    OP_JAL   = 6'h03,
    OP_BEQ   = 6'h04,
    OP_BNE   = 6'h05,
    OP_BLEZ  = 6'h06,
    OP_BGTZ  = 6'h07,
    OP_ADDI  = 6'h08,
    OP_ADDIU = 6'h09,
    OP_SLTI  = 6'h0A,
    OP_ANDI  = 6'h0C,
    OP_ORI   = 6'h0D,
    OP_XORI  = 6'h0E,
    OP_LUI   = 6'h0F,
    OP_LB    = 6'h20,
    OP_LH    = 6'h21,
    OP_LW    = 6'h23,
    OP_LBU   = 6'h24,
    OP_LHU   = 6'h25,
    OP_SB    = 6'h28,
    OP_SH    = 6'h29,
    OP_SW    = 6'h2B
  } opcode_e;

  // R-type function codes, instruction bits [5:0]
  typedef enum logic [5:0] {
    FN_SLL  = 6'h00,
    FN_SRL  = 6'h02,
    FN_SRA  = 6'h03,
    FN_JR   = 6'h08,
    FN_ADD  = 6'h20,
    FN_ADDU = 6'h21,
    FN_SUB  = 6'h22,
    FN_SUBU = 6'h23,
    FN_AND  = 6'h24,
    FN_OR   = 6'h25,
    FN_XOR  = 6'h26,
    FN_NOR  = 6'h27,
    FN_SLT  = 6'h2A
  } funct_e;

  // REGIMM sub-opcodes, instruction bits [20:16]
  localparam logic [4:0] RI_BLTZ = 5'h00;
  localparam logic [4:0] RI_BGEZ = 5'h01;

  typedef enum logic [3:0] {
    ALU_ADD,
    ALU_SUB,
    ALU_AND,
    ALU_OR,
    ALU_XOR,
    ALU_NOR,
    ALU_SLT,
    ALU_SLL,
    ALU_SRL,
    ALU_SRA
  } alu_op_e;

  // Data-memory control code
  typedef enum logic [1:0] {
    MC_READ_WORD  = 2'b00,
    MC_WRITE_BYTE = 2'b01,
    MC_WRITE_HALF = 2'b10,
    MC_WRITE_WORD = 2'b11
  } mem_ctrl_e;

  // Zero test performed by the "cmp" unit on R[rs]
  typedef enum logic [1:0] {
    CMP_LTZ,  // R[rs] <  0
    CMP_GEZ,  // R[rs] >= 0
    CMP_LEZ,  // R[rs] <= 0
    CMP_GTZ   // R[rs] >  0
  } cmp_op_e;

  // Source of the next PC
  typedef enum logic [1:0] {
    PC_SEQ,     // PC + 4
    PC_BRANCH,  // PC + 4 + (offset << 2)
    PC_JUMP,    // {PC+4 [31:28], target, 00}
    PC_JR       // R[rs]
  } pc_sel_e;

  // Branch condition requested by the decoder
  typedef enum logic [1:0] {
    BR_NONE,
    BR_EQ,
    BR_NE,
    BR_CMP  // outcome of the cmp unit
  } br_kind_e;

  // How a loaded word is cut down before writeback
  typedef enum logic [2:0] {
    LD_WORD,
    LD_BYTE,
    LD_BYTEU,
    LD_HALF,
    LD_HALFU
  } load_kind_e;

  // Writeback source
  typedef enum logic [1:0] {
    WB_ALU,
    WB_MEM,
    WB_LINK  // PC + 8, for JAL
  } wb_sel_e;

  // Control word produced by the decoder for the datapath
  typedef struct packed {
    logic       reg_we;      // register file write enable
    logic [4:0] rw;          // destination register index
    alu_op_e    alu_op;
    logic       alu_b_imm;   // ALU B input: 1 = extended immediate, 0 = R[rt]
    logic       imm_zero;    // extend unit: 1 = zero-extend, 0 = sign-extend
    logic       shamt_16;    // shift amount: 1 = constant 16 (LUI), 0 = shamt field
    logic       mem_en;      // data memory enable
    mem_ctrl_e  mc;          // data memory control code
    load_kind_e load_kind;
    wb_sel_e    wb_sel;
    br_kind_e   br_kind;
    cmp_op_e    cmp_op;
    logic       jump;        // J / JAL
    logic       jr;          // JR
    logic       illegal;     // opcode or function not implemented
  } ctrl_t;

endpackage

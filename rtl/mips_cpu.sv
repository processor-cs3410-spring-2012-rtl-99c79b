// mips_cpu: single-cycle MIPS processor core.
//
// Every instruction passes through the five steps of the MIPS datapath in
// one clock cycle: fetch (PC to program memory, PC + 4), decode (control
// unit, register file read), execute (ALU, or the branch comparators and
// the branch adder), memory access (loads and stores only) and writeback.
// The datapath is:
//
//   PC -> program memory -> inst -> control -> register indices
//   R[rs] ------------------------------> ALU a
//   R[rt] or extended immediate (mux) --> ALU b, shamt field or 16 (mux) -> ALU shamt
//   ALU result -> data memory address;   R[rt] -> data memory write data
//   ALU result or loaded value (mux), or PC + 8 for JAL (mux) -> register write
//   R[rs] == R[rt] ("=?") and R[rs] vs 0 ("cmp") -> control -> next-PC mux
//
// Timing: the PC loads the next address on the rising edge of clk. The
// program and data memories are read combinationally during the cycle. The
// register file writes on the falling edge in the middle of the cycle; the
// data memory writes on the next rising edge. No instruction that writes a
// register also decides the next PC from a register or stores to memory, so
// the mid-cycle register write cannot disturb the decisions made at the
// rising edge.
//
// Interface: imem_* is the fetch port, dmem_* the data-memory port with the
// memory's enable and 2-bit control code. wb_we, wb_rw and wb_data show the
// register write of the current instruction, and illegal flags an encoding
// that is not implemented (it executes as a no-op).
//
// The PC+4 and next-PC outputs of pc_unit, and the branch-kind and jump
// fields of the control word (used inside control to form pc_sel), are not
// needed here and are left unread on purpose.
//
// The block structure follows the processor's datapath diagram. Reset
// behaviour, the observation outputs and the absence of delay slots and
// overflow traps are this design's own choices.
module mips_cpu
  import mips_pkg::*;
#(
  parameter logic [31:0] RESET_PC = 32'h0000_0000
) (
  input  logic        clk,
  input  logic        rst,
  // program memory
  output logic [31:0] imem_addr,
  input  logic [31:0] imem_inst,
  // data memory
  output logic [31:0] dmem_addr,
  output logic [31:0] dmem_wdata,
  output logic        dmem_en,
  output mem_ctrl_e   dmem_mc,
  input  logic [31:0] dmem_rdata,
  // observation
  output logic        wb_we,
  output logic [4:0]  wb_rw,
  output logic [31:0] wb_data,
  output logic        illegal
);

  logic [31:0] inst;
  logic [31:0] pc, pc_plus4, pc_plus8, pc_next;
  logic [4:0]  ra, rb;
  ctrl_t       ctrl;
  pc_sel_e     pc_sel;
  logic [31:0] rs_val, rt_val, imm_val, alu_b, alu_y, load_val, wdata;
  logic [4:0]  shamt;
  logic        eq, cmp;

  // Fetch
  pc_unit #(.RESET_PC(RESET_PC)) u_pc (
    .clk, .rst,
    .sel     (pc_sel),
    .offset  (inst[15:0]),
    .target  (inst[25:0]),
    .reg_tgt (rs_val),
    .pc, .pc_plus4, .pc_plus8, .pc_next
  );

  always_comb begin
    imem_addr = pc;
    inst      = imem_inst;
  end

  // Decode
  control u_ctrl (
    .inst, .eq, .cmp,
    .ra, .rb, .ctrl, .pc_sel
  );

  regfile #(.WIDTH(XLEN), .NREGS(NREG)) u_rf (
    .clk, .rst,
    .we    (ctrl.reg_we),
    .rw    (ctrl.rw),
    .wdata (wdata),
    .ra, .rb,
    .a     (rs_val),
    .b     (rt_val)
  );

  imm_ext u_ext (
    .imm      (inst[15:0]),
    .zero_ext (ctrl.imm_zero),
    .y        (imm_val)
  );

  branch_cmp u_cmp (
    .a  (rs_val),
    .b  (rt_val),
    .op (ctrl.cmp_op),
    .eq, .cmp
  );

  // Execute
  always_comb begin
    alu_b = ctrl.alu_b_imm ? imm_val : rt_val;
    shamt = ctrl.shamt_16 ? 5'd16 : inst[10:6];
  end

  alu #(.WIDTH(XLEN)) u_alu (
    .op    (ctrl.alu_op),
    .a     (rs_val),
    .b     (alu_b),
    .shamt (shamt),
    .y     (alu_y)
  );

  // Memory
  always_comb begin
    dmem_addr  = alu_y;
    dmem_wdata = rt_val;
    dmem_en    = ctrl.mem_en && !rst;  // no memory traffic while in reset
    dmem_mc    = ctrl.mc;
  end

  load_ext u_load (
    .word (dmem_rdata),
    .addr (alu_y[1:0]),
    .kind (ctrl.load_kind),
    .y    (load_val)
  );

  // Writeback
  always_comb begin
    unique case (ctrl.wb_sel)
      WB_MEM:  wdata = load_val;
      WB_LINK: wdata = pc_plus8;
      default: wdata = alu_y;
    endcase
    wb_we   = ctrl.reg_we;
    wb_rw   = ctrl.rw;
    wb_data = wdata;
    illegal = ctrl.illegal;
  end

endmodule

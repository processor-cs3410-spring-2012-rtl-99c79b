// pc_unit: program counter and next-PC logic of the single-cycle MIPS CPU.
//
// Holds the PC register, which loads the next PC on every rising clock edge
// and is set to RESET_PC while rst is high. Around it sit:
//   - the "+4" adder giving the address of the next instruction,
//   - a second "+4" adder giving PC + 8, the link value JAL writes to r31,
//   - the branch adder, PC + 4 + (sign-extended offset << 2),
//   - the jump-target concatenation {(PC+4)[31:28], target, 00},
//   - a four-way multiplexer choosing among PC+4, the branch target, the
//     jump target and a register value (JR), steered by sel.
// pc, pc_plus4 and pc_plus8 are valid throughout the cycle; the choice made
// by sel takes effect at the next rising edge.
//
// The adders, the concatenation and the four mux inputs follow the
// processor's datapath. The reset value and synchronous reset are this
// design's own choice.
module pc_unit
  import mips_pkg::*;
#(
  parameter logic [31:0] RESET_PC = 32'h0000_0000
) (
  input  logic        clk,
  input  logic        rst,
  input  pc_sel_e     sel,
  input  logic [15:0] offset,    // branch offset, in instructions
  input  logic [25:0] target,    // jump target, in instructions
  input  logic [31:0] reg_tgt,   // R[rs] for JR
  output logic [31:0] pc,
  output logic [31:0] pc_plus4,
  output logic [31:0] pc_plus8,
  output logic [31:0] pc_next
);

  logic [31:0] br_tgt, j_tgt;

  always_comb begin
    pc_plus4 = pc + 32'd4;
    pc_plus8 = pc_plus4 + 32'd4;
    br_tgt   = pc_plus4 + {{14{offset[15]}}, offset, 2'b00};
    j_tgt    = {pc_plus4[31:28], target, 2'b00};
    unique case (sel)
      PC_BRANCH: pc_next = br_tgt;
      PC_JUMP:   pc_next = j_tgt;
      PC_JR:     pc_next = reg_tgt;
      default:   pc_next = pc_plus4;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) pc <= RESET_PC;
    else     pc <= pc_next;
  end

endmodule

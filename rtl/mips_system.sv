// mips_system: a complete single-cycle MIPS computer.
//
// The CPU (mips_cpu) is connected to its own program memory (prog_mem) and
// its own data memory (data_mem), a Harvard organisation: instructions are
// fetched over one path and loads and stores use the other, so both happen
// in the same cycle. Each memory spans 2**IMEM_ADDR_W or 2**DMEM_ADDR_W
// bytes of the 32-bit address space and repeats above that.
//
// Interface: clk and rst (synchronous, active high; the PC restarts at
// RESET_PC and all registers clear). A program is written into program
// memory through load_we / load_addr / load_data, one word per rising
// edge, while rst is held. pc, the data-memory request (dmem_*) and the
// register write (wb_*) of the current instruction are brought out for
// observation, together with a flag for unimplemented instructions.
//
// The three-part organisation follows the processor's system diagram; the
// memory sizes and the loading port are this design's own choices.
module mips_system
  import mips_pkg::*;
#(
  parameter int unsigned IMEM_ADDR_W = 16,
  parameter int unsigned DMEM_ADDR_W = 16,
  parameter logic [31:0] RESET_PC    = 32'h0000_0000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        load_we,
  input  logic [31:0] load_addr,
  input  logic [31:0] load_data,
  output logic [31:0] pc,
  output logic [31:0] inst,
  output logic        dmem_en,
  output logic [1:0]  dmem_mc,
  output logic [31:0] dmem_addr,
  output logic [31:0] dmem_wdata,
  output logic [31:0] dmem_rdata,
  output logic        wb_we,
  output logic [4:0]  wb_rw,
  output logic [31:0] wb_data,
  output logic        illegal
);

  mem_ctrl_e mc;

  mips_cpu #(.RESET_PC(RESET_PC)) u_cpu (
    .clk, .rst,
    .imem_addr  (pc),
    .imem_inst  (inst),
    .dmem_addr, .dmem_wdata, .dmem_en,
    .dmem_mc    (mc),
    .dmem_rdata,
    .wb_we, .wb_rw, .wb_data, .illegal
  );

  prog_mem #(.ADDR_W(IMEM_ADDR_W)) u_imem (
    .clk,
    .addr (pc),
    .inst (inst),
    .load_we, .load_addr, .load_data
  );

  data_mem #(.ADDR_W(DMEM_ADDR_W)) u_dmem (
    .clk,
    .addr (dmem_addr),
    .din  (dmem_wdata),
    .e    (dmem_en),
    .mc   (mc),
    .dout (dmem_rdata)
  );

  always_comb dmem_mc = mc;

endmodule

// prog_mem: program (instruction) memory.
//
// 2**ADDR_W bytes organised as 32-bit words. The read port is
// combinational: inst is the word at the 4-byte aligned address addr (the
// two low address bits are ignored, the memory control is fixed at "read
// word"). Address bits above ADDR_W are ignored, so the memory repeats
// through the 32-bit address space.
//
// The memory is kept apart from data memory (a Harvard organisation). To
// put a program in it, a write port (load_we, load_addr, load_data) stores
// one word per rising clock edge; this loading port is this design's own
// addition, as is the default size of 64 KiB.
module prog_mem #(
  parameter int unsigned ADDR_W = 16
) (
  input  logic        clk,
  input  logic [31:0] addr,
  output logic [31:0] inst,
  input  logic        load_we,
  input  logic [31:0] load_addr,
  input  logic [31:0] load_data
);

  localparam int unsigned WORDS = 2 ** (ADDR_W - 2);

  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (load_we) mem[load_addr[ADDR_W-1:2]] <= load_data;
  end

  always_comb inst = mem[addr[ADDR_W-1:2]];

endmodule

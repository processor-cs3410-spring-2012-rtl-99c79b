// data_mem: byte-addressed data memory of the MIPS processor.
//
// 2**ADDR_W bytes holding 32-bit words, with a 32-bit data input, a 32-bit
// data output, an enable e and a 2-bit memory control mc:
//   00  read word      (4-byte aligned; addr[1:0] ignored)
//   01  write byte     din[7:0]  to byte addr
//   10  write halfword din[15:0] to the 2-byte aligned halfword at addr
//   11  write word     din       to the 4-byte aligned word at addr
// Reads are combinational: dout is the aligned word at addr while e is high
// and mc is 00, and 0 otherwise. Writes take effect at the rising clock edge
// when e is high. Bytes are little endian: byte offset 0 of a word is bits
// [7:0]. Address bits above ADDR_W are ignored.
//
// The port set and the control code follow the processor's memory
// definition. Little-endian lane order, the write timing and the 64 KiB
// default size are this design's own choices.
module data_mem
  import mips_pkg::*;
#(
  parameter int unsigned ADDR_W = 16
) (
  input  logic        clk,
  input  logic [31:0] addr,
  input  logic [31:0] din,
  input  logic        e,
  input  mem_ctrl_e   mc,
  output logic [31:0] dout
);

  localparam int unsigned WORDS = 2 ** (ADDR_W - 2);

  logic [31:0]       mem [WORDS];
  logic [ADDR_W-3:0] widx;
  logic [3:0]        be;     // byte-lane write enables
  logic [31:0]       wdata;  // din moved to its byte lanes

  always_comb begin
    widx = addr[ADDR_W-1:2];
    be    = 4'b0000;
    wdata = din;
    unique case (mc)
      MC_WRITE_BYTE: begin
        be    = 4'b0001 << addr[1:0];
        wdata = {4{din[7:0]}};
      end
      MC_WRITE_HALF: begin
        be    = addr[1] ? 4'b1100 : 4'b0011;
        wdata = {2{din[15:0]}};
      end
      MC_WRITE_WORD: be = 4'b1111;
      default:       be = 4'b0000;
    endcase
    if (!e) be = 4'b0000;
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < 4; i++) begin
      if (be[i]) mem[widx][8*i +: 8] <= wdata[8*i +: 8];
    end
  end

  always_comb dout = (e && mc == MC_READ_WORD) ? mem[widx] : '0;

endmodule

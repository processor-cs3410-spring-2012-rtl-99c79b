// load_ext: load alignment for byte and halfword loads.
//
// The data memory only reads whole, 4-byte aligned words. This unit picks
// the addressed byte (addr[1:0]) or halfword (addr[1]) out of that word and
// sign- or zero-extends it to 32 bits, as LB, LBU, LH and LHU require; LW
// passes the word through. Byte lanes are little endian: byte address
// offset 0 is bits [7:0]. Purely combinational.
//
// The load semantics follow the instruction set; placing the selection in a
// separate unit after the memory, and little-endian lane order, are this
// design's own choices.
module load_ext
  import mips_pkg::*;
(
  input  logic [31:0] word,
  input  logic [1:0]  addr,   // low address bits of the load
  input  load_kind_e  kind,
  output logic [31:0] y
);

  logic [7:0]  byte_v;
  logic [15:0] half_v;

  always_comb begin
    byte_v = word[8*addr +: 8];
    half_v = word[16*addr[1] +: 16];
    unique case (kind)
      LD_BYTE:  y = {{24{byte_v[7]}}, byte_v};
      LD_BYTEU: y = {24'h0, byte_v};
      LD_HALF:  y = {{16{half_v[15]}}, half_v};
      LD_HALFU: y = {16'h0, half_v};
      default:  y = word;
    endcase
  end

endmodule

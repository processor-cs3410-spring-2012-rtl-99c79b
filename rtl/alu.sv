// alu: arithmetic and logic unit of the single-cycle MIPS processor.
//
// Computes y from operand a (register rs), operand b (register rt or the
// extended immediate) and a 5-bit shift amount, according to op:
// add and subtract (32-bit, wrap-around, no overflow trap), and, or, xor,
// nor, signed set-less-than (y = 1 when a < b), and the three shifts of b by
// shamt: logical left, logical right (zero fill) and arithmetic right (sign
// fill). LUI is done by the datapath as a left shift of the immediate by 16.
// Purely combinational.
//
// The operation set is the one the processor's instructions need. The shift
// amount entering as a separate input is taken from the processor's
// datapath; the operation encoding is this design's own.
module alu
  import mips_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  alu_op_e                    op,
  input  logic [WIDTH-1:0]           a,
  input  logic [WIDTH-1:0]           b,
  input  logic [$clog2(WIDTH)-1:0]   shamt,
  output logic [WIDTH-1:0]           y
);

  always_comb begin
    unique case (op)
      ALU_ADD: y = a + b;
      ALU_SUB: y = a - b;
      ALU_AND: y = a & b;
      ALU_OR:  y = a | b;
      ALU_XOR: y = a ^ b;
      ALU_NOR: y = ~(a | b);
      ALU_SLT: y = {{(WIDTH-1){1'b0}}, $signed(a) < $signed(b)};
      ALU_SLL: y = b << shamt;
      ALU_SRL: y = b >> shamt;
      ALU_SRA: y = WIDTH'($signed(b) >>> shamt);
      default: y = '0;
    endcase
  end

endmodule

// branch_cmp: the branch comparators of the MIPS datapath.
//
// Two units that sit beside the ALU so that a branch does not need it:
// the "=?" comparator reports eq = (a == b) for BEQ and BNE, and the "cmp"
// unit tests a = R[rs] against zero as selected by op (less than zero,
// greater or equal, less or equal, greater than zero) for BLTZ, BGEZ, BLEZ
// and BGTZ. Both outputs go to the decoder, which chooses the next PC.
// Purely combinational. The selection encoding is this design's own.
module branch_cmp
  import mips_pkg::*;
(
  input  logic [31:0] a,      // R[rs]
  input  logic [31:0] b,      // R[rt]
  input  cmp_op_e     op,
  output logic        eq,
  output logic        cmp
);

  logic neg, zero;

  always_comb begin
    eq   = (a == b);
    neg  = a[31];
    zero = (a == '0);
    unique case (op)
      CMP_LTZ: cmp = neg;
      CMP_GEZ: cmp = !neg;
      CMP_LEZ: cmp = neg || zero;
      CMP_GTZ: cmp = !neg && !zero;
      default: cmp = 1'b0;
    endcase
  end

endmodule

// imm_ext: the immediate "extend" unit of the MIPS datapath.
//
// Widens the 16-bit immediate of an I-type instruction to 32 bits. With
// zero_ext low the upper half copies bit 15 (sign extension, used by
// arithmetic immediates, set-less-than, loads, stores and branch offsets);
// with zero_ext high the upper half is zero (logical immediates and LUI).
// Purely combinational; zero_ext comes from the decoder.
module imm_ext (
  input  logic [15:0] imm,
  input  logic        zero_ext,
  output logic [31:0] y
);

  always_comb y = {(zero_ext ? 16'h0000 : {16{imm[15]}}), imm};

endmodule

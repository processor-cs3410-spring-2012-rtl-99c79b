// regfile: the MIPS general-purpose register file.
//
// Thirty-two registers of 32 bits. Register 0 is wired to zero: it always
// reads as 0 and writes to it are dropped, so only r1..r31 are storage.
// Two read ports (A indexed by ra, B indexed by rb) are combinational. The
// single write port, indexed by rw, stores wdata on the falling edge of clk
// when we is high. A single-cycle processor that updates its PC on the rising
// edge therefore writes its result in the middle of the cycle, after the
// operands have been read and the result computed.
//
// Register count, width, r0 behaviour, falling-edge write and the port set
// (W, WE, RW, RA, RB, A, B) follow the processor's specification. Resetting
// the storage to zero on rst is this design's own choice.
module regfile #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned NREGS = 32
) (
  input  logic                     clk,
  input  logic                     rst,    // synchronous (falling-edge) clear
  input  logic                     we,
  input  logic [$clog2(NREGS)-1:0] rw,
  input  logic [WIDTH-1:0]         wdata,
  input  logic [$clog2(NREGS)-1:0] ra,
  input  logic [$clog2(NREGS)-1:0] rb,
  output logic [WIDTH-1:0]         a,
  output logic [WIDTH-1:0]         b
);

  logic [WIDTH-1:0] regs [1:NREGS-1];

  always_ff @(negedge clk) begin
    if (rst) begin
      for (int i = 1; i < NREGS; i++) regs[i] <= '0;
    end else if (we && rw != '0) begin
      regs[rw] <= wdata;
    end
  end

  always_comb a = (ra == '0) ? '0 : regs[ra];
  always_comb b = (rb == '0) ? '0 : regs[rb];

endmodule

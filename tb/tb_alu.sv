// tb_alu: self-checking test of the ALU.
//
// Applies directed corner values and random operands to every operation and
// compares with results computed in the testbench from the instruction
// definitions (two's-complement add and subtract, bitwise logic, signed
// set-less-than, logical and arithmetic shifts of b by shamt).
module tb_alu;
  import mips_pkg::*;

  alu_op_e     op;
  logic [31:0] a, b, y;
  logic [4:0]  shamt;
  int checks = 0, failures = 0;

  alu dut (.op, .a, .b, .shamt, .y);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] expect_y(alu_op_e o, logic [31:0] x, logic [31:0] z,
                                           int s);
    logic [31:0] r;
    case (o)
      ALU_ADD: r = x + z;
      ALU_SUB: r = x + ~z + 1;
      ALU_AND: r = x & z;
      ALU_OR:  r = x | z;
      ALU_XOR: r = x ^ z;
      ALU_NOR: r = ~x & ~z;
      ALU_SLT: begin
        if (x[31] != z[31]) r = {31'b0, x[31]};
        else r = {31'b0, x < z};
      end
      ALU_SLL: begin
        r = z;
        repeat (s) r = {r[30:0], 1'b0};
      end
      ALU_SRL: begin
        r = z;
        repeat (s) r = {1'b0, r[31:1]};
      end
      ALU_SRA: begin
        r = z;
        repeat (s) r = {r[31], r[31:1]};
      end
      default: r = 'x;
    endcase
    return r;
  endfunction

  task automatic apply(alu_op_e o, logic [31:0] x, logic [31:0] z, int s);
    logic [31:0] e;
    op = o; a = x; b = z; shamt = 5'(s);
    #1;
    e = expect_y(o, x, z, s);
    checks++;
    if (y !== e) begin
      failures++;
      if (failures < 10) $display("FAIL %s a=%h b=%h sh=%0d y=%h expected %h", o.name(), x, z, s, y, e);
    end
  endtask

  initial begin
    static logic [31:0] corners [8] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h8000_0000, 32'h7FFF_FFFF,
                                 32'hdead_beef, 32'h0000_FFFF, 32'h1234_5678};
    static alu_op_e ops [10] = '{ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_NOR, ALU_SLT,
                          ALU_SLL, ALU_SRL, ALU_SRA};
    foreach (ops[k]) foreach (corners[i]) foreach (corners[j])
      apply(ops[k], corners[i], corners[j], (i * 5 + j) % 32);
    // worked examples: slt with 4, LUI as a shift by 16, r3 * 8
    apply(ALU_SLT, 32'd3, 32'd4, 0);
    apply(ALU_SLT, 32'hFFFF_FFFF, 32'd4, 0);
    apply(ALU_SLL, 32'h0, 32'h0000_dead, 16);
    apply(ALU_SLL, 32'h0, 32'd7, 3);
    repeat (20000) apply(ops[$urandom_range(0, 9)], $urandom, $urandom, $urandom_range(0, 31));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

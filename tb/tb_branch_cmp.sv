// tb_branch_cmp: self-checking test of the branch comparators.
//
// Drives corner values (0, 1, -1, most negative, most positive) and random
// pairs, sometimes equal, through every zero-test mode and checks eq and cmp
// against the comparisons evaluated on signed integers in the testbench.
module tb_branch_cmp;
  import mips_pkg::*;

  logic [31:0] a, b;
  cmp_op_e     op;
  logic        eq, cmp;
  int checks = 0, failures = 0;

  branch_cmp dut (.a, .b, .op, .eq, .cmp);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(logic [31:0] x, logic [31:0] z, cmp_op_e o);
    int sx;
    bit e_cmp;
    a = x; b = z; op = o;
    #1;
    sx = int'(x);
    case (o)
      CMP_LTZ: e_cmp = sx < 0;
      CMP_GEZ: e_cmp = sx >= 0;
      CMP_LEZ: e_cmp = sx <= 0;
      default: e_cmp = sx > 0;
    endcase
    checks += 2;
    if (eq !== (x == z)) begin
      failures++;
      if (failures < 10) $display("FAIL eq a=%h b=%h", x, z);
    end
    if (cmp !== e_cmp) begin
      failures++;
      if (failures < 10) $display("FAIL %s a=%h cmp=%b", o.name(), x, cmp);
    end
  endtask

  initial begin
    static logic [31:0] corners [5] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h8000_0000, 32'h7FFF_FFFF};
    static cmp_op_e ops [4] = '{CMP_LTZ, CMP_GEZ, CMP_LEZ, CMP_GTZ};
    foreach (corners[i]) foreach (corners[j]) foreach (ops[k]) apply(corners[i], corners[j], ops[k]);
    repeat (20000) begin
      logic [31:0] x;
      x = $urandom;
      apply(x, ($urandom_range(0, 3) == 0) ? x : $urandom, ops[$urandom_range(0, 3)]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

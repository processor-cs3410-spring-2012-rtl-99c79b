// tb_pc_unit: self-checking test of the program counter and next-PC logic.
//
// Each cycle a random next-PC source, branch offset, jump target and
// register value are applied. Before the rising edge pc + 4, pc + 8 and the
// selected next PC are compared with values computed in the testbench
// (branch: pc + 4 + 4 * signed offset; jump: upper four bits of pc + 4
// joined with 4 * target; JR: the register value); after the edge the PC
// must hold that next PC. Reset must return the PC to address 0.
module tb_pc_unit;
  import mips_pkg::*;

  logic        clk = 1'b0, rst = 1'b1;
  pc_sel_e     sel = PC_SEQ;
  logic [15:0] offset = '0;
  logic [25:0] target = '0;
  logic [31:0] reg_tgt = '0, pc, pc_plus4, pc_plus8, pc_next;
  logic [31:0] model_pc;
  int checks = 0, failures = 0;
  int seen [4] = '{0, 0, 0, 0};

  always #5 clk = ~clk;

  pc_unit dut (.clk, .rst, .sel, .offset, .target, .reg_tgt, .pc, .pc_plus4, .pc_plus8, .pc_next);

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    logic [31:0] e_next;
    @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    model_pc = 32'h0;
    check(pc == 32'h0, "reset value");
    repeat (5000) begin
      sel = pc_sel_e'($urandom_range(0, 3));
      offset = 16'($urandom);
      target = 26'($urandom);
      reg_tgt = $urandom & 32'hFFFF_FFFC;
      #1;
      case (sel)
        PC_BRANCH: e_next = model_pc + 4 + 4 * 32'(signed'(offset));
        PC_JUMP:   e_next = ((model_pc + 4) & 32'hF000_0000) + 4 * 32'(target);
        PC_JR:     e_next = reg_tgt;
        default:   e_next = model_pc + 4;
      endcase
      seen[sel]++;
      check(pc == model_pc, $sformatf("pc %h expected %h", pc, model_pc));
      check(pc_plus4 == model_pc + 4, "pc + 4");
      check(pc_plus8 == model_pc + 8, "pc + 8");
      check(pc_next == e_next, $sformatf("%s next %h expected %h", sel.name(), pc_next, e_next));
      @(posedge clk);
      #1;
      model_pc = e_next;
      check(pc == model_pc, "pc after edge");
      @(negedge clk);
    end
    @(negedge clk);
    rst = 1'b1;
    @(posedge clk);
    #1 check(pc == 32'h0, "second reset");
    foreach (seen[i]) check(seen[i] > 0, "every source used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

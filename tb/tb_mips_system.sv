// tb_mips_system: end-to-end test of the single-cycle MIPS computer at its
// default sizes (64 KiB program memory, 64 KiB data memory).
//
// A test program is built in the testbench: worked examples (a counting
// loop, byte stores and loads showing the little-endian layout,
// A[12] = h + A[8], building 0xdeadbeef with LUI/ORI, multiply by 8 with a
// shift, an if/else, a JAL/JR subroutine call, every branch condition taken
// and not taken, byte and halfword loads and stores, the remaining ALU
// operations, a jump through a register to 0xdecafe00 or 0xabcd1234) and
// then 3000 random instructions. The program is written through the
// loading port during reset. The CPU then runs in lockstep with an
// instruction-level reference model: in every cycle the PC, the register
// write and any store must match the model, which also checks that every
// instruction takes exactly one cycle. At the end the hand-computed results
// of the examples are read back from data memory. Each mechanism of the
// design (every instruction class, taken and untaken branches, backward
// branches, writes to r0, PC wrap-around in program memory) must occur.
module tb_mips_system;
  import mips_asm_pkg::*;

  logic        clk = 1'b0;
  logic        rst = 1'b1;
  logic        load_we = 1'b0;
  logic [31:0] load_addr = '0, load_data = '0;
  logic [31:0] pc, inst, dmem_addr, dmem_wdata, dmem_rdata, wb_data;
  logic [1:0]  dmem_mc;
  logic        dmem_en, wb_we, illegal;
  logic [4:0]  wb_rw;

  int checks = 0, failures = 0;
  int cnt [string];

  always #5 clk = ~clk;

  mips_system dut (
    .clk, .rst, .load_we, .load_addr, .load_data,
    .pc, .inst, .dmem_en, .dmem_mc, .dmem_addr, .dmem_wdata, .dmem_rdata,
    .wb_we, .wb_rw, .wb_data, .illegal
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (pc=%h inst=%h)", what, pc, inst);
    end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : run
    static prog_builder pb = new();
    static mips_ref     ref_m = new(32'h0000_FFFF);
    effect_t     e;
    static int          cycles = 0, executed = 0;
    static string       need [$] = '{"add", "sub", "and", "or", "xor", "nor", "slt", "sll", "srl",
                              "sra", "jr", "j", "jal", "beq", "bne", "bz", "addi", "slti",
                              "logi", "lui", "lb", "lbu", "lh", "lhu", "lw", "sb", "sh", "sw",
                              "taken", "not_taken", "backward", "r0_write", "pc_wrap"};

    pb.build(3000);
    foreach (pb.img[a]) ref_m.imem[a] = pb.img[a];

    // load the program while in reset
    foreach (pb.img[a]) begin
      @(negedge clk);
      load_we = 1'b1; load_addr = a; load_data = pb.img[a];
    end
    @(negedge clk);
    load_we = 1'b0;
    repeat (2) @(negedge clk);
    @(posedge clk);
    #1 rst = 1'b0;

    while ((pc & 32'h0000_FFFF) != pb.end_pc && cycles < 50000) begin
      #1;  // sample between the rising edge and the falling-edge register write
      check(pc == ref_m.pc, $sformatf("pc %h expected %h", pc, ref_m.pc));
      check(!illegal, "illegal instruction flagged");
      e = ref_m.step();
      executed++;
      cnt[e.kind]++;
      if (e.kind inside {"beq", "bne", "bz"}) begin
        if (e.taken) cnt["taken"]++; else cnt["not_taken"]++;
        if (e.taken && e.next_pc < pc) cnt["backward"]++;
      end
      if (wb_we && wb_rw == 0) cnt["r0_write"]++;
      if (pc[31:16] != 16'h0) cnt["pc_wrap"]++;
      if (e.reg_we)
        check(wb_we && wb_rw == 5'(e.rw) && wb_data == e.wdata,
              $sformatf("%s: wb %0d r%0d=%h expected r%0d=%h", e.kind, wb_we, wb_rw, wb_data,
                        e.rw, e.wdata));
      else
        check(!(wb_we && wb_rw != 0), $sformatf("%s: unexpected write r%0d", e.kind, wb_rw));
      if (e.st)
        check(dmem_en && dmem_mc == e.st_mc && dmem_addr == e.st_addr && dmem_wdata == e.st_data,
              $sformatf("%s: store mc=%b a=%h d=%h", e.kind, dmem_mc, dmem_addr, dmem_wdata));
      else
        check(!(dmem_en && dmem_mc != 2'b00), "unexpected store");
      @(posedge clk);
      cycles++;
    end
    #1;
    check((pc & 32'h0000_FFFF) == pb.end_pc, "program reached its end");
    check(cycles == executed, "one instruction per cycle");

    // hand-computed results of the worked examples
    foreach (pb.exp_addr[i]) begin
      logic [31:0] got;
      got = dut.u_dmem.mem[pb.exp_addr[i][15:2]];
      check(got == pb.exp_val[i], $sformatf("mem[%h] = %h expected %h", pb.exp_addr[i], got,
                                            pb.exp_val[i]));
    end

    foreach (need[i]) begin
      if (!cnt.exists(need[i])) cnt[need[i]] = 0;
      check(cnt[need[i]] > 0, $sformatf("mechanism %s never happened", need[i]));
    end
    $write("mechanisms:");
    foreach (need[i]) $write(" %s=%0d", need[i], cnt[need[i]]);
    $write("\n");
    $display("instructions executed: %0d in %0d cycles", executed, cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_mips_cpu: test of the single-cycle MIPS core on its own.
//
// Program and data memory are modelled in the testbench: the program image
// is an associative array read combinationally at the PC (repeating every
// 64 KiB), and data memory is a byte array that follows the memory's
// control code (00 read word, 01/10/11 write byte/halfword/word on the
// rising edge, little endian). The test program (worked examples followed
// by 1500 random instructions) runs in lockstep with an instruction-level
// reference model: each cycle the PC, the register write and any store
// must match. The hand-computed results of the examples are then read back
// from the modelled data memory, and each instruction class, taken and
// untaken and backward branches, writes to r0 and PC wrap-around must have
// occurred.
module tb_mips_cpu;
  import mips_asm_pkg::*;

  logic        clk = 1'b0;
  logic        rst = 1'b1;
  logic [31:0] img [logic [31:0]];
  logic [7:0]  dmem [logic [31:0]];
  logic [31:0] pc, inst, dmem_addr, dmem_wdata, dmem_rdata, wb_data;
  logic [1:0]  dmem_mc;
  logic        dmem_en, wb_we, illegal;
  logic [4:0]  wb_rw;

  int checks = 0, failures = 0;
  int cnt [string];

  always #5 clk = ~clk;

  mips_cpu dut (
    .clk, .rst,
    .imem_addr (pc), .imem_inst (inst),
    .dmem_addr, .dmem_wdata, .dmem_en,
    .dmem_mc   (dmem_mc_e),
    .dmem_rdata,
    .wb_we, .wb_rw, .wb_data, .illegal
  );
  mips_pkg::mem_ctrl_e dmem_mc_e;
  assign dmem_mc = dmem_mc_e;

  function automatic logic [7:0] rd8(logic [31:0] a);
    return dmem.exists(a) ? dmem[a] : 8'h00;
  endfunction

  // program memory model
  always_comb inst = img.exists(pc & 32'h0000_FFFC) ? img[pc & 32'h0000_FFFC] : 32'h0;

  // data memory model
  always_comb begin
    logic [31:0] wa;
    wa = {dmem_addr[31:2], 2'b00};
    dmem_rdata = (dmem_en && dmem_mc == 2'b00) ?
                 {rd8(wa + 3), rd8(wa + 2), rd8(wa + 1), rd8(wa)} : 32'h0;
  end
  always @(posedge clk) begin
    if (dmem_en) begin
      case (dmem_mc)
        2'b01: dmem[dmem_addr] = dmem_wdata[7:0];
        2'b10: begin
          dmem[{dmem_addr[31:1], 1'b0}] = dmem_wdata[7:0];
          dmem[{dmem_addr[31:1], 1'b1}] = dmem_wdata[15:8];
        end
        2'b11: for (int k = 0; k < 4; k++) dmem[{dmem_addr[31:2], 2'(k)}] = dmem_wdata[8*k +: 8];
        default: ;
      endcase
    end
  end

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

    pb.build(1500);
    foreach (pb.img[a]) ref_m.imem[a] = pb.img[a];
    foreach (pb.img[a]) img[a] = pb.img[a];
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
      logic [31:0] got, wa;
      wa = pb.exp_addr[i];
      got = {rd8(wa + 3), rd8(wa + 2), rd8(wa + 1), rd8(wa)};
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

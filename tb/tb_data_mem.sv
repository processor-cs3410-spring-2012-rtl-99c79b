// tb_data_mem: self-checking test of the byte-addressed data memory.
//
// Keeps a byte-level model of the memory in the testbench. Writes random
// words, halfwords and bytes (control codes 11, 10, 01) at random addresses,
// some with the enable low, and reads back words (code 00) after each,
// comparing with the model. Also checks the little-endian lane order on a
// fixed example (word 0x12345678: byte offset 0 holds 0x78), that dout is 0
// when disabled, and address wrap-around above ADDR_W. Runs at a reduced
// size of 4 KiB.
module tb_data_mem;
  import mips_pkg::*;

  localparam int unsigned AW = 12;

  logic        clk = 1'b0;
  logic [31:0] addr = '0, din = '0, dout;
  logic        e = 1'b0;
  mem_ctrl_e   mc = MC_READ_WORD;
  logic [7:0]  model [2**AW];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  data_mem #(.ADDR_W(AW)) dut (.clk, .addr, .din, .e, .mc, .dout);

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write(logic [31:0] a, logic [31:0] d, mem_ctrl_e c, logic en);
    @(negedge clk);
    addr = a; din = d; mc = c; e = en;
    @(posedge clk);
    #1;
    e = 1'b0;
    if (en) begin
      case (c)
        MC_WRITE_BYTE: model[a[AW-1:0]] = d[7:0];
        MC_WRITE_HALF: begin
          model[{a[AW-1:1], 1'b0}] = d[7:0];
          model[{a[AW-1:1], 1'b1}] = d[15:8];
        end
        MC_WRITE_WORD: for (int k = 0; k < 4; k++) model[{a[AW-1:2], 2'(k)}] = d[8*k +: 8];
        default: ;
      endcase
    end
  endtask

  task automatic check_read(logic [31:0] a);
    logic [31:0] exp;
    @(negedge clk);
    addr = a; mc = MC_READ_WORD; e = 1'b1;
    #1;
    for (int k = 0; k < 4; k++) exp[8*k +: 8] = model[{a[AW-1:2], 2'(k)}];
    checks++;
    if (dout !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL read %h: %h expected %h", a, dout, exp);
    end
    e = 1'b0;
  endtask

  initial begin
    // initialise everything through the word-write port
    for (int w = 0; w < 2**AW / 4; w++) write(32'(w * 4), 32'h0, MC_WRITE_WORD, 1'b1);

    // fixed little-endian example
    write(32'h100, 32'h1234_5678, MC_WRITE_WORD, 1'b1);
    write(32'h102, 32'h0000_00AB, MC_WRITE_BYTE, 1'b1);
    check_read(32'h100);
    checks++;
    if (dout !== 32'h12AB_5678) begin
      failures++;
      $display("FAIL byte lane: %h", dout);
    end
    write(32'h102, 32'h0000_CDEF, MC_WRITE_HALF, 1'b1);
    check_read(32'h103);
    checks++;
    if (dout !== 32'hCDEF_5678) begin
      failures++;
      $display("FAIL half lane: %h", dout);
    end

    // disabled read gives zero
    @(negedge clk);
    addr = 32'h100; e = 1'b0; mc = MC_READ_WORD;
    #1;
    checks++;
    if (dout !== 32'h0) begin
      failures++;
      $display("FAIL dout while disabled: %h", dout);
    end

    // wrap-around: address bit AW is ignored
    write(32'(2**AW) + 32'h10, 32'hCAFE_F00D, MC_WRITE_WORD, 1'b1);
    check_read(32'h10);

    // random traffic
    repeat (3000) begin
      logic [31:0] a;
      mem_ctrl_e   c;
      a = $urandom_range(0, 2**AW - 1);
      c = mem_ctrl_e'($urandom_range(1, 3));
      write(a, $urandom, c, ($urandom_range(0, 7) != 0));
      check_read(a);
      check_read($urandom_range(0, 2**AW - 1));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_prog_mem: self-checking test of the program memory at a reduced size
// of 1 KiB. Fills it through the loading port with random words, then reads
// every word back at its aligned address, at unaligned byte addresses
// (low bits ignored) and at aliases above the memory size.
module tb_prog_mem;
  localparam int unsigned AW = 10;

  logic        clk = 1'b0, load_we = 1'b0;
  logic [31:0] addr = '0, inst, load_addr = '0, load_data = '0;
  logic [31:0] model [2**(AW-2)];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  prog_mem #(.ADDR_W(AW)) dut (.clk, .addr, .inst, .load_we, .load_addr, .load_data);

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (model[i]) begin
      @(negedge clk);
      load_we = 1'b1; load_addr = 32'(i * 4); load_data = $urandom;
      model[i] = load_data;
    end
    // a write with load_we low must not change anything
    @(negedge clk);
    load_we = 1'b0; load_addr = 32'h0; load_data = ~model[0];
    @(negedge clk);
    repeat (3000) begin
      int w;
      w = $urandom_range(0, 2**(AW-2) - 1);
      addr = 32'(w * 4) + 32'($urandom_range(0, 3)) + (32'($urandom_range(0, 3)) << AW);
      #1;
      checks++;
      if (inst !== model[w]) begin
        failures++;
        if (failures < 10) $display("FAIL addr %h inst %h expected %h", addr, inst, model[w]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

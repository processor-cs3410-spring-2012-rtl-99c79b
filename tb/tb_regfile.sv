// tb_regfile: self-checking test of the 32 x 32-bit register file.
//
// A testbench array models the registers. Random writes (random index,
// including r0, with the write enable randomly low) are applied; both read
// ports are checked against the model before the falling edge (old value
// still visible) and after it (new value visible), which checks that the
// write happens on the falling edge. r0 must always read 0, and reset must
// clear every register.
module tb_regfile;
  logic        clk = 1'b0, rst = 1'b1, we = 1'b0;
  logic [4:0]  rw = '0, ra = '0, rb = '0;
  logic [31:0] wdata = '0, a, b;
  logic [31:0] model [32];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  regfile dut (.clk, .rst, .we, .rw, .wdata, .ra, .rb, .a, .b);

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_ports(string when);
    checks += 2;
    if (a !== model[ra]) begin
      failures++;
      if (failures < 10) $display("FAIL %s A r%0d = %h expected %h", when, ra, a, model[ra]);
    end
    if (b !== model[rb]) begin
      failures++;
      if (failures < 10) $display("FAIL %s B r%0d = %h expected %h", when, rb, b, model[rb]);
    end
  endtask

  initial begin
    foreach (model[i]) model[i] = '0;
    @(negedge clk);
    @(negedge clk);
    rst = 1'b0;
    // reset cleared every register
    for (int i = 0; i < 32; i++) begin
      ra = 5'(i); rb = 5'(31 - i);
      #1 check_ports("after reset");
    end
    repeat (5000) begin
      @(posedge clk);
      we = ($urandom_range(0, 3) != 0);
      rw = 5'($urandom_range(0, 31));
      wdata = $urandom;
      ra = ($urandom_range(0, 1) != 0) ? rw : 5'($urandom_range(0, 31));
      rb = 5'($urandom_range(0, 31));
      #1 check_ports("before falling edge");
      @(negedge clk);
      if (we && rw != 0) model[rw] = wdata;
      #1 check_ports("after falling edge");
    end
    // reset again
    @(posedge clk);
    rst = 1'b1; we = 1'b0;
    @(negedge clk);
    #1 rst = 1'b0;
    foreach (model[i]) model[i] = '0;
    for (int i = 0; i < 32; i++) begin
      ra = 5'(i); rb = 5'(i);
      #1 check_ports("after second reset");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_imm_ext: exhaustive test of the immediate extend unit: every 16-bit
// value, sign- and zero-extended, against the value computed as an integer
// in the testbench.
module tb_imm_ext;
  logic [15:0] imm;
  logic        zero_ext;
  logic [31:0] y;
  int checks = 0, failures = 0;

  imm_ext dut (.imm, .zero_ext, .y);

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 65536; v++) begin
      for (int z = 0; z < 2; z++) begin
        int expect_v;
        imm = 16'(v); zero_ext = z[0];
        #1;
        expect_v = (z == 0 && v >= 32768) ? v - 65536 : v;
        checks++;
        if (y !== 32'(expect_v)) begin
          failures++;
          if (failures < 10) $display("FAIL imm=%h zero=%0d y=%h", imm, z, y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_load_ext: self-checking test of the load alignment unit.
//
// For random words and every byte offset and load kind, the expected value
// is assembled in the testbench from the word viewed as four little-endian
// bytes (byte k is bits 8k+7..8k), then sign- or zero-extended.
module tb_load_ext;
  import mips_pkg::*;

  logic [31:0] word, y;
  logic [1:0]  addr;
  load_kind_e  kind;
  int checks = 0, failures = 0;

  load_ext dut (.word, .addr, .kind, .y);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static load_kind_e kinds [5] = '{LD_WORD, LD_BYTE, LD_BYTEU, LD_HALF, LD_HALFU};
    repeat (4000) begin
      logic [7:0]  bytes [4];
      logic [31:0] e;
      word = $urandom;
      if ($urandom_range(0, 3) == 0) word = 32'h80F1_7F02;
      for (int k = 0; k < 4; k++) bytes[k] = word[8*k +: 8];
      for (int o = 0; o < 4; o++) begin
        foreach (kinds[i]) begin
          int lo;
          addr = 2'(o); kind = kinds[i];
          #1;
          lo = (o / 2) * 2;  // halfword starts at an even byte
          case (kinds[i])
            LD_BYTE:  e = 32'(signed'(bytes[o]));
            LD_BYTEU: e = {24'h0, bytes[o]};
            LD_HALF:  e = 32'(signed'({bytes[lo + 1], bytes[lo]}));
            LD_HALFU: e = {16'h0, bytes[lo + 1], bytes[lo]};
            default:  e = {bytes[3], bytes[2], bytes[1], bytes[0]};
          endcase
          checks++;
          if (y !== e) begin
            failures++;
            if (failures < 10) $display("FAIL %s word=%h off=%0d y=%h expected %h", kind.name(), word, o, y, e);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

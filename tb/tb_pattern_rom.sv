// tb_pattern_rom: reads every word of two 256-word ROMs and checks bit i-1
// of word c against "c differs from p_i", worked out from the pattern string.
module tb_pattern_rom;

  import nids_pkg::*;

  char_t      addr;
  logic [2:0] s_aab;
  logic [6:0] s_sh;
  int checks = 0, failures = 0;

  pattern_rom #(.MAXLEN(3), .LEN(3), .PATTERN("aab")) dut_a (.addr(addr), .s(s_aab));
  pattern_rom #(.MAXLEN(8), .LEN(7), .PATTERN("/bin/sh")) dut_b (.addr(addr), .s(s_sh));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  string p1 = "aab";
  string p2 = "/bin/sh";

  initial begin
    for (int c = 0; c < 256; c++) begin
      addr = char_t'(c);
      #1;
      for (int i = 0; i < 3; i++) begin
        checks++;
        if (s_aab[i] !== (c != int'(p1[i]))) begin
          failures++;
          $display("FAIL aab c=%0d i=%0d", c, i + 1);
        end
      end
      for (int i = 0; i < 7; i++) begin
        checks++;
        if (s_sh[i] !== (c != int'(p2[i]))) begin
          failures++;
          $display("FAIL /bin/sh c=%0d i=%0d", c, i + 1);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_rule_rom: checks encoder-addressed ROMs against the bit-vector
// definitions, computed in the testbench straight from the raw input.
//
// One character per cycle: pattern "aab" behind keys a, b; bit i-1 of the
// word must be 0 exactly when the character equals p_i. Two characters per
// cycle: pattern "abcab" (pairs ab, ca, b*) behind the keys of a group that
// also holds another rule, (a,b) (c,a) (b,c) exact and b, a first-character;
// bit i-1 must be 0 exactly when the input pair equals (p_{2i-1}, p_{2i}),
// the second character being free for the last, half-filled pair.
module tb_rule_rom;

  import nids_pkg::*;

  localparam logic [KEY_W*2-1:0] KEYS1 = {make_key("b", 8'h0, 1'b1), make_key("a", 8'h0, 1'b1)};
  localparam logic [KEY_W*5-1:0] KEYS2 = {
      make_key("a", 8'h0, 1'b1), make_key("b", 8'h0, 1'b1),
      make_key("b", "c", 1'b0), make_key("c", "a", 1'b0), make_key("a", "b", 1'b0)};

  char_t [0:0] c1;
  char_t [1:0] c2;
  logic [1:0]  code1;
  logic [2:0]  code2;
  logic [2:0]  s1;
  logic [2:0]  s2;
  int checks = 0, failures = 0;

  symbol_encoder #(.Q(1), .NK(2), .KEYS(KEYS1)) enc1 (.chars(c1), .code(code1));
  rule_rom #(.Q(1), .MAXLEN(3), .LEN(3), .PATTERN("aab"), .NK(2), .KEYS(KEYS1)) dut1 (
      .code(code1), .s(s1));

  symbol_encoder #(.Q(2), .NK(5), .KEYS(KEYS2)) enc2 (.chars(c2), .code(code2));
  rule_rom #(.Q(2), .MAXLEN(5), .LEN(5), .PATTERN("abcab"), .NK(5), .KEYS(KEYS2)) dut2 (
      .code(code2), .s(s2));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic string p1  = "aab";
    automatic string p2  = "abcab";
    automatic string alp = "abcx";
    for (int c = 0; c < 256; c++) begin
      c1[0] = char_t'(c);
      #1;
      for (int i = 0; i < 3; i++) begin
        checks++;
        if (s1[i] !== (c != int'(p1[i]))) begin
          failures++;
          $display("FAIL q1 c=%0d i=%0d", c, i + 1);
        end
      end
    end
    for (int n = 0; n < 16 + 300; n++) begin
      byte f, s;
      if (n < 16) begin
        f = alp[n / 4];
        s = alp[n % 4];
      end else begin
        f = byte'($urandom);
        s = byte'($urandom);
      end
      c2[0] = f;
      c2[1] = s;
      #1;
      for (int i = 1; i <= 3; i++) begin
        logic exp;
        if (2 * i <= 5) exp = !(f == p2[2*i-2] && s == p2[2*i-1]);
        else            exp = !(f == p2[2*i-2]);
        checks++;
        if (s2[i-1] !== exp) begin
          failures++;
          $display("FAIL q2 pair=(%0d,%0d) i=%0d got %0b", f, s, i, s2[i-1]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

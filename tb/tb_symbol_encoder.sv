// tb_symbol_encoder: checks both encoder kinds against the encoding rule.
//
// One-character encoder: seven symbols "abcdefg" must give a 3-bit code,
// code k+1 for the k-th symbol and 0 for the other 249 characters (all 256
// are tried). Pair encoder: exact keys (a,b) (c,a) (b,b) followed by
// first-character keys b and c; every pair over a 5-letter alphabet and
// random byte pairs are tried, expecting the lowest-numbered matching key.
module tb_symbol_encoder;

  import nids_pkg::*;

  localparam logic [KEY_W*7-1:0] KEYS1 = {
      make_key("g", 8'h0, 1'b1), make_key("f", 8'h0, 1'b1), make_key("e", 8'h0, 1'b1),
      make_key("d", 8'h0, 1'b1), make_key("c", 8'h0, 1'b1), make_key("b", 8'h0, 1'b1),
      make_key("a", 8'h0, 1'b1)};
  localparam logic [KEY_W*5-1:0] KEYS2 = {
      make_key("c", 8'h0, 1'b1), make_key("b", 8'h0, 1'b1),
      make_key("b", "b", 1'b0), make_key("c", "a", 1'b0), make_key("a", "b", 1'b0)};

  char_t [0:0] c1;
  char_t [1:0] c2;
  logic [2:0]  code1;
  logic [2:0]  code2;
  int checks = 0, failures = 0;

  symbol_encoder #(.Q(1), .NK(7), .KEYS(KEYS1)) dut1 (.chars(c1), .code(code1));
  symbol_encoder #(.Q(2), .NK(5), .KEYS(KEYS2)) dut2 (.chars(c2), .code(code2));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int exp2(input byte f, input byte s);
    automatic string ex_f = "acb";
    automatic string ex_s = "bab";
    automatic string pa_f = "bc";
    for (int k = 0; k < 3; k++) if (f == ex_f[k] && s == ex_s[k]) return k + 1;
    for (int k = 0; k < 2; k++) if (f == pa_f[k]) return 3 + k + 1;
    return 0;
  endfunction

  initial begin
    automatic string sym = "abcdefg";
    automatic string alp = "abcdx";
    checks++;
    if ($bits(code1) != 3) failures++;
    for (int c = 0; c < 256; c++) begin
      int e;
      c1[0] = char_t'(c);
      e = 0;
      for (int k = 0; k < 7; k++) if (c == int'(sym[k])) e = k + 1;
      #1;
      checks++;
      if (int'(code1) != e) begin
        failures++;
        $display("FAIL q1 c=%0d code=%0d exp=%0d", c, code1, e);
      end
    end
    for (int n = 0; n < 25 + 500; n++) begin
      byte f, s;
      if (n < 25) begin
        f = alp[n / 5];
        s = alp[n % 5];
      end else begin
        f = byte'($urandom);
        s = byte'($urandom);
      end
      c2[0] = f;
      c2[1] = s;
      #1;
      checks++;
      if (int'(code2) != exp2(f, s)) begin
        failures++;
        $display("FAIL q2 pair=(%0d,%0d) code=%0d exp=%0d", f, s, code2, exp2(f, s));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

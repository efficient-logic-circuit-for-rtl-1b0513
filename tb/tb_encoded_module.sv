// tb_encoded_module: one rule behind a shared symbol encoder, one character
// per cycle.
//
// A symbol encoder with keys a, b, c (the characters of both patterns) feeds
// both modules, as in a rule group. Streams random text over a small alphabet (plus odd random bytes), with
// idle cycles, into modules for "abcab" and "aab" (whose prefix "a" repeats,
// so overlapping partial matches occur). match_n must be low exactly in the
// cycle that presents the last character of an occurrence, found by direct
// comparison with the accepted text.
module tb_encoded_module;

  import nids_pkg::*;

  logic  clk;
  logic  rst_n;
  logic  valid;
  char_t ch;
  logic  m1_n, m2_n;
  int checks = 0, failures = 0, hits1 = 0, hits2 = 0;
  byte txt[$];

  initial clk = 1'b0;
  always #5 clk = ~clk;

  localparam logic [KEY_W*3-1:0] KEYS = {
      make_key("c", 8'h0, 1'b1), make_key("b", 8'h0, 1'b1), make_key("a", 8'h0, 1'b1)};
  logic [1:0] code;

  symbol_encoder #(.Q(1), .NK(3), .KEYS(KEYS)) enc (.chars(ch), .code(code));
  encoded_module #(.MAXLEN(5), .LEN(5), .PATTERN("abcab"), .NK(3), .KEYS(KEYS)) dut1 (
      .clk(clk), .rst_n(rst_n), .valid(valid), .code(code), .match_n(m1_n));
  encoded_module #(.MAXLEN(5), .LEN(3), .PATTERN("aab"), .NK(3), .KEYS(KEYS)) dut2 (
      .clk(clk), .rst_n(rst_n), .valid(valid), .code(code), .match_n(m2_n));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit ends_with(input string p);
    if (txt.size() < p.len()) return 1'b0;
    for (int i = 0; i < p.len(); i++)
      if (txt[txt.size() - p.len() + i] != p[i]) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    bit e1, e2;
    rst_n = 1'b0;
    valid = 1'b0;
    ch    = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 6000; n++) begin
      @(negedge clk);
      valid = ($urandom_range(0, 5) != 0);
      ch    = ($urandom_range(0, 20) == 0) ? char_t'($urandom) : char_t'("a" + $urandom_range(0, 2));
      e1 = 1'b0;
      e2 = 1'b0;
      if (valid) begin
        txt.push_back(byte'(ch));
        e1 = ends_with("abcab");
        e2 = ends_with("aab");
      end
      #1;
      checks += 2;
      if (m1_n !== !e1) begin failures++; $display("FAIL abcab n=%0d", n); end
      if (m2_n !== !e2) begin failures++; $display("FAIL aab n=%0d", n); end
      hits1 += int'(e1);
      hits2 += int'(e2);
    end
    checks++;
    if (hits1 == 0 || hits2 == 0) begin failures++; $display("FAIL no occurrences"); end
    $display("occurrences abcab=%0d aab=%0d", hits1, hits2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

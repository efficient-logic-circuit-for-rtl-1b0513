// tb_q2_module: one rule scanned two characters per cycle.
//
// Two modules, for the odd-length pattern "abcab" and the even-length
// pattern "abca", sit behind a pair of symbol encoders built as in a rule
// group: one codes the current beat (t_{2j+1}, t_{2j+2}), the other the pair
// (t_{2j}, t_{2j+1}) made with the last character of the previous valid beat.
// Random beats over a small alphabet, with idle cycles, are checked against
// direct comparison with the accepted text. An occurrence ending at position
// e (1-based) must be reported in valid beat ceil(e/2) for an even-length
// pattern; for an odd-length one in beat (e+1)/2 when e is odd (even chain)
// and in beat e/2+1 when e is even (odd chain, which needs the next beat).
// Occurrences of each kind are counted and each kind must occur.
module tb_q2_module;

  import nids_pkg::*;

  // Keys of a group holding both patterns: exact pairs, then first characters.
  localparam logic [KEY_W*3-1:0] KEYS = {
      make_key("b", 8'h0, 1'b1), make_key("c", "a", 1'b0), make_key("a", "b", 1'b0)};

  logic        clk;
  logic        rst_n;
  logic        valid, have_prev;
  char_t [1:0] beat, odd_pair;
  char_t       prev;
  logic [1:0]  code_e, code_o;
  logic        m1_n, m2_n;
  int checks = 0, failures = 0;
  int n_even_end = 0, n_odd_end = 0, n_even_len = 0;
  byte txt[$];

  initial clk = 1'b0;
  always #5 clk = ~clk;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) have_prev <= 1'b0;
    else if (valid) begin
      prev      <= beat[1];
      have_prev <= 1'b1;
    end
  end
  assign odd_pair = {beat[0], prev};

  symbol_encoder #(.Q(2), .NK(3), .KEYS(KEYS)) enc_e (.chars(beat), .code(code_e));
  symbol_encoder #(.Q(2), .NK(3), .KEYS(KEYS)) enc_o (.chars(odd_pair), .code(code_o));

  q2_module #(.MAXLEN(5), .LEN(5), .PATTERN("abcab"), .NK(3), .KEYS(KEYS)) dut1 (
      .clk(clk), .rst_n(rst_n), .valid_even(valid), .code_even(code_e),
      .valid_odd(valid & have_prev), .code_odd(code_o), .match_n(m1_n));
  q2_module #(.MAXLEN(5), .LEN(4), .PATTERN("abca"), .NK(3), .KEYS(KEYS)) dut2 (
      .clk(clk), .rst_n(rst_n), .valid_even(valid), .code_even(code_e),
      .valid_odd(valid & have_prev), .code_odd(code_o), .match_n(m2_n));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Occurrence of p ending at 1-based position e of the accepted text.
  function automatic bit occ(input string p, input int e);
    if (e < p.len() || e > txt.size()) return 1'b0;
    for (int i = 0; i < p.len(); i++)
      if (txt[e - p.len() + i] != p[i]) return 1'b0;
    return 1'b1;
  endfunction

  function automatic int report_beat(input int e, input int m);
    return (e + 1 + (m % 2)) / 2;
  endfunction

  // Expected match in valid beat b (its characters are positions 2b-1, 2b).
  function automatic bit expect_in(input string p, input int b);
    for (int e = 2 * b - 2; e <= 2 * b; e++)
      if (occ(p, e) && report_beat(e, p.len()) == b) return 1'b1;
    return 1'b0;
  endfunction

  initial begin
    int b;
    bit e1, e2;
    rst_n = 1'b0;
    valid = 1'b0;
    beat  = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    b = 0;
    for (int n = 0; n < 8000; n++) begin
      @(negedge clk);
      valid = ($urandom_range(0, 5) != 0);
      for (int k = 0; k < 2; k++)
        beat[k] = ($urandom_range(0, 20) == 0) ? char_t'($urandom) : char_t'("a" + $urandom_range(0, 2));
      e1 = 1'b0;
      e2 = 1'b0;
      if (valid) begin
        b++;
        txt.push_back(byte'(beat[0]));
        txt.push_back(byte'(beat[1]));
        e1 = expect_in("abcab", b);
        e2 = expect_in("abca", b);
        if (occ("abcab", 2 * b - 1)) n_odd_end++;
        if (occ("abcab", 2 * b)) n_even_end++;
        if (e2) n_even_len++;
      end
      #1;
      checks += 2;
      if (m1_n !== !e1) begin failures++; $display("FAIL abcab beat=%0d", b); end
      if (m2_n !== !e2) begin failures++; $display("FAIL abca beat=%0d", b); end
    end
    $display("abcab ends odd=%0d even=%0d, abca reports=%0d", n_odd_end, n_even_end, n_even_len);
    checks++;
    if (n_odd_end == 0 || n_even_end == 0 || n_even_len == 0) begin
      failures++;
      $display("FAIL a kind of occurrence never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

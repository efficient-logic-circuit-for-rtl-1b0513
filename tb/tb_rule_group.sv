// tb_rule_group: a group of three rules taken from a four-rule set.
//
// The rule set is "ab", "abcab", "abca", "bca"; the group is rules 1..3, so
// "ab" must never be reported. Three groups run side by side on the same
// random beats (small alphabet, odd random bytes, idle cycles): one
// character per cycle with the shared encoder, the same without encoder
// (256-word ROMs), and two characters per cycle (shared even and odd pair
// encoders). Their outputs are compared with direct comparison against the
// accepted text; the two-character timing rule is the one of tb_q2_module.
module tb_rule_group;

  import nids_pkg::*;

  localparam int                MAXLEN = 5;
  localparam logic [8*MAXLEN-1:0] PATS [4] = '{"ab", "abcab", "abca", "bca"};
  localparam int                LENS [4] = '{2, 5, 4, 3};

  logic        clk;
  logic        rst_n;
  logic        v1, v2;
  char_t [0:0] c1;
  char_t [1:0] c2;
  logic [2:0]  m_enc_n, m_plain_n, m_q2_n;
  int checks = 0, failures = 0, hits = 0;
  byte txt1[$], txt2[$];
  string names [4] = '{"ab", "abcab", "abca", "bca"};

  initial clk = 1'b0;
  always #5 clk = ~clk;

  rule_group #(.Q(1), .USE_ENCODER(1'b1), .NRULES(4), .MAXLEN(MAXLEN), .PATTERNS(PATS),
               .LENS(LENS), .FIRST(1), .COUNT(3)) dut_enc (
      .clk(clk), .rst_n(rst_n), .in_valid(v1), .in_chars(c1), .match_n(m_enc_n));
  rule_group #(.Q(1), .USE_ENCODER(1'b0), .NRULES(4), .MAXLEN(MAXLEN), .PATTERNS(PATS),
               .LENS(LENS), .FIRST(1), .COUNT(3)) dut_plain (
      .clk(clk), .rst_n(rst_n), .in_valid(v1), .in_chars(c1), .match_n(m_plain_n));
  rule_group #(.Q(2), .USE_ENCODER(1'b1), .NRULES(4), .MAXLEN(MAXLEN), .PATTERNS(PATS),
               .LENS(LENS), .FIRST(1), .COUNT(3)) dut_q2 (
      .clk(clk), .rst_n(rst_n), .in_valid(v2), .in_chars(c2), .match_n(m_q2_n));

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit occ1(input string p, input int e);
    if (e < p.len() || e > txt1.size()) return 1'b0;
    for (int i = 0; i < p.len(); i++) if (txt1[e - p.len() + i] != p[i]) return 1'b0;
    return 1'b1;
  endfunction

  function automatic bit occ2(input string p, input int e);
    if (e < p.len() || e > txt2.size()) return 1'b0;
    for (int i = 0; i < p.len(); i++) if (txt2[e - p.len() + i] != p[i]) return 1'b0;
    return 1'b1;
  endfunction

  function automatic bit expect_q2(input string p, input int b);
    for (int e = 2 * b - 2; e <= 2 * b; e++)
      if (occ2(p, e) && (e + 1 + (p.len() % 2)) / 2 == b) return 1'b1;
    return 1'b0;
  endfunction

  function automatic char_t rnd_char();
    return ($urandom_range(0, 20) == 0) ? char_t'($urandom) : char_t'("a" + $urandom_range(0, 2));
  endfunction

  initial begin
    int b;
    logic [2:0] e_1, e_2;
    rst_n = 1'b0;
    v1 = 1'b0;
    v2 = 1'b0;
    c1 = '0;
    c2 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    b = 0;
    for (int n = 0; n < 8000; n++) begin
      @(negedge clk);
      v1 = ($urandom_range(0, 5) != 0);
      v2 = ($urandom_range(0, 5) != 0);
      c1[0] = rnd_char();
      c2[0] = rnd_char();
      c2[1] = rnd_char();
      e_1 = '0;
      e_2 = '0;
      if (v1) begin
        txt1.push_back(byte'(c1[0]));
        for (int r = 0; r < 3; r++) e_1[r] = occ1(names[r+1], txt1.size());
      end
      if (v2) begin
        b++;
        txt2.push_back(byte'(c2[0]));
        txt2.push_back(byte'(c2[1]));
        for (int r = 0; r < 3; r++) e_2[r] = expect_q2(names[r+1], b);
      end
      hits += $countones(e_1) + $countones(e_2);
      #1;
      checks += 3;
      if (m_enc_n !== ~e_1) begin failures++; $display("FAIL q1 enc n=%0d %b/%b", n, m_enc_n, ~e_1); end
      if (m_plain_n !== ~e_1) begin failures++; $display("FAIL q1 plain n=%0d %b/%b", n, m_plain_n, ~e_1); end
      if (m_q2_n !== ~e_2) begin failures++; $display("FAIL q2 n=%0d %b/%b", n, m_q2_n, ~e_2); end
    end
    checks++;
    if (hits == 0) failures++;
    $display("occurrences=%0d", hits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

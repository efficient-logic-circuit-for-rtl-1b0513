// nids_workload: runs nids_top on a generated rule set of NCHARS pattern
// characters and checks every alarm against direct string comparison.
//
// Rule set: lengths cycle through 5..16 characters until NCHARS is used up
// (the last rule takes the rest, or the rest is spread over the last two).
// The rules are split into NGROUPS consecutive groups; the characters of
// group g are drawn, by a fixed pseudo-random hash, from its own 12-letter
// slice of the printable ASCII range, so the rules of a group share a symbol
// set and groups overlap only partly. Traffic: filler from the group
// alphabets, bytes no rule uses, and whole rule strings at random offsets,
// Q bytes per beat with random idle clocks. Alarm outputs are checked two
// clocks after each beat, with the reporting rule for Q = 2 (an odd-length
// occurrence starting on the second byte of a beat is reported one beat
// later). Reports counts; every group must report at least once.
module nids_workload #(
    parameter int Q       = 2,
    parameter int NCHARS  = 1568,
    parameter int NGROUPS = 8,
    parameter int NBEATS  = 3000
) (
    input  logic clk,
    input  logic rst_n,
    output logic done,
    output int   checks,
    output int   failures
);

  import nids_pkg::*;

  localparam int MAXLEN = 16;

  function automatic int rule_len(input int r, input int used);
    int l, rest;
    l    = 5 + (r * 7) % 12;
    rest = NCHARS - used;
    if (rest <= MAXLEN) return rest;
    if (rest - l < 5) return rest - 5;  // leave at least 5 for the last rule
    return l;
  endfunction

  function automatic int count_rules();
    int used, r;
    used = 0;
    r    = 0;
    while (used < NCHARS) begin
      used += rule_len(r, used);
      r++;
    end
    return r;
  endfunction

  localparam int NR   = count_rules();
  localparam int ID_W = $clog2(NR);

  typedef logic [CHAR_W*MAXLEN-1:0] pats_t [NR];
  typedef int                       ints_t [NR];
  typedef int                       grp_t  [NGROUPS];

  function automatic int group_of(input int r);
    return (r * NGROUPS) / NR;
  endfunction

  function automatic char_t group_char(input int g, input int h);
    return char_t'(8'h21 + (g * 7 + h % 12) % 94);
  endfunction

  function automatic ints_t gen_lens();
    ints_t l;
    int    used;
    used = 0;
    for (int r = 0; r < NR; r++) begin
      l[r] = rule_len(r, used);
      used += l[r];
    end
    return l;
  endfunction

  localparam ints_t LENS = gen_lens();

  function automatic pats_t gen_pats();
    pats_t                    p;
    logic [CHAR_W*MAXLEN-1:0] w;
    for (int r = 0; r < NR; r++) begin
      w = '0;
      for (int i = 1; i <= LENS[r]; i++) begin
        int h;
        h = (r * 131 + i * 29 + (r * i) % 17) % 1009;
        w[CHAR_W*(LENS[r]-i) +: CHAR_W] = group_char(group_of(r), h);
      end
      p[r] = w;
    end
    return p;
  endfunction

  function automatic grp_t gen_groups();
    grp_t gs;
    for (int g = 0; g < NGROUPS; g++) gs[g] = 0;
    for (int r = 0; r < NR; r++) gs[group_of(r)]++;
    return gs;
  endfunction

  localparam pats_t PATS   = gen_pats();
  localparam grp_t  GROUPS = gen_groups();

  logic              in_valid;
  char_t [Q-1:0]     in_chars;
  logic              alarm, alarm_multi;
  logic [ID_W-1:0]   alarm_id;
  logic [NR-1:0]     alarm_hits;

  nids_top #(
      .Q(Q), .NRULES(NR), .NGROUPS(NGROUPS), .MAXLEN(MAXLEN),
      .PATTERNS(PATS), .LENS(LENS), .GROUP_SIZE(GROUPS)
  ) dut (
      .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_chars(in_chars),
      .alarm(alarm), .alarm_id(alarm_id), .alarm_hits(alarm_hits), .alarm_multi(alarm_multi)
  );

  byte           src[$];
  byte           txt[$];
  logic [NR-1:0] exp_q[$];
  int            n_group [NGROUPS];
  int            n_reports = 0, n_multi = 0;

  function automatic char_t pchar(input int r, input int i);
    return PATS[r][CHAR_W*(LENS[r]-i) +: CHAR_W];
  endfunction

  function automatic bit occ(input int r, input int e);
    if (e < LENS[r] || e > txt.size()) return 1'b0;
    for (int i = 1; i <= LENS[r]; i++) if (txt[e - LENS[r] + i - 1] != pchar(r, i)) return 1'b0;
    return 1'b1;
  endfunction

  task automatic refill();
    if ($urandom_range(0, 2) == 0) begin
      int r;
      r = $urandom_range(0, NR - 1);
      for (int i = 1; i <= LENS[r]; i++) src.push_back(pchar(r, i));
    end else begin
      int g;
      g = $urandom_range(0, NGROUPS - 1);
      repeat ($urandom_range(1, 10)) begin
        if ($urandom_range(0, 9) == 0) src.push_back(byte'($urandom_range(128, 255)));
        else src.push_back(group_char(g, $urandom_range(0, 11)));
      end
    end
  endtask

  initial begin
    int b;
    done     = 1'b0;
    checks   = 0;
    failures = 0;
    in_valid = 1'b0;
    in_chars = '0;
    for (int g = 0; g < NGROUPS; g++) n_group[g] = 0;
    @(posedge rst_n);
    b = 0;
    for (int n = 0; n < NBEATS + 2; n++) begin
      logic [NR-1:0] e;
      @(negedge clk);
      if (exp_q.size() == 2) begin
        logic [NR-1:0] x;
        x = exp_q.pop_front();
        checks++;
        if (alarm_hits !== x || alarm !== (|x) || alarm_multi !== ($countones(x) > 1)) begin
          failures++;
          $display("FAIL Q=%0d beat %0d: hits differ", Q, b);
        end
        if (alarm_multi) n_multi++;
      end
      e = '0;
      in_valid = (n < NBEATS) && ($urandom_range(0, 4) != 0);
      if (in_valid) begin
        b++;
        while (src.size() < Q) refill();
        for (int k = 0; k < Q; k++) begin
          in_chars[k] = char_t'(src.pop_front());
          txt.push_back(byte'(in_chars[k]));
        end
        for (int r = 0; r < NR; r++) begin
          for (int ep = Q * b - Q; ep <= Q * b; ep++) begin
            bit hit;
            if (Q == 1) hit = (ep == b) && occ(r, ep);
            else hit = occ(r, ep) && (ep + 1 + (LENS[r] % 2)) / 2 == b;
            if (hit) begin
              e[r] = 1'b1;
              n_group[group_of(r)]++;
              n_reports++;
            end
          end
        end
      end else begin
        in_chars = (Q * CHAR_W)'($urandom);
      end
      exp_q.push_back(e);
    end
    $display("Q=%0d: %0d rules, %0d pattern characters, %0d groups; %0d reports, %0d multi",
             Q, NR, NCHARS, NGROUPS, n_reports, n_multi);
    for (int g = 0; g < NGROUPS; g++) begin
      checks++;
      if (n_group[g] == 0) begin
        failures++;
        $display("FAIL Q=%0d: group %0d never reported", Q, g);
      end
    end
    done = 1'b1;
  end

endmodule

// tb_nids_top_q1: end-to-end test of the one-character-per-cycle matcher,
// built twice side by side: with shared symbol encoders and without them
// (256-word ROMs per rule). Default rule set, six rules in two groups.
//
// A byte stream is generated from random filler (characters the rules use,
// plus bytes no rule uses) with whole rule strings inserted at random
// offsets, and fed one character per beat with random idle cycles. A rule
// is reported in the beat of the last character of its occurrence; both
// builds must show the expected set on their alarm outputs two clocks after
// the beat entered. The test counts, and requires at least once: a report of
// every rule, an occurrence with idle cycles inside it and input bytes outside
// every rule's alphabet (shared code 0).
module tb_nids_top_q1;

  import nids_pkg::*;

  localparam int NR = 6;
  localparam int Q  = 1;

  logic              clk;
  logic              rst_n;
  logic              in_valid;
  char_t [Q-1:0]     in_chars;
  logic              alarm, alarm_multi, p_alarm, p_multi;
  logic [2:0]        alarm_id, p_id;
  logic [NR-1:0]     alarm_hits, p_hits;

  initial clk = 1'b0;
  always #5 clk = ~clk;

  nids_top #(.Q(1), .USE_ENCODER(1'b1)) dut (
      .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_chars(in_chars),
      .alarm(alarm), .alarm_id(alarm_id), .alarm_hits(alarm_hits), .alarm_multi(alarm_multi)
  );

  nids_top #(.Q(1), .USE_ENCODER(1'b0)) dut_plain (
      .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_chars(in_chars),
      .alarm(p_alarm), .alarm_id(p_id), .alarm_hits(p_hits), .alarm_multi(p_multi)
  );

  // Same rule strings as the default parameters of the design.
  string rules [NR] = '{"/etc/passwd", "/etc/shadow", "/bin/sh", "cmd.exe", "root.exe", "xp_cmdshell"};
  string filler = "/etcpaswdhdowbinshcm.xerotp_l";

  int checks = 0, failures = 0;
  int n_rule [NR];
  int n_bubble_inside = 0, n_foreign = 0, n_multi = 0;
  byte src[$];
  byte txt[$];
  int  idle_at[$];   // idle cycles seen before each accepted character
  int  idle_cnt = 0;
  logic [NR-1:0] exp_q[$];

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit occ(input string p, input int e);
    if (e < p.len() || e > txt.size()) return 1'b0;
    for (int i = 0; i < p.len(); i++) if (txt[e - p.len() + i] != p[i]) return 1'b0;
    return 1'b1;
  endfunction

  task automatic refill();
    if ($urandom_range(0, 3) == 0) begin
      string p = rules[$urandom_range(0, NR - 1)];
      for (int i = 0; i < p.len(); i++) src.push_back(p[i]);
    end else begin
      repeat ($urandom_range(1, 12)) begin
        if ($urandom_range(0, 9) == 0) begin
          src.push_back(byte'($urandom_range(128, 255)));
        end else begin
          src.push_back(filler[$urandom_range(0, filler.len() - 1)]);
        end
      end
    end
  endtask

  task automatic check_out(input logic [NR-1:0] e);
    int id;
    id = 0;
    for (int r = NR - 1; r >= 0; r--) if (e[r]) id = r;
    checks++;
    if (alarm !== (|e) || alarm_hits !== e || (|e && int'(alarm_id) != id) ||
        alarm_multi !== ($countones(e) > 1)) begin
      failures++;
      $display("FAIL hits %b expected %b (id %0d)", alarm_hits, e, alarm_id);
    end
    checks++;
    if (p_alarm !== (|e) || p_hits !== e || (|e && int'(p_id) != id) ||
        p_multi !== ($countones(e) > 1)) begin
      failures++;
      $display("FAIL without encoder: hits %b expected %b", p_hits, e);
    end
    if (alarm_multi) n_multi++;
  endtask

  initial begin
    int b;
    rst_n    = 1'b0;
    in_valid = 1'b0;
    in_chars = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    b = 0;
    for (int n = 0; n < 10000 + 2; n++) begin
      logic [NR-1:0] e;
      @(negedge clk);
      if (exp_q.size() == 2) check_out(exp_q.pop_front());
      e = '0;
      in_valid = (n < 10000) && ($urandom_range(0, 4) != 0);
      if (in_valid) begin
        b++;
        while (src.size() < Q) refill();
        for (int k = 0; k < Q; k++) begin
          in_chars[k] = char_t'(src.pop_front());
          txt.push_back(byte'(in_chars[k]));
          idle_at.push_back(idle_cnt);
          if (in_chars[k] >= 8'd128) n_foreign++;
        end
        for (int r = 0; r < NR; r++) begin
          int m;
          m = rules[r].len();
          if (occ(rules[r], b)) begin
            e[r] = 1'b1;
            n_rule[r]++;
            if (idle_at[b-1] != idle_at[b-m]) n_bubble_inside++;
          end
        end
      end else begin
        in_chars = (Q * CHAR_W)'($urandom);
        idle_cnt++;
      end
      exp_q.push_back(e);
    end
    $display("reports per rule: %0d %0d %0d %0d %0d %0d", n_rule[0], n_rule[1], n_rule[2],
             n_rule[3], n_rule[4], n_rule[5]);
    $display("idle inside occurrence %0d, foreign bytes %0d, multi %0d",
             n_bubble_inside, n_foreign, n_multi);
    for (int r = 0; r < NR; r++) begin
      checks++;
      if (n_rule[r] == 0) begin failures++; $display("FAIL rule %0d never reported", r); end
    end
    checks++;
    if (n_bubble_inside == 0 || n_foreign == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

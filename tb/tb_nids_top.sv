// tb_nids_top: end-to-end test of the matcher at its default configuration
// (two characters per cycle, six rules in two groups of three).
//
// A byte stream is generated from random filler (characters the rules use,
// plus bytes no rule uses) with whole rule strings inserted at random
// offsets, and fed two characters per beat with random idle cycles. For
// every accepted beat the expected set of reporting rules is worked out by
// comparing the accepted text with the rule strings (an odd-length string
// whose occurrence starts on the second character of a beat is reported with
// the following beat). The alarm outputs must show that set two clocks after
// the beat entered. The test counts, and requires at least once: a report of
// every rule, a report from the even chain and from the odd chain, an
// occurrence with idle cycles inside it, input bytes outside every rule's
// alphabet (shared code 0), and an occurrence of a rule from each group.
module tb_nids_top;

  import nids_pkg::*;

  localparam int NR = 6;
  localparam int Q  = 2;

  logic              clk;
  logic              rst_n;
  logic              in_valid;
  char_t [Q-1:0]     in_chars;
  logic              alarm, alarm_multi;
  logic [2:0]        alarm_id;
  logic [NR-1:0]     alarm_hits;

  initial clk = 1'b0;
  always #5 clk = ~clk;

  nids_top dut (
      .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_chars(in_chars),
      .alarm(alarm), .alarm_id(alarm_id), .alarm_hits(alarm_hits), .alarm_multi(alarm_multi)
  );

  // Same rule strings as the default parameters of the design.
  string rules [NR] = '{"/etc/passwd", "/etc/shadow", "/bin/sh", "cmd.exe", "root.exe", "xp_cmdshell"};
  string filler = "/etcpaswdhdowbinshcm.xerotp_l";

  int checks = 0, failures = 0;
  int n_rule [NR];
  int n_even_chain = 0, n_odd_chain = 0, n_bubble_inside = 0, n_foreign = 0, n_multi = 0;
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
    for (int n = 0; n < 6000 + 2; n++) begin
      logic [NR-1:0] e;
      @(negedge clk);
      if (exp_q.size() == 2) check_out(exp_q.pop_front());
      e = '0;
      in_valid = (n < 6000) && ($urandom_range(0, 4) != 0);
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
          for (int ep = 2 * b - 2; ep <= 2 * b; ep++) begin
            if (occ(rules[r], ep) && (ep + 1 + (m % 2)) / 2 == b) begin
              e[r] = 1'b1;
              n_rule[r]++;
              if ((ep - m + 1) % 2 == 1) n_even_chain++;
              else n_odd_chain++;
              if (idle_at[ep-1] != idle_at[ep-m]) n_bubble_inside++;
            end
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
    $display("even chain %0d, odd chain %0d, idle inside occurrence %0d, foreign bytes %0d, multi %0d",
             n_even_chain, n_odd_chain, n_bubble_inside, n_foreign, n_multi);
    for (int r = 0; r < NR; r++) begin
      checks++;
      if (n_rule[r] == 0) begin failures++; $display("FAIL rule %0d never reported", r); end
    end
    checks++;
    if (n_even_chain == 0 || n_odd_chain == 0 || n_bubble_inside == 0 || n_foreign == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

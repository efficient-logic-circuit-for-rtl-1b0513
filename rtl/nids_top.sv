// nids_top: signature-matching core of a network intrusion detection system.
//
// The packet byte stream enters as beats of Q characters (Q = 2 by default,
// Q = 1 for the one-character variant). The broadcast circuit registers each
// beat and hands it to every rule group. A group shares its symbol
// encoder(s) among its rules, and each rule has its own ROM and shift-or
// shift register; a rule's match line goes low in the beat that completes an
// occurrence of its pattern. The alarm encoder registers all match lines and
// reports the lowest-numbered matching rule plus a bit per rule.
//
// Rule set: NRULES patterns in PATTERNS (string literals right-aligned in
// MAXLEN bytes) with their lengths in LENS, listed group by group; group g
// holds the next GROUP_SIZE[g] rules. Rules should be grouped so that a
// group's patterns use much the same characters, which keeps the group's
// codes and ROMs small. The default rule set is a small set of typical
// signature strings chosen for this design; any set can be given as
// parameters, and the ROM contents and encoders are derived from it when the
// design elaborates.
//
// Timing: a beat at in_chars/in_valid in cycle k shows up at the alarm
// outputs after the clock edge ending cycle k+1 (two registers: broadcast and
// alarm encoder). With Q = 2, an odd-length occurrence that starts at an even
// source position (the second character of a beat) is reported one beat
// later, with the beat that follows its last character.
module nids_top
  import nids_pkg::*;
#(
    parameter int                       Q           = 2,
    parameter bit                       USE_ENCODER = 1'b1,
    parameter int                       NRULES      = 6,
    parameter int                       NGROUPS     = 2,
    parameter int                       MAXLEN      = 11,
    parameter logic [CHAR_W*MAXLEN-1:0] PATTERNS [NRULES] = '{
        "/etc/passwd", "/etc/shadow", "/bin/sh",
        "cmd.exe", "root.exe", "xp_cmdshell"},
    parameter int                       LENS     [NRULES] = '{11, 11, 7, 7, 8, 11},
    parameter int                       GROUP_SIZE [NGROUPS] = '{3, 3},
    parameter int                       ID_W        = (NRULES > 1) ? $clog2(NRULES) : 1
) (
    input  logic              clk,
    input  logic              rst_n,
    input  logic              in_valid,
    input  char_t [Q-1:0]     in_chars,
    output logic              alarm,
    output logic [ID_W-1:0]   alarm_id,
    output logic [NRULES-1:0] alarm_hits,
    output logic              alarm_multi
);

  function automatic int group_first(input int g);
    int f;
    f = 0;
    for (int i = 0; i < g; i++) f += GROUP_SIZE[i];
    return f;
  endfunction

  initial begin
    assert (group_first(NGROUPS) == NRULES)
    else $error("nids_top: GROUP_SIZE must add up to NRULES");
  end

  logic              bc_valid;
  char_t [Q-1:0]     bc_chars;
  logic [NRULES-1:0] match_n;

  broadcast_circuit #(.Q(Q)) u_broadcast (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (in_valid),
      .in_chars (in_chars),
      .out_valid(bc_valid),
      .out_chars(bc_chars)
  );

  for (genvar g = 0; g < NGROUPS; g++) begin : g_group
    localparam int FIRST = group_first(g);
    rule_group #(
        .Q(Q), .USE_ENCODER(USE_ENCODER), .NRULES(NRULES), .MAXLEN(MAXLEN),
        .PATTERNS(PATTERNS), .LENS(LENS), .FIRST(FIRST), .COUNT(GROUP_SIZE[g])
    ) u_group (
        .clk     (clk),
        .rst_n   (rst_n),
        .in_valid(bc_valid),
        .in_chars(bc_chars),
        .match_n (match_n[FIRST +: GROUP_SIZE[g]])
    );
  end

  alarm_encoder #(.NRULES(NRULES), .ID_W(ID_W)) u_alarm (
      .clk    (clk),
      .rst_n  (rst_n),
      .match_n(match_n),
      .alarm  (alarm),
      .rule_id(alarm_id),
      .hits   (alarm_hits),
      .multi  (alarm_multi)
  );

endmodule

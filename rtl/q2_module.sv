// q2_module: one rule matched two characters per cycle.
//
// The pattern is cut into W = ceil(LEN/2) character pairs. Scanning the
// source in pairs only tests occurrences whose first character sits at one
// parity of position, so the module runs two shift-or chains side by side:
// the even chain sees the pairs (t_{2j+1}, t_{2j+2}) of the current beat, the
// odd chain the pairs (t_{2j}, t_{2j+1}) formed with the last character of
// the previous beat. Each chain has its own ROM (rule_rom, Q = 2) and its own
// shift register with OR gates (shift_or_sr, W-1 flip-flops). code_even and
// code_odd come from the group's two shared pair encoders.
//
// Both chain outputs are active low (0 = match), so the module's match_n is
// their AND: it goes low when either chain completes an occurrence in this
// beat. That combining function is derived from the 0-means-match
// convention. The separate valid_odd (low in the first beat, when no
// previous character exists) is this design's own choice.
module q2_module
  import nids_pkg::*;
#(
    parameter int                       MAXLEN  = 3,
    parameter int                       LEN     = 3,
    parameter logic [CHAR_W*MAXLEN-1:0] PATTERN = "aab",
    parameter int                       NK      = 2,
    parameter logic [KEY_W*NK-1:0]      KEYS    = {make_key("b", 8'h00, 1'b1),
                                                   make_key("a", "a", 1'b0)},
    parameter int                       CODE_W  = code_width(NK)
) (
    input  logic              clk,
    input  logic              rst_n,
    input  logic              valid_even,
    input  logic [CODE_W-1:0] code_even,
    input  logic              valid_odd,
    input  logic [CODE_W-1:0] code_odd,
    output logic              match_n
);

  localparam int W = (LEN + 1) / 2;

  logic [W-1:0] s_even, s_odd;
  logic         match_even_n, match_odd_n;

  rule_rom #(
      .Q(2), .MAXLEN(MAXLEN), .LEN(LEN), .PATTERN(PATTERN),
      .NK(NK), .KEYS(KEYS), .CODE_W(CODE_W)
  ) u_rom_even (
      .code(code_even),
      .s   (s_even)
  );

  rule_rom #(
      .Q(2), .MAXLEN(MAXLEN), .LEN(LEN), .PATTERN(PATTERN),
      .NK(NK), .KEYS(KEYS), .CODE_W(CODE_W)
  ) u_rom_odd (
      .code(code_odd),
      .s   (s_odd)
  );

  shift_or_sr #(.W(W)) u_sr_even (
      .clk    (clk),
      .rst_n  (rst_n),
      .valid  (valid_even),
      .s      (s_even),
      .match_n(match_even_n)
  );

  shift_or_sr #(.W(W)) u_sr_odd (
      .clk    (clk),
      .rst_n  (rst_n),
      .valid  (valid_odd),
      .s      (s_odd),
      .match_n(match_odd_n)
  );

  assign match_n = match_even_n & match_odd_n;

endmodule

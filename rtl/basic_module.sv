// basic_module: one rule matched one character per cycle, without a symbol
// encoder.
//
// The input character addresses a 256-word ROM (pattern_rom) holding the
// vector S_c of the rule's pattern; the shift register with OR gates
// (shift_or_sr) then advances the shift-or recurrence by one character.
// match_n goes low in the cycle in which the last character of an occurrence
// of the pattern is presented. The valid input and the reset follow
// shift_or_sr. Uses LEN-1 flip-flops and a 256 x LEN ROM.
module basic_module
  import nids_pkg::*;
#(
    parameter int                       MAXLEN  = 3,
    parameter int                       LEN     = 3,
    parameter logic [CHAR_W*MAXLEN-1:0] PATTERN = "aab"
) (
    input  logic  clk,
    input  logic  rst_n,
    input  logic  valid,
    input  char_t ch,
    output logic  match_n
);

  logic [LEN-1:0] s;

  pattern_rom #(.MAXLEN(MAXLEN), .LEN(LEN), .PATTERN(PATTERN)) u_rom (
      .addr(ch),
      .s   (s)
  );

  shift_or_sr #(.W(LEN)) u_sr (
      .clk    (clk),
      .rst_n  (rst_n),
      .valid  (valid),
      .s      (s),
      .match_n(match_n)
  );

endmodule

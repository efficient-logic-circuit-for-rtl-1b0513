// encoded_module: one rule matched one character per cycle behind a symbol
// encoder shared with the other rules of its group.
//
// The code from the group's encoder addresses this rule's small ROM
// (rule_rom, Q = 1), whose word feeds the shift register with OR gates
// (shift_or_sr). match_n goes low in the cycle in which the last character of
// an occurrence of the pattern is presented; valid and reset follow
// shift_or_sr. KEYS and NK must be the ones of the encoder that drives code.
module encoded_module
  import nids_pkg::*;
#(
    parameter int                       MAXLEN  = 3,
    parameter int                       LEN     = 3,
    parameter logic [CHAR_W*MAXLEN-1:0] PATTERN = "aab",
    parameter int                       NK      = 2,
    parameter logic [KEY_W*NK-1:0]      KEYS    = {make_key("b", 8'h00, 1'b1),
                                                   make_key("a", 8'h00, 1'b1)},
    parameter int                       CODE_W  = code_width(NK)
) (
    input  logic              clk,
    input  logic              rst_n,
    input  logic              valid,
    input  logic [CODE_W-1:0] code,
    output logic              match_n
);

  logic [LEN-1:0] s;

  rule_rom #(
      .Q(1), .MAXLEN(MAXLEN), .LEN(LEN), .PATTERN(PATTERN),
      .NK(NK), .KEYS(KEYS), .CODE_W(CODE_W)
  ) u_rom (
      .code(code),
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

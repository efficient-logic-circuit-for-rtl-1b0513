// rule_rom: the per-rule ROM addressed by a symbol-encoder code.
//
// The rule's pattern is cut into W = ceil(LEN/Q) symbols u_1..u_W: single
// characters when Q = 1, character pairs u_i = (p_{2i-1}, p_{2i}) when Q = 2,
// where the last pair of an odd-length pattern is (p_m, don't care). Word k
// of the ROM is the bit vector for input code k: bit i-1 is 0 when an input
// that the shared symbol encoder maps to code k equals u_i, and 1 otherwise.
// Code 0, the code of every input the group's patterns do not use, reads all
// ones, as does any code above the key count. The ROM therefore has
// 2^CODE_W words instead of 256 (or 65536 for pairs).
//
// A code names the lowest-numbered key its input matched (symbol_encoder),
// and keys that match a pair exactly come before keys that fix only the first
// character. So an input with code k of an exact key (a,b) is the pair (a,b),
// and with code k of a first-character key (a,*) it is a pair starting with a
// that no exact key of the group covers. Word k is worked out from that:
//   u_i exact    -> 0 only for the exact key equal to u_i;
//   u_i (p_m, *) -> 0 for every key whose first character is p_m.
// Contents are computed from the parameters at elaboration; the read is
// asynchronous (same-cycle), as in the single-character module.
module rule_rom
  import nids_pkg::*;
#(
    parameter int                       Q       = 1,
    parameter int                       MAXLEN  = 3,
    parameter int                       LEN     = 3,
    parameter logic [CHAR_W*MAXLEN-1:0] PATTERN = "aab",
    parameter int                       NK      = 2,
    parameter logic [KEY_W*NK-1:0]      KEYS    = {make_key("b", 8'h00, 1'b1),
                                                   make_key("a", 8'h00, 1'b1)},
    parameter int                       CODE_W  = code_width(NK),
    parameter int                       W       = (LEN + Q - 1) / Q
) (
    input  logic [CODE_W-1:0] code,
    output logic [W-1:0]      s
);

  localparam int DEPTH = 1 << CODE_W;

  function automatic char_t pchar(input int i);  // p_i, 1-based
    return PATTERN[CHAR_W*(LEN-i) +: CHAR_W];
  endfunction

  function automatic logic [DEPTH*W-1:0] build_rom();
    logic [DEPTH*W-1:0] rom;
    rom = '1;
    for (int k = 0; k < NK && k + 1 < DEPTH; k++) begin
      key_t key;
      key = key_t'(KEYS[KEY_W*k +: KEY_W]);
      for (int i = 1; i <= W; i++) begin
        char_t first;
        logic  hit;
        first = pchar(Q*(i-1) + 1);
        if (Q == 1 || Q*i > LEN) begin
          // u_i fixes only its first character.
          hit = key.valid && key.first == first;
        end else begin
          hit = key.valid && !key.dc_second && key.first == first &&
                key.second == pchar(Q*i);
        end
        if (hit) rom[(k+1)*W + (i-1)] = 1'b0;
      end
    end
    return rom;
  endfunction

  localparam logic [DEPTH*W-1:0] ROM_INIT = build_rom();

  // The ROM proper: a constant memory array, loaded once at start-up.
  logic [W-1:0] rom [DEPTH];

  initial begin
    for (int k = 0; k < DEPTH; k++) rom[k] = ROM_INIT[k*W +: W];
  end

  assign s = rom[code];

  initial begin
    assert (Q == 1 || Q == 2) else $error("rule_rom: Q must be 1 or 2");
  end

endmodule

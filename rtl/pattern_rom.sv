// pattern_rom: the per-rule ROM addressed directly by the 8-bit character.
//
// Entry c holds the bit vector S_c of the rule's pattern P = p_1..p_m:
// S_c[i] = 0 when character c equals p_i, 1 otherwise (bit i-1 of the word is
// S_c[i]). With 256 characters the ROM has 256 words of m bits, most of them
// all ones; the symbol-encoder variant (rule_rom) removes that waste. The
// contents are computed from the PATTERN parameter when the design
// elaborates, so a rule set is changed by changing parameters only.
//
// Interface: addr is the input character, s the word read. The read is
// asynchronous, so S is available to the OR gates in the same cycle as the
// character, matching the one-character-per-cycle timing of the module.
//
// PATTERN holds the pattern as a string literal right-aligned in MAXLEN
// bytes: p_1 is byte LEN-1 (counting from the least significant byte) and
// p_m is byte 0.
module pattern_rom
  import nids_pkg::*;
#(
    parameter int                      MAXLEN  = 3,
    parameter int                      LEN     = 3,
    parameter logic [CHAR_W*MAXLEN-1:0] PATTERN = "aab"
) (
    input  char_t          addr,
    output logic [LEN-1:0] s
);

  localparam int DEPTH = 1 << CHAR_W;

  function automatic logic [DEPTH*LEN-1:0] build_rom();
    logic [DEPTH*LEN-1:0] rom;
    rom = '1;
    for (int i = 1; i <= LEN; i++) begin
      char_t p;
      p = PATTERN[CHAR_W*(LEN-i) +: CHAR_W];
      rom[int'(p)*LEN + (i-1)] = 1'b0;
    end
    return rom;
  endfunction

  localparam logic [DEPTH*LEN-1:0] ROM_INIT = build_rom();

  // The ROM proper: a constant memory array, loaded once at start-up.
  logic [LEN-1:0] rom [DEPTH];

  initial begin
    for (int k = 0; k < DEPTH; k++) rom[k] = ROM_INIT[k*LEN +: LEN];
  end

  assign s = rom[addr];

endmodule

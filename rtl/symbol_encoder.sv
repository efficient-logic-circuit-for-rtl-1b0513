// symbol_encoder: maps the symbols a rule group uses to short codes.
//
// Most of the 256 characters (or 65536 character pairs) never occur in a
// group's patterns, and all of them have an all-ones ROM word. The encoder
// sends every such input to code 0 and each used symbol to its own code, so
// the ROMs behind it need only 2^CODE_W words. One encoder is shared by all
// rules of a group.
//
// Keys come from the KEYS table (format in nids_pkg): with Q = 1 each key is
// one character; with Q = 2 a key is either an exact character pair or a
// first character alone (for odd-length patterns). The output is k+1 for the
// lowest-numbered key k the input matches, or 0 if none matches; exact-pair
// keys are placed ahead of first-character keys so the exact match wins.
// This comparator-plus-priority-encoder structure is this design's own
// choice: only the encoder's function is fixed by the matching scheme.
//
// Interface: chars[0] is the earlier character of the symbol, chars[1] (Q=2)
// the later one. Purely combinational.
module symbol_encoder
  import nids_pkg::*;
#(
    parameter int                  Q      = 1,
    parameter int                  NK     = 2,
    parameter logic [KEY_W*NK-1:0] KEYS   = {make_key("b", 8'h00, 1'b1),
                                            make_key("a", 8'h00, 1'b1)},
    parameter int                  CODE_W = code_width(NK)
) (
    input  char_t [Q-1:0]      chars,
    output logic [CODE_W-1:0]  code
);

  logic [NK-1:0] hit;

  for (genvar k = 0; k < NK; k++) begin : g_key
    localparam key_t KEY = KEYS[KEY_W*k +: KEY_W];
    logic second_ok;
    if (Q == 1) begin : g_one
      assign second_ok = 1'b1;
    end else begin : g_two
      assign second_ok = KEY.dc_second || chars[1] == KEY.second;
    end
    assign hit[k] = KEY.valid && chars[0] == KEY.first && second_ok;
  end

  always_comb begin
    code = '0;
    for (int k = NK - 1; k >= 0; k--) begin
      if (hit[k]) code = CODE_W'(k + 1);
    end
  end

endmodule

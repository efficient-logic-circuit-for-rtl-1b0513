// rule_group: the rules that share one symbol encoder.
//
// Rules whose patterns use the same set of symbols are grouped so that a
// single encoder (per scan stream) serves all of them; every rule keeps its
// own ROM and shift register. The group is the COUNT rules starting at rule
// FIRST of the rule set given by PATTERNS and LENS. The key table of the
// encoder is built here, at elaboration, from the group's patterns:
//   Q = 1: one key per distinct character, in order of first appearance;
//   Q = 2: one key per distinct full pair (p_{2i-1}, p_{2i}), followed by one
//          key per distinct last character p_m of an odd-length pattern.
//
// Q = 1: one encoder; each rule is an encoded_module. With USE_ENCODER = 0
// the encoder is left out and each rule is a basic_module with a 256-word
// ROM (the reference variant, larger ROMs, same behaviour).
// Q = 2: a delay register keeps the later character of the previous valid
// beat; one encoder codes the current pair (t_{2j+1}, t_{2j+2}), a second one
// the pair (t_{2j}, t_{2j+1}); each rule is a q2_module. USE_ENCODER must be 1
// for Q = 2, since uncoded pair ROMs would need 65536 words per rule.
//
// Interface: in_valid qualifies in_chars (in_chars[0] earlier); match_n[r]
// is low in the beat in which rule FIRST+r completes an occurrence (one beat
// later for an odd-length pattern whose occurrence starts at an even source
// position when Q = 2, see q2_module).
module rule_group
  import nids_pkg::*;
#(
    parameter int                       Q           = 1,
    parameter bit                       USE_ENCODER = 1'b1,
    parameter int                       NRULES      = 2,
    parameter int                       MAXLEN      = 4,
    parameter logic [CHAR_W*MAXLEN-1:0] PATTERNS [NRULES] = '{"aab", "abca"},
    parameter int                       LENS     [NRULES] = '{3, 4},
    parameter int                       FIRST       = 0,
    parameter int                       COUNT       = NRULES
) (
    input  logic                clk,
    input  logic                rst_n,
    input  logic                in_valid,
    input  char_t [Q-1:0]       in_chars,
    output logic [COUNT-1:0]    match_n
);

  localparam int MAXK = COUNT * MAXLEN;

  function automatic char_t pchar(input int r, input int i);  // p_i of rule r
    return PATTERNS[r][CHAR_W*(LENS[r]-i) +: CHAR_W];
  endfunction

  function automatic logic [KEY_W*MAXK-1:0] build_keys();
    logic [KEY_W*MAXK-1:0] keys;
    int                    n;
    keys = '0;
    n    = 0;
    // Pass 0: exact keys (Q = 2 only); pass 1: first-character keys.
    for (int pass = 0; pass < 2; pass++) begin
      for (int r = FIRST; r < FIRST + COUNT; r++) begin
        for (int i = 1; (i - 1) * Q < LENS[r]; i++) begin
          logic             dc;
          key_t key;
          logic             seen;
          dc = (Q == 1) || (Q * i > LENS[r]);
          if (dc == (pass == 1)) begin
            key  = make_key(pchar(r, Q*(i-1) + 1), dc ? char_t'(0) : pchar(r, Q*i), dc);
            seen = 1'b0;
            for (int k = 0; k < n; k++) begin
              if (keys[KEY_W*k +: KEY_W] == key) seen = 1'b1;
            end
            if (!seen) begin
              keys[KEY_W*n +: KEY_W] = key;
              n++;
            end
          end
        end
      end
    end
    return keys;
  endfunction

  function automatic int count_keys(input logic [KEY_W*MAXK-1:0] keys);
    int n;
    n = 0;
    for (int k = 0; k < MAXK; k++) begin
      key_t key;
      key = key_t'(keys[KEY_W*k +: KEY_W]);
      if (key.valid) n++;
    end
    return n;
  endfunction

  localparam logic [KEY_W*MAXK-1:0] KEYS_ALL = build_keys();
  localparam int                    NK       = count_keys(KEYS_ALL);
  localparam int                    CODE_W   = code_width(NK);
  localparam logic [KEY_W*NK-1:0]   KEYS     = KEYS_ALL[KEY_W*NK-1:0];

  initial begin
    assert (Q == 1 || Q == 2) else $error("rule_group: Q must be 1 or 2");
    assert (Q == 1 || USE_ENCODER) else $error("rule_group: Q = 2 needs the symbol encoder");
    assert (FIRST >= 0 && FIRST + COUNT <= NRULES) else $error("rule_group: bad rule range");
  end

  if (Q == 1 && !USE_ENCODER) begin : g_plain
    for (genvar r = 0; r < COUNT; r++) begin : g_rule
      basic_module #(
          .MAXLEN(MAXLEN), .LEN(LENS[FIRST+r]), .PATTERN(PATTERNS[FIRST+r])
      ) u_rule (
          .clk    (clk),
          .rst_n  (rst_n),
          .valid  (in_valid),
          .ch     (in_chars[0]),
          .match_n(match_n[r])
      );
    end
  end else if (Q == 1) begin : g_q1
    logic [CODE_W-1:0] code;

    symbol_encoder #(.Q(1), .NK(NK), .KEYS(KEYS), .CODE_W(CODE_W)) u_enc (
        .chars(in_chars),
        .code (code)
    );

    for (genvar r = 0; r < COUNT; r++) begin : g_rule
      encoded_module #(
          .MAXLEN(MAXLEN), .LEN(LENS[FIRST+r]), .PATTERN(PATTERNS[FIRST+r]),
          .NK(NK), .KEYS(KEYS), .CODE_W(CODE_W)
      ) u_rule (
          .clk    (clk),
          .rst_n  (rst_n),
          .valid  (in_valid),
          .code   (code),
          .match_n(match_n[r])
      );
    end
  end else begin : g_q2
    // Later character of the previous valid beat (t_{2j}) and whether one exists.
    char_t             prev_ch;
    logic              have_prev;
    char_t [1:0]       odd_pair;
    logic [CODE_W-1:0] code_even, code_odd;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        prev_ch   <= '0;
        have_prev <= 1'b0;
      end else if (in_valid) begin
        prev_ch   <= in_chars[Q-1];
        have_prev <= 1'b1;
      end
    end

    assign odd_pair = {in_chars[0], prev_ch};

    symbol_encoder #(.Q(2), .NK(NK), .KEYS(KEYS), .CODE_W(CODE_W)) u_enc_even (
        .chars(in_chars),
        .code (code_even)
    );

    symbol_encoder #(.Q(2), .NK(NK), .KEYS(KEYS), .CODE_W(CODE_W)) u_enc_odd (
        .chars(odd_pair),
        .code (code_odd)
    );

    for (genvar r = 0; r < COUNT; r++) begin : g_rule
      q2_module #(
          .MAXLEN(MAXLEN), .LEN(LENS[FIRST+r]), .PATTERN(PATTERNS[FIRST+r]),
          .NK(NK), .KEYS(KEYS), .CODE_W(CODE_W)
      ) u_rule (
          .clk       (clk),
          .rst_n     (rst_n),
          .valid_even(in_valid),
          .code_even (code_even),
          .valid_odd (in_valid & have_prev),
          .code_odd  (code_odd),
          .match_n   (match_n[r])
      );
    end
  end

endmodule

// nids_pkg: constants and helpers shared by the shift-or signature matcher.
//
// The matcher compares a byte stream against a set of fixed strings (rule
// patterns). Characters are 8-bit codes, so the full alphabet has 256 symbols.
// A rule group's symbol encoder is described by a key table, built when the
// design elaborates from the patterns of the group. Each key is a key_t:
//   {valid, dc_second, first, second}
// A key with dc_second set matches any input whose first character is
// `first` (this is every key when one character is scanned per cycle, and the
// key of an odd-length pattern's last, half-filled character pair when two
// characters are scanned per cycle). A key with dc_second clear matches one
// character pair exactly. Key k (counting from 0) is encoded as code k+1;
// code 0 is the shared code for every input the group's patterns do not use.
package nids_pkg;

  localparam int CHAR_W = 8;
  typedef logic [CHAR_W-1:0] char_t;

  // One key of a symbol encoder.
  typedef struct packed {
    logic  valid;        // entry in use
    logic  dc_second;    // second character is "don't care"
    char_t first;
    char_t second;       // 0 when dc_second is set
  } key_t;

  localparam int KEY_W = $bits(key_t);

  function automatic key_t make_key(input char_t first, input char_t second,
                                    input logic dc_second);
    return '{valid: 1'b1, dc_second: dc_second, first: first,
             second: dc_second ? char_t'(0) : second};
  endfunction

  // Width of a code able to name NK keys plus the shared code 0.
  function automatic int code_width(input int nk);
    return (nk < 1) ? 1 : $clog2(nk + 1);
  endfunction

endpackage

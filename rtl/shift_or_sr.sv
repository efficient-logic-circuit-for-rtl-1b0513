// shift_or_sr: the shift register with OR gates of one rule module.
//
// It evaluates the shift-or recurrence R_{j+1}[i] = R_j[i-1] OR S[i] for
// i = 1..W, with R_j[0] = 0, one step per valid input beat. S is the bit
// vector read from the rule's ROM for the current input symbol (bit i-1 of
// s holds S[i]); a 0 in S[i] means the symbol equals the pattern's i-th
// symbol. Stage i is an OR gate feeding flip-flop i; only W-1 flip-flops are
// needed, because the last OR gate's output R_{j+1}[W] is the result: it is 0
// in the very beat in which the whole pattern has been seen, so match_n is
// combinational from s (no register between ROM output and match).
//
// All of the above follows the circuit it implements. This design's own
// choices: a valid input that freezes the flip-flops and forces match_n to 1
// while low (so input bubbles are skipped), and an active-low reset that
// loads every flip-flop with 1, the initial condition R_0[i] = 1.
//
// Interface: clk, rst_n (asynchronous, active low), valid, s[W-1:0];
// match_n is active low and valid in the same cycle as s.
module shift_or_sr #(
    parameter int W = 4  // pattern length in ROM symbols (m, or ceil(m/2) for two chars per cycle)
) (
    input  logic         clk,
    input  logic         rst_n,
    input  logic         valid,
    input  logic [W-1:0] s,
    output logic         match_n
);

  // r_in[i-1] is R_j[i-1], the left input of OR gate i.
  logic [W-1:0] r_in;
  // r_next[i-1] is R_{j+1}[i], the output of OR gate i.
  logic [W-1:0] r_next;

  assign r_next  = r_in | s;
  assign match_n = ~valid | r_next[W-1];

  if (W == 1) begin : g_single
    // A one-symbol pattern needs no flip-flop.
    assign r_in = 1'b0;
  end else begin : g_chain
    // ff[i-1] holds R_j[i] for i = 1..W-1.
    logic [W-2:0] ff;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) ff <= '1;
      else if (valid) ff <= r_next[W-2:0];
    end
    assign r_in = {ff, 1'b0};
  end

endmodule

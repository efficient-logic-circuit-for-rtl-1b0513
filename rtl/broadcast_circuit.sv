// broadcast_circuit: registers each incoming beat of the packet stream and
// drives it to every rule group.
//
// A beat is Q characters (in_chars[0] the earliest) qualified by in_valid.
// The block is one register stage: it isolates the large fan-out to all rule
// modules from the input pins, so the modules see a freshly registered beat
// every cycle. That register stage is this design's choice; only the
// block's role, delivering the source to all modules, is given by the
// architecture. Latency: one cycle. Reset clears out_valid.
module broadcast_circuit
  import nids_pkg::*;
#(
    parameter int Q = 2
) (
    input  logic          clk,
    input  logic          rst_n,
    input  logic          in_valid,
    input  char_t [Q-1:0] in_chars,
    output logic          out_valid,
    output char_t [Q-1:0] out_chars
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_chars <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out_chars <= in_chars;
    end
  end

endmodule

// alarm_encoder: gathers the match outputs of all rule modules and reports
// them.
//
// Each rule module drives an active-low match line. In every cycle the
// encoder registers: alarm (some rule matched in the previous cycle),
// rule_id (the lowest-numbered rule that matched, a priority encoder), hits
// (one active-high bit per rule, for when several rules match at once) and
// multi (more than one rule matched). Only the block's role, passing the
// alarms on for action, is given by the architecture; the priority encoding
// and the register stage are this design's choice. Latency: one cycle.
module alarm_encoder #(
    parameter int NRULES = 6,
    parameter int ID_W   = (NRULES > 1) ? $clog2(NRULES) : 1
) (
    input  logic              clk,
    input  logic              rst_n,
    input  logic [NRULES-1:0] match_n,
    output logic              alarm,
    output logic [ID_W-1:0]   rule_id,
    output logic [NRULES-1:0] hits,
    output logic              multi
);

  logic [NRULES-1:0] hit_now;
  logic [ID_W-1:0]   id_now;
  logic              multi_now;

  assign hit_now = ~match_n;

  always_comb begin
    id_now = '0;
    for (int r = NRULES - 1; r >= 0; r--) begin
      if (hit_now[r]) id_now = ID_W'(r);
    end
  end

  // More than one bit set: clearing the lowest set bit leaves something.
  assign multi_now = |(hit_now & (hit_now - NRULES'(1)));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      alarm   <= 1'b0;
      rule_id <= '0;
      hits    <= '0;
      multi   <= 1'b0;
    end else begin
      alarm   <= |hit_now;
      rule_id <= id_now;
      hits    <= hit_now;
      multi   <= multi_now;
    end
  end

endmodule

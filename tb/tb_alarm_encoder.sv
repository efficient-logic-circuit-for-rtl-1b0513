// tb_alarm_encoder: drives random active-low match vectors (mostly sparse)
// into a 6-rule encoder and checks the registered alarm, lowest matching
// rule number, hit vector and several-rules flag one clock later.
module tb_alarm_encoder;

  logic       clk;
  logic       rst_n;
  logic [5:0] match_n, hits;
  logic [2:0] rule_id;
  logic       alarm, multi;
  int checks = 0, failures = 0;
  int n_multi = 0, n_alarm = 0;

  initial clk = 1'b0;
  always #5 clk = ~clk;

  alarm_encoder #(.NRULES(6)) dut (
      .clk(clk), .rst_n(rst_n), .match_n(match_n),
      .alarm(alarm), .rule_id(rule_id), .hits(hits), .multi(multi)
  );

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n   = 1'b0;
    match_n = '1;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      logic [5:0] h;
      int         exp_id, cnt;
      h = '0;
      for (int r = 0; r < 6; r++) if ($urandom_range(0, 5) == 0) h[r] = 1'b1;
      match_n = ~h;
      exp_id  = 0;
      cnt     = 0;
      for (int r = 5; r >= 0; r--) if (h[r]) begin exp_id = r; cnt++; end
      @(negedge clk);
      checks++;
      if (alarm !== (cnt > 0) || hits !== h || multi !== (cnt > 1) ||
          (cnt > 0 && int'(rule_id) != exp_id)) begin
        failures++;
        $display("FAIL n=%0d h=%b alarm=%0b id=%0d/%0d multi=%0b", n, h, alarm, rule_id, exp_id, multi);
      end
      if (cnt > 0) n_alarm++;
      if (cnt > 1) n_multi++;
    end
    checks++;
    if (n_multi == 0 || n_alarm == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

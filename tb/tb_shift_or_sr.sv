// tb_shift_or_sr: checks the shift register with OR gates.
//
// Part 1 replays the textbook example: pattern "aab" over the text "acaab";
// the S vectors are built in the testbench from their definition and the
// match must appear exactly at the fifth character. Part 2 drives a random
// 5-symbol pattern over a random text on a 3-letter alphabet, with random
// idle cycles, and compares match_n against a direct comparison of the last
// five accepted characters with the pattern. Idle cycles must read no match.
module tb_shift_or_sr;

  logic clk;
  logic rst_n;
  logic valid3, valid5;
  logic [2:0] s3;
  logic [4:0] s5;
  logic match3_n, match5_n;
  int checks = 0, failures = 0;

  initial clk = 1'b0;
  always #5 clk = ~clk;

  shift_or_sr #(.W(3)) dut3 (.clk(clk), .rst_n(rst_n), .valid(valid3), .s(s3), .match_n(match3_n));
  shift_or_sr #(.W(5)) dut5 (.clk(clk), .rst_n(rst_n), .valid(valid5), .s(s5), .match_n(match5_n));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  string pat3 = "aab";
  string txt3 = "acaab";
  byte   pat5[5];
  byte   hist[$];

  initial begin
    rst_n  = 1'b0;
    valid3 = 1'b0;
    valid5 = 1'b0;
    s3     = '1;
    s5     = '1;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    // Part 1: example from the shift-or definition.
    for (int j = 0; j < txt3.len(); j++) begin
      @(negedge clk);
      valid3 = 1'b1;
      for (int i = 0; i < 3; i++) s3[i] = (txt3[j] == pat3[i]) ? 1'b0 : 1'b1;
      #1 check($sformatf("aab/acaab j=%0d", j + 1), match3_n, (j == 4) ? 1'b0 : 1'b1);
    end
    @(negedge clk);
    valid3 = 1'b0;
    #1 check("aab idle", match3_n, 1'b1);

    // Part 2: random pattern and text.
    for (int i = 0; i < 5; i++) pat5[i] = byte'("a" + $urandom_range(0, 2));
    for (int n = 0; n < 4000; n++) begin
      byte c;
      bit  exp_match;
      @(negedge clk);
      valid5 = ($urandom_range(0, 4) != 0);
      c      = byte'("a" + $urandom_range(0, 2));
      for (int i = 0; i < 5; i++) s5[i] = (c == pat5[i]) ? 1'b0 : 1'b1;
      exp_match = 1'b0;
      if (valid5) begin
        hist.push_back(c);
        if (hist.size() > 5) void'(hist.pop_front());
        if (hist.size() == 5) begin
          exp_match = 1'b1;
          for (int i = 0; i < 5; i++) if (hist[i] != pat5[i]) exp_match = 1'b0;
        end
      end
      #1 check($sformatf("random n=%0d", n), match5_n, ~exp_match);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

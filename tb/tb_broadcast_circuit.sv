// tb_broadcast_circuit: drives random beats and checks that each one,
// with its valid flag, appears at the outputs one clock later, that idle
// beats keep the last characters, and that reset clears valid.
module tb_broadcast_circuit;

  import nids_pkg::*;

  logic          clk;
  logic          rst_n;
  logic          in_valid, out_valid;
  char_t [1:0]   in_chars, out_chars;
  int checks = 0, failures = 0;

  initial clk = 1'b0;
  always #5 clk = ~clk;

  broadcast_circuit #(.Q(2)) dut (
      .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_chars(in_chars),
      .out_valid(out_valid), .out_chars(out_chars)
  );

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic        exp_valid;
    char_t [1:0] exp_chars;
    rst_n    = 1'b0;
    in_valid = 1'b1;
    in_chars = 16'h4142;
    @(negedge clk);
    checks++;
    if (out_valid !== 1'b0) begin failures++; $display("FAIL valid in reset"); end
    in_valid  = 1'b0;
    rst_n     = 1'b1;
    exp_chars = '0;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      in_chars = 16'($urandom);
      exp_valid = in_valid;
      if (in_valid) exp_chars = in_chars;
      @(negedge clk);
      checks++;
      if (out_valid !== exp_valid || (exp_valid && out_chars !== exp_chars)) begin
        failures++;
        $display("FAIL n=%0d valid %0b/%0b chars %h/%h", n, out_valid, exp_valid, out_chars, exp_chars);
      end
      checks++;
      if (out_chars !== exp_chars) begin
        failures++;
        $display("FAIL n=%0d held chars %h/%h", n, out_chars, exp_chars);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_nids_workload: the matcher at the scales of the published evaluation:
// 1568 pattern characters in eight symbol-encoder groups, scanned two
// characters per clock and one character per clock, and 5004 characters in
// 24 groups scanned one character per clock (see nids_workload for the
// generated rule sets and the checks).
module tb_nids_workload;

  logic clk, rst_n;
  logic done2, done1, done5k;
  int   checks2, failures2, checks1, failures1, checks5k, failures5k;

  initial clk = 1'b0;
  always #5 clk = ~clk;

  nids_workload #(.Q(2), .NCHARS(1568)) run_q2 (
      .clk(clk), .rst_n(rst_n), .done(done2), .checks(checks2), .failures(failures2));
  nids_workload #(.Q(1), .NCHARS(1568)) run_q1 (
      .clk(clk), .rst_n(rst_n), .done(done1), .checks(checks1), .failures(failures1));
  nids_workload #(.Q(1), .NCHARS(5004), .NGROUPS(24)) run_5k (
      .clk(clk), .rst_n(rst_n), .done(done5k), .checks(checks5k), .failures(failures5k));

  initial begin
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks2 + checks1 + checks5k, failures2 + failures1 + failures5k + 1);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (done2 && done1 && done5k);
    $display("TB_RESULT checks=%0d failures=%0d", checks2 + checks1 + checks5k, failures2 + failures1 + failures5k);
    $finish;
  end

endmodule

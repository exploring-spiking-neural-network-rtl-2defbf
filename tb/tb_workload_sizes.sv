// tb_workload_sizes: the network sizes of the latency study that fit in one
// register file of synapses: 20 neurons (4 clusters x 5 cells), 40 (8 x 5)
// and 60 (10 x 6). Each instance runs two all-firing rounds (see
// workload_run) and prints its cycle counts.
module tb_workload_sizes;
  logic clk = 0, rst_n = 0;
  logic f20, f40, f60;
  int c20, c40, c60, e20, e40, e60;
  int checks, failures;

  workload_run #(.NCL(4),  .NC(5)) u20 (.clk, .rst_n, .finished(f20), .checks(c20), .failures(e20));
  workload_run #(.NCL(8),  .NC(5)) u40 (.clk, .rst_n, .finished(f40), .checks(c40), .failures(e40));
  workload_run #(.NCL(10), .NC(6)) u60 (.clk, .rst_n, .finished(f60), .checks(c60), .failures(e60));

  always #5 clk = ~clk;
  initial begin
    repeat (2000000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c20 + c40 + c60, e20 + e40 + e60 + 1);
    $finish;
  end
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (f20 && f40 && f60);
    checks = c20 + c40 + c60;
    failures = e20 + e40 + e60;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

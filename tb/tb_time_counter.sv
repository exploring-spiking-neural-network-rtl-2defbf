// tb_time_counter: checks reset to 1, counting of step pulses only, the
// synchronous clear and saturation at the largest value (8-bit instance).
module tb_time_counter;
  logic clk = 0, rst_n = 0, clear = 0, step = 0;
  logic [7:0] count;
  int checks = 0, failures = 0;
  int exp_cnt;

  time_counter #(.W(8)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int exp, input string what);
    checks++;
    if (int'(count) != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, count, exp);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(1, "after reset");
    exp_cnt = 1;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      step  = 1'($urandom);
      clear = ($urandom % 97) == 0;
      @(negedge clk);
      if (clear) exp_cnt = 1;
      else if (step && exp_cnt < 255) exp_cnt++;
      step = 0; clear = 0;
      check(exp_cnt, "count");
    end
    // drive to saturation
    step = 1;
    repeat (300) @(negedge clk);
    step = 0;
    check(255, "saturated");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

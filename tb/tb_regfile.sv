// tb_regfile: checks the two-port register file against a reference array:
// cleared by reset, independent writes and synchronous reads on both ports,
// port 1 winning a same-address write, and the one-cycle read latency.
module tb_regfile;
  localparam int DEPTH = 64;
  logic clk = 0, rst_n = 0;
  logic we0, we1;
  logic [5:0] addr0, addr1;
  logic [15:0] wdata0, wdata1, rdata0, rdata1;
  logic [15:0] model [DEPTH];
  int checks = 0, failures = 0;

  regfile #(.DEPTH(DEPTH), .DATA_W(16)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [15:0] got, input logic [15:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    we0 = 0; we1 = 0; addr0 = 0; addr1 = 0; wdata0 = 0; wdata1 = 0;
    for (int i = 0; i < DEPTH; i++) model[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // everything reads 0 after reset
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); addr0 = 6'(i); addr1 = 6'(DEPTH - 1 - i);
      @(negedge clk);
      check(rdata0, 16'h0, "reset p0");
      check(rdata1, 16'h0, "reset p1");
    end
    // random traffic
    for (int n = 0; n < 3000; n++) begin
      logic [5:0] ra0, ra1;
      @(negedge clk);
      we0 = 1'($urandom); we1 = 1'($urandom);
      addr0 = 6'($urandom); addr1 = (n % 7 == 0) ? addr0 : 6'($urandom);
      wdata0 = 16'($urandom); wdata1 = 16'($urandom);
      ra0 = addr0; ra1 = addr1;
      @(posedge clk);
      #1;
      // read data is the content before this edge's writes
      check(rdata0, model[ra0], "read p0");
      check(rdata1, model[ra1], "read p1");
      if (we0) model[ra0] = wdata0;
      if (we1) model[ra1] = wdata1;
    end
    @(negedge clk); we0 = 0; we1 = 0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); addr0 = 6'(i); addr1 = 6'(i);
      @(negedge clk);
      check(rdata0, model[i], "final p0");
      check(rdata1, model[i], "final p1");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

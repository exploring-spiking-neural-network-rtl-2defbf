// tb_fp64_div: divides random normal doubles and compares bit for bit with
// the simulator's own double division (round to nearest even), checks the
// special cases (zero, infinity, NaN) and the 58-cycle latency.
module tb_fp64_div;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [63:0] a, b, q;
  int checks = 0, failures = 0;

  fp64_div dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [63:0] rnd_normal(input int emin, input int emax);
    logic [10:0] e;
    e = 11'(1023 + emin + int'($urandom % (emax - emin + 1)));
    return {1'($urandom), e, 20'($urandom), 32'($urandom)};
  endfunction

  task automatic divide(input logic [63:0] x, input logic [63:0] y, output logic [63:0] r,
                        output int lat);
    @(negedge clk);
    a = x; b = y; start = 1;
    @(negedge clk);
    start = 0;
    lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    r = q;
  endtask

  initial begin
    logic [63:0] r, exp_q;
    int lat;
    a = 0; b = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      logic [63:0] x, y;
      x = rnd_normal(-60, 60);
      y = (n % 10 == 0) ? x : rnd_normal(-60, 60);
      if (n % 13 == 0) y = {x[63:52] ^ 12'h800, x[51:0]};  // equal significands, x/y = -1
      divide(x, y, r, lat);
      exp_q = $realtobits($bitstoreal(x) / $bitstoreal(y));
      checks++;
      if (r !== exp_q) begin
        failures++;
        $display("FAIL %h / %h = %h expected %h", x, y, r, exp_q);
      end
      checks++;
      if (lat != 58) begin failures++; $display("FAIL latency %0d", lat); end
    end
    // small integers and the STDP use: dt / tau
    for (int t = 1; t < 200; t++) begin
      divide($realtobits(real'(t)), $realtobits(20.0), r, lat);
      checks++;
      if (r !== $realtobits(real'(t) / 20.0)) begin failures++; $display("FAIL %0d/20", t); end
    end
    // special cases
    divide(64'h0, $realtobits(3.0), r, lat);
    checks++; if (r !== 64'h0) begin failures++; $display("FAIL 0/x"); end
    divide($realtobits(-3.0), 64'h0, r, lat);
    checks++; if (r !== 64'hFFF0_0000_0000_0000) begin failures++; $display("FAIL x/0"); end
    divide(64'h0, 64'h0, r, lat);
    checks++; if (r[62:52] !== 11'h7FF || r[51:0] == 0) begin failures++; $display("FAIL 0/0"); end
    divide($realtobits(5.0), 64'h7FF0_0000_0000_0000, r, lat);
    checks++; if (r !== 64'h0) begin failures++; $display("FAIL x/inf"); end
    divide($realtobits(1.0e300), $realtobits(1.0e-300), r, lat);
    checks++; if (r !== 64'h7FF0_0000_0000_0000) begin failures++; $display("FAIL overflow"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_stdp_unit: sweeps dt over both signs and compares the weight change
// with A * exp(-|dt|/tau) computed in real arithmetic, where the exponent is
// first truncated to 1/16 as the unit does; the table rounding allows an
// error of one unit. Also checks dt = 0, the long-dt cut-off, the sign rule
// and the 60-cycle latency.
module tb_stdp_unit;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic signed [15:0] dt, dw;
  int checks = 0, failures = 0;

  stdp_unit #(.A_PLUS(64), .A_MINUS(48), .TAU_PLUS(20), .TAU_MINUS(12)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int d, output int w, output int lat);
    @(negedge clk);
    dt = 16'(d); start = 1;
    @(negedge clk);
    start = 0; lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    w = int'(dw);
  endtask

  initial begin
    int w, lat;
    real x, ew;
    dt = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int d = -200; d <= 200; d++) begin
      run(d, w, lat);
      if (d == 0) begin
        checks++; if (w != 0) begin failures++; $display("FAIL dt=0 dw=%0d", w); end
        checks++; if (lat != 2) begin failures++; $display("FAIL dt=0 latency %0d", lat); end
        continue;
      end
      x  = (d > 0) ? real'(d) / 20.0 : real'(-d) / 12.0;
      x  = $floor(x * 16.0) / 16.0;
      ew = (x >= 8.0) ? 0.0 : ((d > 0) ? 64.0 : -48.0) * $exp(-x);
      checks++;
      if (real'(w) - ew > 1.0 || ew - real'(w) > 1.0) begin
        failures++; $display("FAIL dt=%0d dw=%0d expected %f", d, w, ew);
      end
      checks++;
      if ((d > 0 && w < 0) || (d < 0 && w > 0)) begin failures++; $display("FAIL sign dt=%0d", d); end
      checks++;
      if (lat != 60) begin failures++; $display("FAIL latency %0d", lat); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

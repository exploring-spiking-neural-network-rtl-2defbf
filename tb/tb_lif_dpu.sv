// tb_lif_dpu: drives random input currents and compares the membrane
// potential and the fire pulse with an integer model of
// V' = V + I + a - (V >>> 3), fire and reset when V' >= 256, saturating.
module tb_lif_dpu;
  logic clk = 0, rst_n = 0, step = 0, fire;
  logic signed [15:0] i_syn, v;
  int checks = 0, failures = 0, fires = 0, sats = 0;
  int mv, nxt;

  lif_dpu dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    i_syn = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    mv = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      step = ($urandom % 4) != 0;
      if (n < 1000)       i_syn = 16'($signed($urandom % 96) - 40);
      else if (n < 1100)  i_syn = -16'sd32000;         // drive to negative saturation
      else                i_syn = 16'($signed($urandom % 600) - 300);
      @(negedge clk);
      checks++;
      if (step) begin
        nxt = mv + int'(i_syn) + 16 - (mv >>> 3);
        if (nxt > 32767) begin nxt = 32767; sats++; end
        if (nxt < -32768) begin nxt = -32768; sats++; end
        if (nxt >= 256) begin
          fires++;
          if (!fire || v != 0) begin failures++; $display("FAIL expected fire at %0d", n); end
          mv = 0;
        end else begin
          if (fire || int'(v) != nxt) begin
            failures++; $display("FAIL n=%0d v=%0d exp %0d", n, v, nxt);
          end
          mv = nxt;
        end
      end else if (fire || int'(v) != mv) begin
        failures++; $display("FAIL hold n=%0d", n);
      end
      step = 0;
    end
    checks++;
    if (fires < 10 || sats < 1) begin failures++; $display("FAIL coverage fires=%0d sats=%0d", fires, sats); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_switch_box: loads random connections and checks that each port carries
// the selected source's word, that a connection holds until reloaded and
// that it takes effect from the cycle after loading.
module tb_switch_box;
  localparam int N_IN = 6;
  logic clk = 0, rst_n = 0, cfg_we = 0;
  logic [2:0] cfg_sel_a, cfg_sel_b, sel_a, sel_b;
  logic [15:0] src [N_IN];
  logic [15:0] port_a, port_b;
  int checks = 0, failures = 0;
  int ea, eb;

  switch_box #(.N_IN(N_IN), .DATA_W(16)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg_sel_a = 0; cfg_sel_b = 0;
    for (int i = 0; i < N_IN; i++) src[i] = 16'(i * 1111 + 7);
    repeat (2) @(posedge clk);
    rst_n = 1;
    ea = 0; eb = 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      for (int i = 0; i < N_IN; i++) src[i] = 16'($urandom);
      cfg_we = ($urandom % 3) == 0;
      cfg_sel_a = 3'($urandom % N_IN);
      cfg_sel_b = 3'($urandom % N_IN);
      #1;
      checks += 2;
      if (port_a !== src[ea]) begin failures++; $display("FAIL A n=%0d", n); end
      if (port_b !== src[eb]) begin failures++; $display("FAIL B n=%0d", n); end
      @(posedge clk);
      if (cfg_we) begin ea = int'(cfg_sel_a); eb = int'(cfg_sel_b); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_cluster_hub: loads the six-cell collection program (three pairs of
// CONNECT, READ, COMBINE, then DONE), sets random cell words, runs it and
// reads back the register file. Checks that every cell's word lands in its
// register, that collection takes 3 cycles per pair (9 + DONE for six
// cells), and counts the switch-box reconfigurations.
module tb_cluster_hub;
  import snn_pkg::*;
  localparam int NC = 6;
  logic clk = 0, rst_n = 0;
  logic [15:0] cell_data [NC];
  logic load_we = 0, start = 0, done, running, ev_connect;
  logic [5:0] load_addr, rd_addr;
  logic [INSTR_W-1:0] load_data;
  logic [15:0] rd_data;
  int checks = 0, failures = 0, connects = 0;

  cluster_hub #(.N_CELLS(NC)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  always @(posedge clk) if (ev_connect) connects++;

  initial begin
    logic [INSTR_W-1:0] prog [10];
    logic [15:0] exp_w [NC];
    int cyc;
    load_addr = 0; load_data = 0; rd_addr = 0;
    for (int i = 0; i < NC; i++) cell_data[i] = 0;
    for (int p = 0; p < NC / 2; p++) begin
      prog[3*p]   = i_connect(4'(2*p), 4'(2*p+1));
      prog[3*p+1] = i_read();
      prog[3*p+2] = i_combine(6'(2*p), 6'(2*p+1));
    end
    prog[9] = i_done();
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 10; i++) begin
      @(negedge clk); load_we = 1; load_addr = 6'(i); load_data = prog[i];
    end
    @(negedge clk); load_we = 0;
    for (int r = 0; r < 20; r++) begin
      for (int i = 0; i < NC; i++) begin
        exp_w[i] = 16'($urandom);
        cell_data[i] = exp_w[i];
      end
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != 11) begin failures++; $display("FAIL collection took %0d cycles", cyc); end
      for (int i = 0; i < NC; i++) begin
        @(negedge clk); rd_addr = 6'(i);
        @(negedge clk);
        checks++;
        if (rd_data !== exp_w[i]) begin
          failures++; $display("FAIL cell %0d: %h expected %h", i, rd_data, exp_w[i]);
        end
      end
    end
    checks++;
    if (connects != 20 * 3) begin failures++; $display("FAIL connects %0d", connects); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_sequencer: loads programs and checks the issued instruction stream cycle
// by cycle: one instruction per cycle in order, a JUMP followed, DONE ending
// the program with a done pulse, and a restart by a new start.
module tb_sequencer;
  import snn_pkg::*;
  logic clk = 0, rst_n = 0;
  logic load_we = 0, start = 0;
  logic [5:0] load_addr, pc;
  logic [INSTR_W-1:0] load_data;
  seq_instr_t instr;
  logic instr_valid, running, done;
  int checks = 0, failures = 0;
  logic [INSTR_W-1:0] prog [64];

  sequencer #(.DEPTH(64)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load(input int len);
    for (int i = 0; i < len; i++) begin
      @(negedge clk);
      load_we = 1; load_addr = 6'(i); load_data = prog[i];
    end
    @(negedge clk);
    load_we = 0;
  endtask

  // Start the program and compare the issued stream with exp[0..n-1].
  task automatic run_and_check(input int exp_addr [$]);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    foreach (exp_addr[k]) begin
      checks++;
      if (!instr_valid || instr !== seq_instr_t'(prog[exp_addr[k]])) begin
        failures++;
        $display("FAIL step %0d: valid=%b instr=%h expected %h", k, instr_valid, instr, prog[exp_addr[k]]);
      end
      @(negedge clk);
    end
    // DONE fetched now: not issued, done pulse follows
    checks++;
    if (instr_valid) begin failures++; $display("FAIL DONE issued"); end
    @(negedge clk);
    checks++;
    if (!done || running) begin failures++; $display("FAIL done pulse"); end
    @(negedge clk);
    checks++;
    if (done || instr_valid) begin failures++; $display("FAIL stopped"); end
  endtask

  initial begin
    int ex [$];
    load_addr = 0; load_data = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // program with a forward jump
    prog[0] = i_connect(4'd1, 4'd2);
    prog[1] = i_read();
    prog[2] = i_jump(6'd5);
    prog[3] = i_combine(6'd9, 6'd9);
    prog[4] = {OP_NOP, 32'h0};
    prog[5] = i_combine(6'd3, 6'd4);
    prog[6] = i_done();
    load(7);
    ex = '{0, 1, 2, 5};
    run_and_check(ex);
    // random straight-line programs
    for (int r = 0; r < 30; r++) begin
      int len;
      len = 1 + int'($urandom % 60);
      ex = {};
      for (int i = 0; i < len; i++) begin
        case ($urandom % 4)
          0: prog[i] = i_connect(4'($urandom), 4'($urandom));
          1: prog[i] = i_read();
          2: prog[i] = i_combine(6'($urandom), 6'($urandom));
          default: prog[i] = {OP_NOP, 32'($urandom)};
        endcase
        ex.push_back(i);
      end
      prog[len] = i_done();
      load(len + 1);
      run_and_check(ex);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_snn_fsm: walks the state machine through the pre-synaptic path and the
// post-synaptic loop with a model of the expected state sequence, answering
// stdp_start with stdp_done after a random delay. Checks every state visited,
// the number of weight writes (1 per pre spike, Nern per post spike), the
// synapse counter values and the priority of a post request.
module tb_snn_fsm;
  import snn_pkg::*;
  logic clk = 0, rst_n = 0;
  logic pre_req = 0, post_req = 0, stdp_done;
  logic [6:0] n_syn, ctr;
  snn_state_e state;
  logic pre_accept, post_accept, stdp_start, w_we, busy;
  int checks = 0, failures = 0;

  snn_fsm #(.CTR_W(7)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // STDP stand-in: done one to five cycles after start
  int stdp_cnt;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)          stdp_cnt <= 0;
    else if (stdp_start) stdp_cnt <= 1 + int'($urandom % 5);
    else if (stdp_cnt > 0) stdp_cnt <= stdp_cnt - 1;
  assign stdp_done = (stdp_cnt == 1);

  task automatic expect_state(input snn_state_e s, input string what);
    checks++;
    if (state != s) begin
      failures++;
      $display("FAIL %s: state %s expected %s", what, state.name(), s.name());
    end
  endtask

  initial begin
    int writes;
    n_syn = 7'd5;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    expect_state(S_IDLE, "reset");
    for (int r = 0; r < 40; r++) begin
      bit post;
      int nern;
      post = 1'($urandom);
      nern = 1 + int'($urandom % 9);
      n_syn = 7'(nern);
      @(negedge clk);
      pre_req = !post || (r % 5 == 0);   // sometimes both: post must win
      post_req = post;
      #1;
      checks++;
      if (post_accept != post || pre_accept != !post) begin failures++; $display("FAIL accept"); end
      @(posedge clk); #1;
      pre_req = 0; post_req = 0;
      // already one edge past Idle: re-align the follower by one cycle
      if (post) expect_state(S_CTR_START, "ctr start edge");
      else      expect_state(S_FETCH_POST, "fetch post edge");
      // follow from the state after the first one
      begin
        int guard;
        guard = 0;
        if (post) begin
          writes = 0;
          for (int j = 0; j < nern; j++) begin
            @(posedge clk); #1;
            expect_state(S_FETCH_PRE, "fetch pre");
            checks++; if (int'(ctr) != j) begin failures++; $display("FAIL ctr %0d exp %0d", ctr, j); end
            @(posedge clk); #1;
            expect_state(S_STDP_POST, "stdp post");
            while (state == S_STDP_POST && guard < 100) begin @(posedge clk); #1; guard++; end
            expect_state(S_WUPD_POST, "wupd post");
            if (w_we) writes++;
            @(posedge clk); #1;
            expect_state(S_CTR_INC, "ctr inc");
          end
          @(posedge clk); #1;
          expect_state(S_IDLE, "idle after post");
          checks++; if (writes != nern) begin failures++; $display("FAIL writes %0d exp %0d", writes, nern); end
        end else begin
          @(posedge clk); #1;
          expect_state(S_STDP_PRE, "stdp pre");
          while (state == S_STDP_PRE && guard < 100) begin @(posedge clk); #1; guard++; end
          expect_state(S_WUPD_PRE, "wupd pre");
          checks++; if (!w_we) begin failures++; $display("FAIL w_we pre"); end
          @(posedge clk); #1;
          expect_state(S_IDLE, "idle after pre");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

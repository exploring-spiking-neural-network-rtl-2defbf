// tb_snn_neuron: random sequences of incoming spikes and time steps against
// a reference model of the neuron: the pre-synaptic time table, T_post, the
// LIF potential (exact) and the STDP weights (real-valued exp, within one
// unit, the model re-synchronised to the read weight after each check).
// Covers pre-synaptic depression, post-synaptic potentiation over all
// synapses, firing and output stamps, weight saturation at both bounds,
// and dropped spikes (own index, empty stamp).
module tb_snn_neuron;
  localparam int NS = 8;
  localparam int SELF = 3;
  localparam int WMAX = 400;
  logic clk = 0, rst_n = 0;
  logic pre_valid = 0, step = 0, w_we = 0, busy;
  logic [5:0] pre_src, w_addr;
  logic [15:0] pre_stamp, out_stamp;
  logic signed [15:0] ext_i, v, w_wdata, w_rdata;
  logic ev_fire, ev_pre_stdp, ev_post_stdp, ev_sat;
  int checks = 0, failures = 0;
  int n_fire = 0, n_pre = 0, n_post = 0, n_sat = 0;

  snn_neuron #(.N_SYN(64), .W_MAX(16'(WMAX))) dut (
    .clk, .rst_n, .self_id(6'(SELF)), .n_syn(7'(NS)),
    .pre_valid, .pre_src, .pre_stamp, .step, .ext_i, .out_stamp, .v, .busy,
    .w_we, .w_addr, .w_wdata, .w_rdata,
    .ev_fire, .ev_pre_stdp, .ev_post_stdp, .ev_sat
  );

  always #5 clk = ~clk;
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  always @(posedge clk) begin
    if (ev_fire) n_fire++;
    if (ev_pre_stdp) n_pre++;
    if (ev_post_stdp) n_post++;
    if (ev_sat) n_sat++;
  end

  // reference model
  int A [NS];
  int W [NS];
  int t_post, mv, iacc, count;

  function automatic real stdp(input int dt);
    real x;
    if (dt == 0) return 0.0;
    x = (dt > 0) ? real'(dt) / 20.0 : real'(-dt) / 20.0;
    x = $floor(x * 16.0) / 16.0;
    if (x >= 8.0) return 0.0;
    return ((dt > 0) ? 64.0 : -64.0) * $exp(-x);
  endfunction

  function automatic real clampw(input real w);
    if (w > real'(WMAX)) return real'(WMAX);
    if (w < 0.0) return 0.0;
    return w;
  endfunction

  task automatic read_w(input int j, output int w);
    @(negedge clk); w_addr = 6'(j);
    @(negedge clk); w = int'(w_rdata);
  endtask

  task automatic wait_idle();
    @(negedge clk);
    while (busy) @(negedge clk);
  endtask

  // compare every weight with the expected real value, then resync
  task automatic check_weights(input real exp_w [NS], input string what);
    int w;
    for (int j = 0; j < NS; j++) begin
      read_w(j, w);
      checks++;
      if (real'(w) - exp_w[j] > 1.01 || exp_w[j] - real'(w) > 1.01) begin
        failures++; $display("FAIL %s: W[%0d]=%0d expected %f", what, j, w, exp_w[j]);
      end
      W[j] = w;
    end
  endtask

  initial begin
    real ew [NS];
    pre_src = 0; pre_stamp = 0; ext_i = 0; w_addr = 0; w_wdata = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // initial weights
    for (int j = 0; j < NS; j++) begin
      @(negedge clk); w_we = 1; w_addr = 6'(j); w_wdata = 16'(40 + 30 * j); W[j] = 40 + 30 * j;
      A[j] = 0;
    end
    @(negedge clk); w_we = 0;
    for (int j = 0; j < NS; j++) ew[j] = real'(W[j]);
    check_weights(ew, "load");
    t_post = 0; mv = 0; iacc = 0; count = 1;

    for (int n = 0; n < 300; n++) begin
      int kind;
      kind = int'($urandom % 3);
      if (kind != 0) begin
        // incoming spike from a random source, stamped within the recent past
        int src, st, dt;
        src = int'($urandom % NS);
        st  = (n % 17 == 0) ? 0 : ((count > 1) ? int'(1 + $urandom % (count - 1)) : 0);
        wait_idle();
        pre_valid = 1; pre_src = 6'(src); pre_stamp = 16'(st);
        @(negedge clk); pre_valid = 0;
        wait_idle();
        for (int j = 0; j < NS; j++) ew[j] = real'(W[j]);
        if (st != 0 && src != SELF) begin
          A[src] = st;
          dt = (t_post == 0) ? 0 : t_post - st;
          iacc += W[src];
          ew[src] = clampw(real'(W[src]) + stdp(dt));
        end
        check_weights(ew, "pre");
      end else begin
        // time step
        int nxt, ex, fired, stamp;
        ex = int'($urandom % 300) - 60;
        wait_idle();
        ext_i = 16'(ex); step = 1;
        @(negedge clk); step = 0;
        wait_idle();
        nxt = mv + 16'(iacc + ex) + 16 - (mv >>> 3);
        if (nxt > 32767) nxt = 32767;
        if (nxt < -32768) nxt = -32768;
        stamp = count;
        count++;
        iacc = 0;
        fired = (nxt >= 256);
        mv = fired ? 0 : nxt;
        checks++;
        if (int'(v) != mv) begin failures++; $display("FAIL v=%0d expected %0d", v, mv); end
        checks++;
        if (int'(out_stamp) != (fired ? stamp : 0)) begin
          failures++; $display("FAIL out_stamp=%0d expected %0d", out_stamp, fired ? stamp : 0);
        end
        for (int j = 0; j < NS; j++) ew[j] = real'(W[j]);
        if (fired) begin
          t_post = stamp;
          for (int j = 0; j < NS; j++)
            if (A[j] != 0) ew[j] = clampw(real'(W[j]) + stdp(t_post - A[j]));
        end
        check_weights(ew, "post");
      end
    end
    checks++;
    if (n_fire == 0 || n_pre == 0 || n_post == 0 || n_sat == 0) begin
      failures++;
      $display("FAIL coverage fire=%0d pre=%0d post=%0d sat=%0d", n_fire, n_pre, n_post, n_sat);
    end
    $display("coverage fire=%0d pre=%0d post=%0d sat=%0d", n_fire, n_pre, n_post, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_snn_cgra_top: runs the whole array at its default size (4 clusters of
// 6 cells, 24 neurons connected one to all) for a number of rounds, one round
// at a time, against a network-level reference model. Per round it checks
// every output stamp and potential and all 576 weights. The model uses
// real-valued STDP; weights are compared within two units (two updates per
// round at most) and the model then takes the read values, and a neuron's
// firing is only required to match where the model is clearly away from the
// threshold. Counts and requires: firings, pre- and post-synaptic STDP
// updates, weight saturation, switch-box reconfigurations (3 per cluster per
// round), inter-cluster link reconfigurations (4 per round) and spike-channel
// stalls.
module tb_snn_cgra_top;
  import snn_pkg::*;
  localparam int NCL = 4, NC = 6, N = NCL * NC;
  localparam int ROUNDS = 30;
  logic clk = 0, rst_n = 0, run = 0;
  logic prog_we = 0, w_we = 0;
  logic [5:0] prog_addr, w_addr;
  logic [INSTR_W-1:0] prog_data;
  logic [4:0] w_neuron;
  logic signed [15:0] w_wdata, w_rdata;
  logic signed [15:0] ext_i [N];
  logic [15:0] out_stamp [N];
  logic signed [15:0] v [N];
  logic [15:0] round_cnt;
  logic round_done, idle;
  logic [N-1:0] ev_fire, ev_pre_stdp, ev_post_stdp, ev_sat;
  logic [NCL-1:0] ev_connect;
  logic ev_reconf, ev_stall;
  int checks = 0, failures = 0;
  int n_fire = 0, n_pre = 0, n_post = 0, n_sat = 0, n_conn = 0, n_reconf = 0, n_stall = 0;

  snn_cgra_top dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  always @(posedge clk) begin
    n_fire   += $countones(ev_fire);
    n_pre    += $countones(ev_pre_stdp);
    n_post   += $countones(ev_post_stdp);
    n_sat    += $countones(ev_sat);
    n_conn   += $countones(ev_connect);
    n_reconf += int'(ev_reconf);
    n_stall  += int'(ev_stall);
  end

  // reference model
  real W [N][N];
  int  A [N][N];
  int  mv [N], t_post [N], iacc [N], nrecv [N];
  int  count;

  function automatic real stdp(input int dt);
    real x;
    if (dt == 0) return 0.0;
    x = (dt > 0) ? real'(dt) / 20.0 : real'(-dt) / 20.0;
    x = $floor(x * 16.0) / 16.0;
    if (x >= 8.0) return 0.0;
    return ((dt > 0) ? 64.0 : -64.0) * $exp(-x);
  endfunction
  function automatic real clampw(input real w);
    if (w > 1024.0) return 1024.0;
    if (w < 0.0) return 0.0;
    return w;
  endfunction
  function automatic int sat16(input int x);
    if (x > 32767) return 32767;
    if (x < -32768) return -32768;
    return x;
  endfunction

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    int c0, r0, ro0;
    prog_addr = 0; prog_data = 0; w_neuron = 0; w_addr = 0; w_wdata = 0;
    for (int i = 0; i < N; i++) ext_i[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // collection program: three pairs of CONNECT, READ, COMBINE, then DONE
    for (int p = 0; p < NC / 2; p++) begin
      @(negedge clk); prog_we = 1; prog_addr = 6'(3*p);   prog_data = i_connect(4'(2*p), 4'(2*p+1));
      @(negedge clk); prog_we = 1; prog_addr = 6'(3*p+1); prog_data = i_read();
      @(negedge clk); prog_we = 1; prog_addr = 6'(3*p+2); prog_data = i_combine(6'(2*p), 6'(2*p+1));
    end
    @(negedge clk); prog_we = 1; prog_addr = 6'(3 * (NC / 2)); prog_data = i_done();
    @(negedge clk); prog_we = 0;
    // random initial weights
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        int w;
        w = int'($urandom % 90);
        @(negedge clk); w_we = 1; w_neuron = 5'(i); w_addr = 6'(j); w_wdata = 16'(w);
        W[i][j] = real'(w); A[i][j] = 0;
      end
    @(negedge clk); w_we = 0;
    for (int i = 0; i < N; i++) begin mv[i] = 0; t_post[i] = 0; iacc[i] = 0; nrecv[i] = 0; end
    count = 1;

    for (int r = 0; r < ROUNDS; r++) begin
      int cyc;
      for (int i = 0; i < N; i++) ext_i[i] = 16'(int'($urandom % 160) - 20 + ((i % 5 == 0) ? 120 : 0));
      c0 = n_conn; r0 = n_reconf;
      @(negedge clk); run = 1;
      @(negedge clk); run = 0;
      cyc = 0;
      while (!round_done) begin @(negedge clk); cyc++; end
      check(int'(round_cnt) == r + 1, "round counter");
      check(n_conn - c0 == NCL * (NC / 2), "switch-box reconfigurations per round");
      check(n_reconf - r0 == NCL, "link reconfigurations per round");

      // step phase of the model
      for (int i = 0; i < N; i++) begin
        int nxt, tol;
        bit fire_m, fire_d;
        nxt = sat16(mv[i] + int'(16'(iacc[i] + int'(ext_i[i]))) + 16 - (mv[i] >>> 3));
        fire_m = (nxt >= 256);
        fire_d = (out_stamp[i] != 0);
        tol = nrecv[i] + 2;
        if (nxt > 256 + tol || nxt < 256 - tol)
          check(fire_m == fire_d, $sformatf("fire of neuron %0d in round %0d", i, r));
        if (fire_d) begin
          check(int'(out_stamp[i]) == count, $sformatf("stamp of neuron %0d", i));
          t_post[i] = count;
          mv[i] = 0;
          for (int j = 0; j < N; j++)
            if (A[i][j] != 0) W[i][j] = clampw(W[i][j] + stdp(t_post[i] - A[i][j]));
        end else begin
          mv[i] = nxt;
        end
        iacc[i] = 0; nrecv[i] = 0;
      end
      // exchange phase of the model, in channel order
      for (int s = 0; s < N; s++) begin
        if (out_stamp[s] == 0) continue;
        for (int i = 0; i < N; i++) begin
          int dt;
          if (i == s) continue;
          A[i][s] = int'(out_stamp[s]);
          dt = (t_post[i] == 0) ? 0 : t_post[i] - int'(out_stamp[s]);
          iacc[i] += int'($floor(W[i][s] + 0.5));
          nrecv[i]++;
          W[i][s] = clampw(W[i][s] + stdp(dt));
        end
      end
      count++;
      // compare potentials and weights, then follow the hardware
      for (int i = 0; i < N; i++) begin
        int d;
        d = int'(v[i]) - mv[i];
        check(d <= 2 && d >= -2, $sformatf("potential of neuron %0d: %0d vs %0d", i, v[i], mv[i]));
        mv[i] = int'(v[i]);
        for (int j = 0; j < N; j++) begin
          real e;
          @(negedge clk); w_neuron = 5'(i); w_addr = 6'(j);
          @(negedge clk);
          e = real'(w_rdata) - W[i][j];
          check(e <= 2.01 && e >= -2.01,
                $sformatf("W[%0d][%0d]=%0d expected %f", i, j, w_rdata, W[i][j]));
          W[i][j] = real'(w_rdata);
        end
      end
    end
    $display("coverage fire=%0d pre=%0d post=%0d sat=%0d connect=%0d reconf=%0d stall=%0d",
             n_fire, n_pre, n_post, n_sat, n_conn, n_reconf, n_stall);
    check(n_fire > 0, "firing happened");
    check(n_pre > 0, "pre-synaptic STDP happened");
    check(n_post > 0, "post-synaptic STDP happened");
    check(n_sat > 0, "weight saturation happened");
    check(n_conn > 0, "switch-box reconfiguration happened");
    check(n_reconf > 0, "link reconfiguration happened");
    check(n_stall > 0, "channel stall happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

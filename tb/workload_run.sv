// workload_run: drives one snn_cgra_top of NCL clusters x NC cells through
// two rounds in which every neuron fires, and checks the one-to-all delivery:
// N(N-1) pre-synaptic updates and N*N post-synaptic loop steps per round,
// one switch-box reconfiguration per pair of cells and one link
// reconfiguration per cluster, and after round two every weight W[i][j]
// (j != i) raised from 60 to 124 by potentiation at dt = 1 while W[i][i]
// stays 60. It reports the cycles of each round. Used by tb_workload_sizes.
module workload_run
  import snn_pkg::*;
#(
  parameter int NCL = 4,
  parameter int NC  = 6
) (
  input  logic clk,
  input  logic rst_n,
  output logic finished,
  output int   checks,
  output int   failures
);
  localparam int N = NCL * NC;
  localparam int NW = $clog2(N);
  localparam int PAIRS = (NC + 1) / 2;
  logic run = 0, prog_we = 0, w_we = 0;
  logic [5:0] prog_addr = 0, w_addr = 0;
  logic [INSTR_W-1:0] prog_data = 0;
  logic [NW-1:0] w_neuron = 0;
  logic signed [15:0] w_wdata = 0, w_rdata;
  logic signed [15:0] ext_i [N];
  logic [15:0] out_stamp [N];
  logic signed [15:0] v [N];
  logic [15:0] round_cnt;
  logic round_done, idle;
  logic [N-1:0] ev_fire, ev_pre_stdp, ev_post_stdp, ev_sat;
  logic [NCL-1:0] ev_connect;
  logic ev_reconf, ev_stall;
  int n_pre = 0, n_post = 0, n_conn = 0, n_reconf = 0, n_fire = 0;

  snn_cgra_top #(.N_CLUSTERS(NCL), .N_CELLS(NC)) dut (.*);

  always @(posedge clk) begin
    n_pre    += $countones(ev_pre_stdp);
    n_post   += $countones(ev_post_stdp);
    n_conn   += $countones(ev_connect);
    n_reconf += int'(ev_reconf);
    n_fire   += $countones(ev_fire);
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL N=%0d: %s", N, msg); end
  endtask

  initial begin
    checks = 0; failures = 0; finished = 0;
    for (int i = 0; i < N; i++) ext_i[i] = 16'sd400;
    @(posedge rst_n);
    for (int p = 0; p < PAIRS; p++) begin
      int a, b;
      a = 2 * p; b = (2 * p + 1 < NC) ? 2 * p + 1 : 2 * p;
      @(negedge clk); prog_we = 1; prog_addr = 6'(3*p);   prog_data = i_connect(4'(a), 4'(b));
      @(negedge clk); prog_we = 1; prog_addr = 6'(3*p+1); prog_data = i_read();
      @(negedge clk); prog_we = 1; prog_addr = 6'(3*p+2); prog_data = i_combine(6'(a), 6'(b));
    end
    @(negedge clk); prog_we = 1; prog_addr = 6'(3 * PAIRS); prog_data = i_done();
    @(negedge clk); prog_we = 0;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        @(negedge clk); w_we = 1; w_neuron = NW'(i); w_addr = 6'(j); w_wdata = 16'sd60;
      end
    @(negedge clk); w_we = 0;
    for (int r = 0; r < 2; r++) begin
      int cyc, p0, q0, c0, r0, f0;
      p0 = n_pre; q0 = n_post; c0 = n_conn; r0 = n_reconf; f0 = n_fire;
      @(negedge clk); run = 1;
      @(negedge clk); run = 0;
      cyc = 1;
      while (!round_done) begin @(negedge clk); cyc++; end
      $display("workload N=%0d (%0d clusters x %0d cells) round %0d: %0d cycles", N, NCL, NC, r + 1, cyc);
      check(n_fire - f0 == N, "every neuron fires");
      check(n_pre - p0 == N * (N - 1), $sformatf("pre-synaptic updates %0d", n_pre - p0));
      check(n_post - q0 == N * N, $sformatf("post-synaptic loop steps %0d", n_post - q0));
      check(n_conn - c0 == NCL * PAIRS, "switch-box reconfigurations");
      check(n_reconf - r0 == NCL, "link reconfigurations");
      for (int i = 0; i < N; i++) check(int'(out_stamp[i]) == r + 1, "stamp");
    end
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        @(negedge clk); w_neuron = NW'(i); w_addr = 6'(j);
        @(negedge clk);
        check(int'(w_rdata) == ((i == j) ? 60 : 124), $sformatf("W[%0d][%0d]=%0d", i, j, w_rdata));
      end
    finished = 1;
  end
endmodule

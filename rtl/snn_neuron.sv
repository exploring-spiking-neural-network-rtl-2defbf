// snn_neuron: neuron and synapses of one enhanced cell (register file + DPU +
// counter + STDP + state machine). It keeps, per source neuron j:
//   A[j]  time stamp of the last spike received from j (a register file)
//   W[j]  synaptic weight from j (a second register file)
// and T_post, the stamp of its own last spike.
// Pre-synaptic spike (pre_valid with pre_src = j, pre_stamp = t, t > 0):
//   A[j] <- t on acceptance; then T_post is fetched, dt = T_post - t goes
//   through STDP (dt = 0 when no post spike yet), W[j] <- W[j] + dw and the old
//   W[j] is added to the input current of the coming time step.
// Time step (step pulse, only while idle): the LIF DPU integrates the
//   accumulated current plus ext_i. If it fires, out_stamp and T_post take the
//   step number (counter - 1) and the post loop runs STDP with
//   dt = T_post - A[j] for every j < n_syn (dt = 0 where A[j] is 0).
// A spike whose source is this neuron, or whose stamp is 0, is dropped.
// Weights saturate to [0, W_MAX]. out_stamp holds this step's stamp, 0 if the
// neuron did not fire, until the next step. busy is high from a step or an
// accepted spike until processing is over; spikes and steps are taken only
// while busy is low. The weight port loads or reads W[j] at any time outside
// a weight update (one-cycle read latency).
// The data path and the sequence of operations follow the design; the value
// widths, the filtering of self and empty spikes, the weight bounds and the
// use of the old weight as synaptic input are this design's choices.
module snn_neuron
  import snn_pkg::*;
#(
  parameter int unsigned N_SYN     = 64,             // synapses held (register-file depth)
  parameter logic signed [15:0] W_MAX = 16'sd1024,   // weight bound (4.0 in Q8.8)
  parameter logic signed [15:0] A_BIAS = 16'sd16,
  parameter int unsigned B_SHIFT   = 3,
  parameter logic signed [15:0] THETA = 16'sd256,
  parameter int unsigned A_PLUS    = 64,
  parameter int unsigned A_MINUS   = 64,
  parameter int unsigned TAU_PLUS  = 20,
  parameter int unsigned TAU_MINUS = 20,
  localparam int unsigned AW = $clog2(N_SYN)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [AW-1:0]      self_id,
  input  logic [AW:0]        n_syn,
  // incoming spike
  input  logic               pre_valid,
  input  logic [AW-1:0]      pre_src,
  input  logic [15:0]        pre_stamp,
  // time step
  input  logic               step,
  input  logic signed [15:0] ext_i,
  output logic [15:0]        out_stamp,
  output logic signed [15:0] v,
  output logic               busy,
  // weight load / read
  input  logic               w_we,
  input  logic [AW-1:0]      w_addr,
  input  logic signed [15:0] w_wdata,
  output logic signed [15:0] w_rdata,
  // activity (one-cycle pulses)
  output logic               ev_fire,
  output logic               ev_pre_stdp,
  output logic               ev_post_stdp,
  output logic               ev_sat
);
  snn_state_e       state;
  logic [AW:0]      ctr;
  logic             pre_accept, post_accept, stdp_start, fsm_we, fsm_busy;
  logic             stdp_done, stdp_busy;
  logic signed [15:0] dw, dt;
  logic [15:0]      count, t_post;
  logic [AW-1:0]    src_r;
  logic [15:0]      stamp_r;
  logic             fire, step_d;
  logic signed [15:0] i_acc;
  logic [15:0]      a_rd, a_unused;
  logic signed [15:0] w_rd0, w_new;
  logic signed [16:0] w_sum;
  logic             pre_ok;

  assign pre_ok = pre_valid && (pre_stamp != 16'd0) && (pre_src != self_id)
               && !busy && !step;

  time_counter #(.W(16)) u_ctr (
    .clk, .rst_n, .clear(1'b0), .step, .count
  );

  lif_dpu #(.DATA_W(16), .A_BIAS(A_BIAS), .B_SHIFT(B_SHIFT), .THETA(THETA)) u_dpu (
    .clk, .rst_n, .step, .i_syn(16'(i_acc + ext_i)), .v, .fire
  );

  snn_fsm #(.CTR_W(AW+1)) u_fsm (
    .clk, .rst_n, .pre_req(pre_ok), .post_req(fire), .stdp_done,
    .n_syn, .state, .ctr, .pre_accept, .post_accept, .stdp_start,
    .w_we(fsm_we), .busy(fsm_busy)
  );

  // Synapse index the state machine works on.
  logic [AW-1:0] syn_idx;
  logic          post_path;
  assign post_path = (state == S_CTR_START) || (state == S_FETCH_PRE) ||
                     (state == S_STDP_POST) || (state == S_WUPD_POST) ||
                     (state == S_CTR_INC);
  assign syn_idx   = post_path ? ctr[AW-1:0] : src_r;

  // A[N]: port 0 stores arriving stamps, port 1 is read by the post loop.
  regfile #(.DEPTH(N_SYN), .DATA_W(16)) u_pre_tab (
    .clk, .rst_n,
    .we0(pre_accept), .addr0(pre_src), .wdata0(pre_stamp), .rdata0(a_unused),
    .we1(1'b0), .addr1(syn_idx), .wdata1(16'd0), .rdata1(a_rd)
  );

  // W[N]: port 0 belongs to the state machine, port 1 to the weight port.
  regfile #(.DEPTH(N_SYN), .DATA_W(16)) u_w_tab (
    .clk, .rst_n,
    .we0(fsm_we), .addr0(syn_idx), .wdata0(w_new), .rdata0(w_rd0),
    .we1(w_we && !fsm_we), .addr1(w_addr), .wdata1(w_wdata), .rdata1(w_rdata)
  );

  // Time difference for the STDP unit (0 when one side never spiked).
  always_comb begin
    if (post_path) dt = (a_rd == 16'd0 || t_post == 16'd0) ? 16'sd0 : 16'(t_post - a_rd);
    else           dt = (t_post == 16'd0) ? 16'sd0 : 16'(t_post - stamp_r);
  end

  stdp_unit #(.A_PLUS(A_PLUS), .A_MINUS(A_MINUS), .TAU_PLUS(TAU_PLUS),
              .TAU_MINUS(TAU_MINUS)) u_stdp (
    .clk, .rst_n, .start(stdp_start), .dt, .dw, .busy(stdp_busy), .done(stdp_done)
  );

  always_comb begin
    w_sum = 17'(w_rd0) + 17'(dw);
    if (w_sum > 17'(W_MAX))  w_new = W_MAX;
    else if (w_sum < 17'sd0) w_new = 16'sd0;
    else                     w_new = w_sum[15:0];
  end

  assign busy = fsm_busy || step_d || fire;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      src_r <= '0; stamp_r <= '0; t_post <= '0; out_stamp <= '0;
      i_acc <= '0; step_d <= 1'b0;
    end else begin
      step_d <= step;
      if (pre_accept) begin
        src_r   <= pre_src;
        stamp_r <= pre_stamp;
      end
      if (state == S_WUPD_PRE) i_acc <= 16'(i_acc + w_rd0);
      if (step) begin
        i_acc     <= '0;
        out_stamp <= '0;
      end
      if (fire) begin
        out_stamp <= count - 16'd1;
        t_post    <= count - 16'd1;
      end
    end
  end

  assign ev_fire      = fire;
  assign ev_pre_stdp  = stdp_done && !post_path;
  assign ev_post_stdp = stdp_done && post_path;
  assign ev_sat       = fsm_we && (w_sum > 17'(W_MAX) || w_sum < 17'sd0);

  // Handshake rules between the state machine, the neuron and the STDP unit.
  a_post_from_fire: assert property (@(posedge clk) disable iff (!rst_n) post_accept |-> fire);
  a_stdp_free:      assert property (@(posedge clk) disable iff (!rst_n) stdp_start |-> !stdp_busy);
  a_ctr_in_table:   assert property (@(posedge clk) disable iff (!rst_n) int'(ctr) < N_SYN);
endmodule

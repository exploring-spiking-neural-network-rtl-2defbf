// snn_fsm: state machine that sequences the synaptic processing of a neuron.
// Pre-synaptic spike: Idle -> Fetch post spike -> STDP -> Weight update -> Idle.
// Post-synaptic spike (the neuron fired): Idle -> Ctr start -> Fetch pre spike
// -> STDP -> Weight update -> Ctr++ -> back to Fetch pre spike while
// Ctr < Nern, or to Idle when Ctr = Nern, so every synapse is revisited.
// The states and the Ctr < Nern / Ctr = Nern loop follow the design. This
// design's choices: a post-synaptic request wins over a pre-synaptic one in
// the same cycle; each Fetch state lasts one cycle (the register-file read
// latency); stdp_start pulses in the first cycle of an STDP state and the
// machine waits there for stdp_done; each Weight update lasts one cycle.
// Interface: pre_accept / post_accept pulse when a request is taken; busy is
// high outside Idle; ctr addresses the synapse in the post loop.
module snn_fsm
  import snn_pkg::*;
#(
  parameter int unsigned CTR_W = 7
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             pre_req,
  input  logic             post_req,
  input  logic             stdp_done,
  input  logic [CTR_W-1:0] n_syn,       // Nern: number of synapses to revisit
  output snn_state_e       state,
  output logic [CTR_W-1:0] ctr,
  output logic             pre_accept,
  output logic             post_accept,
  output logic             stdp_start,
  output logic             w_we,        // write the updated weight this cycle
  output logic             busy
);
  logic stdp_first;

  assign pre_accept  = (state == S_IDLE) && pre_req && !post_req;
  assign post_accept = (state == S_IDLE) && post_req;
  assign stdp_start  = stdp_first && (state == S_STDP_PRE || state == S_STDP_POST);
  assign w_we        = (state == S_WUPD_PRE) || (state == S_WUPD_POST);
  assign busy        = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      ctr        <= '0;
      stdp_first <= 1'b0;
    end else begin
      stdp_first <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (post_req)     state <= S_CTR_START;
          else if (pre_req) state <= S_FETCH_POST;
        end
        S_FETCH_POST: begin state <= S_STDP_PRE; stdp_first <= 1'b1; end
        S_STDP_PRE:   if (stdp_done) state <= S_WUPD_PRE;
        S_WUPD_PRE:   state <= S_IDLE;
        S_CTR_START: begin
          ctr   <= '0;
          state <= (n_syn == '0) ? S_IDLE : S_FETCH_PRE;
        end
        S_FETCH_PRE:  begin state <= S_STDP_POST; stdp_first <= 1'b1; end
        S_STDP_POST:  if (stdp_done) state <= S_WUPD_POST;
        S_WUPD_POST:  state <= S_CTR_INC;
        S_CTR_INC: begin
          if (ctr + 1'b1 < n_syn) begin
            ctr   <= ctr + 1'b1;
            state <= S_FETCH_PRE;
          end else begin
            state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The post loop never addresses a synapse beyond Nern.
  a_ctr_range: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_FETCH_PRE) |-> (ctr < n_syn));
endmodule

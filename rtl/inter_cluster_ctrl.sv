// inter_cluster_ctrl: serial exchange between the intermediate nodes of the
// clusters. Clusters take turns in order 0, 1, ..., N_CLUSTERS-1. For each,
// the circuit-switched link is first reconfigured (2 cycles), then the words
// the node collected are sent one by one: a read cycle addresses the node's
// register file, and a transmit cycle puts (source neuron, stamp) on the
// spike channel that reaches every neuron, so the network is connected one to
// all. A transmit waits while any neuron reports busy (stall); empty stamps
// (0) are skipped without waiting. done pulses when every word has been sent.
// Serial node-to-node exchange with 2 reconfiguration cycles and 1 transmit
// cycle follows the design; the shared spike channel, the read cycle and the
// busy back-pressure are this design's choices.
module inter_cluster_ctrl #(
  parameter int unsigned N_CLUSTERS = 4,
  parameter int unsigned N_CELLS    = 6,
  localparam int unsigned CW = (N_CLUSTERS > 1) ? $clog2(N_CLUSTERS) : 1,
  localparam int unsigned NW = $clog2(N_CLUSTERS * N_CELLS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          nodes_busy,            // some neuron cannot take a spike
  input  logic [15:0]   hub_rdata [N_CLUSTERS],
  output logic [5:0]    hub_raddr,
  output logic          spk_valid,
  output logic [NW-1:0] spk_src,
  output logic [15:0]   spk_stamp,
  output logic          done,
  output logic          busy,
  output logic          ev_reconf,            // pulse per link reconfiguration
  output logic          ev_stall              // pulse per cycle a transmit waits
);
  typedef enum logic [2:0] {X_IDLE, X_RECONF1, X_RECONF2, X_READ, X_TX} xst_e;
  xst_e st;
  logic [CW-1:0] cl;
  logic [5:0]    ent;
  logic [15:0]   word;

  assign word      = hub_rdata[cl];
  assign hub_raddr = ent;
  assign busy      = (st != X_IDLE);
  assign spk_valid = (st == X_TX) && (word != 16'd0) && !nodes_busy;
  assign spk_src   = NW'(int'(cl) * N_CELLS + int'(ent));
  assign spk_stamp = word;
  assign ev_reconf = (st == X_RECONF1);
  assign ev_stall  = (st == X_TX) && (word != 16'd0) && nodes_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= X_IDLE; cl <= '0; ent <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        X_IDLE: if (start) begin
          cl  <= '0;
          ent <= '0;
          st  <= X_RECONF1;
        end
        X_RECONF1: st <= X_RECONF2;
        X_RECONF2: st <= X_READ;
        X_READ:    st <= X_TX;
        X_TX: if (word == 16'd0 || !nodes_busy) begin
          if (int'(ent) + 1 < N_CELLS) begin
            ent <= ent + 6'd1;
            st  <= X_READ;
          end else if (int'(cl) + 1 < N_CLUSTERS) begin
            cl  <= cl + 1'b1;
            ent <= '0;
            st  <= X_RECONF1;
          end else begin
            st   <= X_IDLE;
            done <= 1'b1;
          end
        end
        default: st <= X_IDLE;
      endcase
    end
  end
endmodule

// snn_cgra_top: a spiking neural network mapped onto a coarse-grain
// reconfigurable array. N_CLUSTERS clusters of N_CELLS cells each; every cell
// runs one leaky integrate-and-fire neuron with STDP-learning synapses from
// all neurons (snn_neuron), and every cluster has an intermediate node
// (cluster_hub) that gathers the cluster's spike stamps two cells at a time.
// The nodes then send their stamps serially (inter_cluster_ctrl) on a spike
// channel that reaches all neurons, which gives one-to-all connectivity.
// The network advances in rounds, repeated while run is high:
//   STEP      every neuron integrates and may fire; firing starts the
//             post-synaptic STDP loop over its synapses
//   COLLECT   all intermediate nodes run their sequencer program
//   EXCHANGE  every non-empty stamp is delivered to every neuron, each one
//             starting the pre-synaptic STDP update of that synapse
// Each phase starts when the previous one has finished everywhere.
// Before running, the same sequencer program is loaded into every node
// (prog_*) and weights may be loaded or read per neuron (w_*). Neuron k of
// cluster c has index c*N_CELLS + k. The cluster arrangement, time-division
// collection and serial exchange follow the design; the round structure and
// the load/read ports are this design's choices.
module snn_cgra_top
  import snn_pkg::*;
#(
  parameter int unsigned N_CLUSTERS = 4,
  parameter int unsigned N_CELLS    = 6,
  localparam int unsigned N  = N_CLUSTERS * N_CELLS,
  localparam int unsigned NW = $clog2(N)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               run,
  // sequencer program, written into every intermediate node
  input  logic               prog_we,
  input  logic [5:0]         prog_addr,
  input  logic [INSTR_W-1:0] prog_data,
  // weight load / read: W[w_addr] of neuron w_neuron
  input  logic               w_we,
  input  logic [NW-1:0]      w_neuron,
  input  logic [5:0]         w_addr,
  input  logic signed [15:0] w_wdata,
  output logic signed [15:0] w_rdata,
  // neuron inputs and outputs
  input  logic signed [15:0] ext_i     [N],
  output logic [15:0]        out_stamp [N],
  output logic signed [15:0] v         [N],
  output logic [15:0]        round_cnt,
  output logic               round_done,
  output logic               idle,
  // activity, one-cycle pulses
  output logic [N-1:0]          ev_fire,
  output logic [N-1:0]          ev_pre_stdp,
  output logic [N-1:0]          ev_post_stdp,
  output logic [N-1:0]          ev_sat,
  output logic [N_CLUSTERS-1:0] ev_connect,
  output logic                  ev_reconf,
  output logic                  ev_stall
);
  typedef enum logic [2:0] {R_IDLE, R_STEP, R_WAIT_STEP, R_COLLECT, R_WAIT_COLLECT,
                            R_EXCH, R_WAIT_EXCH} rst_e;
  rst_e rs;

  logic [N-1:0]          n_busy;
  logic [N_CLUSTERS-1:0] h_running, h_done;
  logic                  step, hub_start, x_start, x_done, x_busy;
  logic                  spk_valid;
  logic [NW-1:0]         spk_src;
  logic [15:0]           spk_stamp;
  logic [5:0]            hub_raddr;
  logic [15:0]           hub_rdata [N_CLUSTERS];
  logic signed [15:0]    w_rd [N];

  assign step      = (rs == R_STEP);
  assign hub_start = (rs == R_COLLECT);
  assign x_start   = (rs == R_EXCH);
  assign idle      = (rs == R_IDLE);

  for (genvar c = 0; c < N_CLUSTERS; c++) begin : g_cl
    logic [WORD_W-1:0] cell_words [N_CELLS];
    for (genvar k = 0; k < N_CELLS; k++) begin : g_cell
      localparam int unsigned IDX = c * N_CELLS + k;
      snn_neuron u_neuron (
        .clk, .rst_n,
        .self_id(6'(IDX)), .n_syn(7'(N)),
        .pre_valid(spk_valid), .pre_src(6'(spk_src)), .pre_stamp(spk_stamp),
        .step, .ext_i(ext_i[IDX]), .out_stamp(out_stamp[IDX]), .v(v[IDX]),
        .busy(n_busy[IDX]),
        .w_we(w_we && w_neuron == NW'(IDX)), .w_addr, .w_wdata, .w_rdata(w_rd[IDX]),
        .ev_fire(ev_fire[IDX]), .ev_pre_stdp(ev_pre_stdp[IDX]),
        .ev_post_stdp(ev_post_stdp[IDX]), .ev_sat(ev_sat[IDX])
      );
      assign cell_words[k] = out_stamp[IDX];
    end
    cluster_hub #(.N_CELLS(N_CELLS)) u_hub (
      .clk, .rst_n, .cell_data(cell_words),
      .load_we(prog_we), .load_addr(prog_addr), .load_data(prog_data),
      .start(hub_start), .done(h_done[c]), .running(h_running[c]),
      .rd_addr(hub_raddr), .rd_data(hub_rdata[c]), .ev_connect(ev_connect[c])
    );
  end

  inter_cluster_ctrl #(.N_CLUSTERS(N_CLUSTERS), .N_CELLS(N_CELLS)) u_x (
    .clk, .rst_n, .start(x_start), .nodes_busy(|n_busy), .hub_rdata, .hub_raddr,
    .spk_valid, .spk_src, .spk_stamp, .done(x_done), .busy(x_busy),
    .ev_reconf, .ev_stall
  );

  assign w_rdata = w_rd[w_neuron];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rs <= R_IDLE; round_cnt <= '0; round_done <= 1'b0;
    end else begin
      round_done <= 1'b0;
      unique case (rs)
        R_IDLE:         if (run) rs <= R_STEP;
        R_STEP:         rs <= R_WAIT_STEP;
        R_WAIT_STEP:    if (n_busy == '0) rs <= R_COLLECT;
        R_COLLECT:      rs <= R_WAIT_COLLECT;
        R_WAIT_COLLECT: if (h_running == '0) rs <= R_EXCH;
        R_EXCH:         rs <= R_WAIT_EXCH;
        R_WAIT_EXCH: if (!x_busy && !x_done && n_busy == '0) begin
          round_cnt  <= round_cnt + 16'd1;
          round_done <= 1'b1;
          rs         <= run ? R_STEP : R_IDLE;
        end
        default: rs <= R_IDLE;
      endcase
    end
  end

  a_no_step_while_busy: assert property (@(posedge clk) disable iff (!rst_n)
    step |-> (n_busy == '0));
endmodule

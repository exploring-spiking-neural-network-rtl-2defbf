// cluster_hub: intermediate node of a cluster. It gathers the output words
// (spike stamps) of the N_CELLS cells of its cluster into its register file,
// although it has only two ports, by time division multiplexing driven by its
// sequencer program. Per pair of cells the program runs
//   CONNECT a,b  switch box: port A <- cell a, port B <- cell b   (1 cycle)
//   READ         latch the words on ports A and B                  (1 cycle)
//   COMBINE x,y  write latched A to register x, B to register y   (1 cycle)
// and ends with DONE, so six cells take 9 cycles plus the DONE cycle. The
// collected words are read back through rd_addr/rd_data with one-cycle
// latency while the program is not writing.
// Pairwise collection through two ports under sequencer control follows the
// design; the instruction encoding and that COMBINE stores the two words
// side by side are this design's choices.
module cluster_hub
  import snn_pkg::*;
#(
  parameter int unsigned N_CELLS = 6,
  localparam int unsigned SW = (N_CELLS > 1) ? $clog2(N_CELLS) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [WORD_W-1:0]  cell_data [N_CELLS],
  input  logic               load_we,
  input  logic [5:0]         load_addr,
  input  logic [INSTR_W-1:0] load_data,
  input  logic               start,
  output logic               done,
  output logic               running,
  input  logic [5:0]         rd_addr,
  output logic [WORD_W-1:0]  rd_data,
  output logic               ev_connect    // pulse on each switch-box reconfiguration
);
  seq_instr_t   instr;
  logic         instr_valid;
  logic [5:0]   pc;
  logic [WORD_W-1:0] port_a, port_b, lat_a, lat_b;
  logic [SW-1:0]     sel_a, sel_b;
  logic         is_connect, is_read, is_combine;
  logic [WORD_W-1:0] rdata0_unused;

  sequencer #(.DEPTH(SEQ_DEPTH)) u_seq (
    .clk, .rst_n, .load_we, .load_addr, .load_data, .start,
    .instr, .instr_valid, .running, .done, .pc
  );

  assign is_connect = instr_valid && instr.op == OP_CONNECT;
  assign is_read    = instr_valid && instr.op == OP_READ;
  assign is_combine = instr_valid && instr.op == OP_COMBINE;

  switch_box #(.N_IN(N_CELLS), .DATA_W(WORD_W)) u_sb (
    .clk, .rst_n, .cfg_we(is_connect),
    .cfg_sel_a(SW'(instr.arg[31:28])), .cfg_sel_b(SW'(instr.arg[27:24])),
    .src(cell_data), .port_a, .port_b, .sel_a, .sel_b
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lat_a <= '0;
      lat_b <= '0;
    end else if (is_read) begin
      lat_a <= port_a;
      lat_b <= port_b;
    end
  end

  regfile #(.DEPTH(RF_DEPTH), .DATA_W(WORD_W)) u_rf (
    .clk, .rst_n,
    .we0(is_combine), .addr0(instr.arg[31:26]), .wdata0(lat_a), .rdata0(rdata0_unused),
    .we1(is_combine), .addr1(is_combine ? instr.arg[25:20] : rd_addr),
    .wdata1(lat_b), .rdata1(rd_data)
  );

  assign ev_connect = is_connect;
endmodule

// switch_box: circuit-switched connection box in front of a two-port
// component. Each of the two ports (A and B) is connected to one of N_IN
// source cells, those within reach of the component. The connection is a
// configuration: it is loaded by cfg_we (from the cell's sequencer) and holds
// until reloaded, so data then passes without any per-word arbitration.
// Data goes from a source to a port combinationally; a new configuration is
// in force from the cycle after cfg_we. Circuit switching and the two ports
// follow the array; the select encoding and reset to source 0 are this
// design's choice.
module switch_box #(
  parameter int unsigned N_IN   = 6,
  parameter int unsigned DATA_W = 16,
  localparam int unsigned SW = (N_IN > 1) ? $clog2(N_IN) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cfg_we,
  input  logic [SW-1:0]     cfg_sel_a,
  input  logic [SW-1:0]     cfg_sel_b,
  input  logic [DATA_W-1:0] src [N_IN],
  output logic [DATA_W-1:0] port_a,
  output logic [DATA_W-1:0] port_b,
  output logic [SW-1:0]     sel_a,
  output logic [SW-1:0]     sel_b
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel_a <= '0;
      sel_b <= '0;
    end else if (cfg_we) begin
      sel_a <= cfg_sel_a;
      sel_b <= cfg_sel_b;
    end
  end

  always_comb begin
    port_a = '0;
    port_b = '0;
    for (int i = 0; i < N_IN; i++) begin
      if (SW'(i) == sel_a) port_a = src[i];
      if (SW'(i) == sel_b) port_b = src[i];
    end
  end

  a_sel_range: assert property (@(posedge clk) disable iff (!rst_n)
    cfg_we |-> (int'(cfg_sel_a) < N_IN && int'(cfg_sel_b) < N_IN));
endmodule

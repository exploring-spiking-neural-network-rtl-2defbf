// regfile: register file of one cell, DEPTH words with two independent
// read/write ports (port 0 and port 1), as every component of the array has
// exactly two ports. Each port reads synchronously: the word at addr appears
// on rdata one cycle after the request. A write on a port takes effect at the
// clock edge; when both ports write the same address, port 1 wins (this
// design's choice). Contents are cleared by reset so that an unwritten time
// stamp reads as 0 ("no spike"). Depth 64 follows the array; width is chosen.
module regfile #(
  parameter int unsigned DEPTH  = 64,
  parameter int unsigned DATA_W = 16,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              we0,
  input  logic [AW-1:0]     addr0,
  input  logic [DATA_W-1:0] wdata0,
  output logic [DATA_W-1:0] rdata0,
  input  logic              we1,
  input  logic [AW-1:0]     addr1,
  input  logic [DATA_W-1:0] wdata1,
  output logic [DATA_W-1:0] rdata1
);
  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
      rdata0 <= '0;
      rdata1 <= '0;
    end else begin
      if (we0) mem[addr0] <= wdata0;
      if (we1) mem[addr1] <= wdata1;
      rdata0 <= mem[addr0];
      rdata1 <= mem[addr1];
    end
  end
endmodule

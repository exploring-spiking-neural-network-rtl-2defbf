// sequencer: configware store and issue unit of a cell. It holds DEPTH
// instructions of INSTR_W bits, loaded through the load port. A start pulse
// sets the program counter to 0; from the next cycle one instruction is
// issued per cycle (instr with instr_valid) and the program counter advances
// by one, or to the target of a JUMP. A DONE instruction is not issued: it
// stops the sequencer and pulses done. Loading while running is allowed and
// takes effect when the written address is next fetched.
// 64 instructions of 36 bits follow the array; the instruction set and this
// issue timing are this design's own (see snn_pkg).
module sequencer
  import snn_pkg::*;
#(
  parameter int unsigned DEPTH = 64,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               load_we,
  input  logic [AW-1:0]      load_addr,
  input  logic [INSTR_W-1:0] load_data,
  input  logic               start,
  output seq_instr_t         instr,
  output logic               instr_valid,
  output logic               running,
  output logic               done,
  output logic [AW-1:0]      pc
);
  logic [INSTR_W-1:0] mem [DEPTH];
  seq_instr_t cur;

  assign cur         = seq_instr_t'(mem[pc]);
  assign instr       = cur;
  assign instr_valid = running && (cur.op != OP_DONE);

  always_ff @(posedge clk) begin
    if (load_we) mem[load_addr] <= load_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc      <= '0;
      running <= 1'b0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        pc      <= '0;
        running <= 1'b1;
      end else if (running) begin
        unique case (cur.op)
          OP_JUMP: pc <= cur.arg[AW-1:0];
          OP_DONE: begin
            running <= 1'b0;
            done    <= 1'b1;
          end
          default: pc <= pc + 1'b1;
        endcase
      end
    end
  end
endmodule

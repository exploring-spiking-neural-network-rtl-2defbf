// snn_pkg: types and constants shared by the spiking-neural-network extension
// of the coarse-grain reconfigurable array.
//
// Data words are 16 bits wide, the word width chosen for this design. A spike
// travels between cells as a time stamp: the number of the time step in which
// the neuron fired, with 0 reserved for "no spike". Sequencer instructions are
// 36 bits wide and 64 of them fit in a sequencer, as in the array the design
// extends; the field layout below is this design's own.
package snn_pkg;

  localparam int unsigned WORD_W  = 16;   // data word of register files, DPU and links
  localparam int unsigned INSTR_W = 36;   // sequencer instruction width
  localparam int unsigned SEQ_DEPTH = 64; // instructions per sequencer
  localparam int unsigned RF_DEPTH  = 64; // registers per register file

  typedef logic [WORD_W-1:0] word_t;

  // Sequencer opcodes (bits [35:32] of an instruction).
  typedef enum logic [3:0] {
    OP_NOP     = 4'h0,  // do nothing for one cycle
    OP_CONNECT = 4'h1,  // set both switch-box port sources: [31:28]=src A, [27:24]=src B
    OP_READ    = 4'h2,  // latch the words on ports A and B
    OP_COMBINE = 4'h3,  // write latched A to reg [31:26], latched B to reg [25:20]
    OP_JUMP    = 4'h4,  // continue at address [5:0]
    OP_DONE    = 4'h5   // raise done and stop until the next start
  } seq_op_e;

  typedef struct packed {
    seq_op_e     op;      // [35:32]
    logic [31:0] arg;     // [31:0], meaning depends on op
  } seq_instr_t;

  // States of the spike-processing state machine.
  typedef enum logic [3:0] {
    S_IDLE,        // waiting for a pre- or post-synaptic spike
    S_FETCH_POST,  // pre path: read the last post-synaptic spike time
    S_STDP_PRE,    // pre path: STDP on T_post - T_pre
    S_WUPD_PRE,    // pre path: write the new weight
    S_CTR_START,   // post path: clear the synapse counter
    S_FETCH_PRE,   // post path: read A[ctr]
    S_STDP_POST,   // post path: STDP on T_post - A[ctr]
    S_WUPD_POST,   // post path: write the new weight
    S_CTR_INC      // post path: next synapse
  } snn_state_e;

  // Instruction builders, used by testbenches and program loaders.
  function automatic logic [INSTR_W-1:0] i_connect(input logic [3:0] src_a, input logic [3:0] src_b);
    return {OP_CONNECT, src_a, src_b, 24'h0};
  endfunction
  function automatic logic [INSTR_W-1:0] i_read();
    return {OP_READ, 32'h0};
  endfunction
  function automatic logic [INSTR_W-1:0] i_combine(input logic [5:0] ra, input logic [5:0] rb);
    return {OP_COMBINE, ra, rb, 20'h0};
  endfunction
  function automatic logic [INSTR_W-1:0] i_jump(input logic [5:0] tgt);
    return {OP_JUMP, 26'h0, tgt};
  endfunction
  function automatic logic [INSTR_W-1:0] i_done();
    return {OP_DONE, 32'h0};
  endfunction

endpackage

// puf_pkg: types shared by the PUF key generator.
//
// op_e names the two operations of the key generator: enrollment (derive
// helper data from a fresh PUF response and a supplied key) and
// regeneration (recover the enrolled key from a new, noisy response and the
// stored helper data). ctrl_state_e is the state encoding of the sequencer
// that drives the Clear and Start inputs of the PUF slices. Both encodings
// are this design's own choice.
package puf_pkg;
  timeunit 1ns;
  timeprecision 1ps;

  typedef enum logic {
    OP_ENROLL = 1'b0,
    OP_REGEN  = 1'b1
  } op_e;

  typedef enum logic [2:0] {
    ST_IDLE   = 3'd0,  // waiting for a request
    ST_CLEAR  = 3'd1,  // Clear asserted: race flip-flops and arbiters reset
    ST_START  = 3'd2,  // Start raised: race launched
    ST_SETTLE = 3'd3,  // waiting for the arbiters to resolve
    ST_SAMPLE = 3'd4   // response settled, results captured
  } ctrl_state_e;
endpackage

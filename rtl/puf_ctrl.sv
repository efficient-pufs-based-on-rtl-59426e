// puf_ctrl: sequencer for one PUF evaluation.
//
// Each PUF slice is a race: after Clear has reset its two flip-flops, one
// rising edge on Start launches two nominally equal paths, and an arbiter
// records which one arrived first. This block turns an enroll or regenerate
// request into that sequence:
//   ST_IDLE  --request-->  ST_CLEAR (1 cycle, puf_clear_o high)
//            --> ST_START  (1 cycle, puf_start_o rises)
//            --> ST_SETTLE (SETTLE_CYCLES cycles, Start held high)
//            --> ST_SAMPLE (1 cycle, sample_o high; Start drops) --> ST_IDLE
// so a request seen in cycle 0 yields sample_o in cycle SETTLE_CYCLES + 3
// and busy_o is high from cycle 1 through that cycle. mode_o holds the
// requested operation for the whole sequence. Requests arriving while busy
// are ignored; enroll wins when both are raised together.
//
// The Clear and Start signals and the pulse on Start follow the slice
// diagram of the design description; the order of the steps, the settle
// time and the request priority are this design's choice.
//
// Interface: clk, rst_n (asynchronous, active low), enroll_i, regen_i in;
// puf_clear_o, puf_start_o, sample_o, mode_o, busy_o out. All outputs are
// registered state decodes.
module puf_ctrl
  import puf_pkg::*;
#(
  parameter int unsigned SETTLE_CYCLES = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic enroll_i,
  input  logic regen_i,
  output logic puf_clear_o,
  output logic puf_start_o,
  output logic sample_o,
  output op_e  mode_o,
  output logic busy_o
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned CW = (SETTLE_CYCLES > 1) ? $clog2(SETTLE_CYCLES) : 1;

  ctrl_state_e     state;
  logic [CW-1:0]   count;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= ST_IDLE;
      count  <= '0;
      mode_o <= OP_ENROLL;
    end else begin
      unique case (state)
        ST_IDLE: begin
          if (enroll_i || regen_i) begin
            mode_o <= enroll_i ? OP_ENROLL : OP_REGEN;
            state  <= ST_CLEAR;
          end
        end
        ST_CLEAR: state <= ST_START;
        ST_START: begin
          count <= '0;
          state <= (SETTLE_CYCLES == 0) ? ST_SAMPLE : ST_SETTLE;
        end
        ST_SETTLE: begin
          if (count == CW'(SETTLE_CYCLES - 1)) state <= ST_SAMPLE;
          else                                 count <= count + 1'b1;
        end
        ST_SAMPLE: state <= ST_IDLE;
        default:   state <= ST_IDLE;
      endcase
    end
  end

  assign puf_clear_o = (state == ST_CLEAR);
  assign puf_start_o = (state == ST_START) || (state == ST_SETTLE);
  assign sample_o    = (state == ST_SAMPLE);
  assign busy_o      = (state != ST_IDLE);

  // Clear and Start are never high together: the race must start from a
  // cleared slice.
  a_clear_start_excl : assert property (@(posedge clk) disable iff (!rst_n)
    !(puf_clear_o && puf_start_o));
  // Every launched race is sampled.
  a_start_then_sample : assert property (@(posedge clk) disable iff (!rst_n)
    $fell(puf_start_o) |-> sample_o);
endmodule

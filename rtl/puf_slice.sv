// puf_slice: behavioural model of one PUF slice (one response bit).
//
// This is a behavioural model, not synthesizable logic: the bit it produces
// is decided by which of two nominally identical paths is faster, a
// difference of a few picoseconds set by manufacturing variation.
//
// Structure, as in the slice diagram of the design description: two
// flip-flops (REG_0, REG_1) share Clear and are clocked by Start. Their
// outputs Q0 and Q1 reach a cross-coupled pair of gates after the path
// delays T0 and T1. The pair acts as an arbiter with outputs Z0 and Z1, and
// a multiplexer driven by the Challenge C passes Z0 (C = 1) or Z1 (C = 0)
// to the Response R.
//
// Modelling choices of this design: each flip-flop toggles (D = Q') and is
// cleared asynchronously by Clear, so the first Start edge after Clear makes
// both Q rise, Q0 after T0_PS and Q1 after T1_PS picoseconds. At every Start
// edge each path also gets a fresh uniform offset in [-JITTER_PS,
// +JITTER_PS] to model noise. Clear also sets the arbiter idle, Z0 = Z1 = 1;
// the Z of the Q that rises first goes low and the pair holds until the next
// Clear. A tie goes to Z0. Before the first Clear the state is undefined. Hence, after a race,
// R = ~C if path 0 was faster and R = C if path 1 was faster.
//
// Interface: clear, start, challenge in; response out.
// Timing: response is valid max(T0, T1) + JITTER_PS after the rising edge
// of start, and returns to 1 (both Z high) after clear.
module puf_slice #(
  parameter int unsigned T0_PS     = 1000,
  parameter int unsigned T1_PS     = 1010,
  parameter int unsigned JITTER_PS = 0
) (
  input  logic clear,
  input  logic start,
  input  logic challenge,
  output logic response
);
  timeunit 1ns;
  timeprecision 1ps;

  logic q0;
  logic q1;
  logic z0;
  logic z1;

  // Delay of one path for one race, in picoseconds.
  function automatic int unsigned path_delay(int unsigned nominal);
    int unsigned span;
    int unsigned offs;
    span = 2 * JITTER_PS + 1;
    offs = (JITTER_PS == 0) ? 0 : ($urandom % span);
    if (nominal + offs < JITTER_PS + 1) return 1;
    return nominal + offs - JITTER_PS;
  endfunction

  // REG_0: toggle flip-flop, launch path of delay T0. The process sleeps
  // for the path delay, so a Clear during a race in flight takes effect
  // only after the race has landed.
  always @(posedge start or posedge clear) begin
    if (clear) begin
      q0 <= 1'b0;
    end else begin
      logic nxt;
      nxt = ~q0;
      #(path_delay(T0_PS) * 1ps);
      q0 <= nxt;
    end
  end

  // REG_1: toggle flip-flop, launch path of delay T1.
  always @(posedge start or posedge clear) begin
    if (clear) begin
      q1 <= 1'b0;
    end else begin
      logic nxt;
      nxt = ~q1;
      #(path_delay(T1_PS) * 1ps);
      q1 <= nxt;
    end
  end

  // Cross-coupled arbiter: Clear returns it to idle, the first rising Q
  // claims it.
  always @(posedge q0 or posedge q1 or posedge clear) begin
    if (clear) begin
      z0 = 1'b1;
      z1 = 1'b1;
    end else if (z0 && z1) begin
      if (q0) z0 = 1'b0;
      else    z1 = 1'b0;
    end
  end

  // Challenge multiplexer: input 1 is Z0, input 0 is Z1.
  assign response = challenge ? z0 : z1;
endmodule

// puf_array: behavioural model of NBITS PUF slices.
//
// This is a behavioural model, because its slices are (see puf_slice). All
// slices share Clear and Start; slice i takes challenge bit i and drives
// response bit i.
//
// Manufacturing variation is stood in for by the path delays: slice i gets
//   T0 = BASE_PS + h(DEVICE_SEED, 2i)   mod SPREAD_PS
//   T1 = BASE_PS + h(DEVICE_SEED, 2i+1) mod SPREAD_PS
// where h is an integer mixing function (multiply by 0x9E3779B1, xor-shift,
// multiply by 0x85EBCA6B, xor-shift, all modulo 2^32). Different seeds are
// different devices. When the two delays of a slice come out equal, T1 is
// raised by one picosecond so that every slice has a defined winner.
// JITTER_PS adds noise at every race (see puf_slice); slices whose two
// delays lie within 2*JITTER_PS of each other then give unstable bits.
//
// One slice per response bit follows the design description; the count,
// the delay values and the seed mechanism are this design's choice.
//
// Interface: clear, start, challenge[NBITS] in; response[NBITS] out.
// Timing: response is settled BASE_PS + SPREAD_PS + JITTER_PS after the
// rising edge of start.
module puf_array #(
  parameter int unsigned NBITS       = 8,
  parameter int unsigned DEVICE_SEED = 1,
  parameter int unsigned BASE_PS     = 1000,
  parameter int unsigned SPREAD_PS   = 64,
  parameter int unsigned JITTER_PS   = 0
) (
  input  logic             clear,
  input  logic             start,
  input  logic [NBITS-1:0] challenge,
  output logic [NBITS-1:0] response
);
  timeunit 1ns;
  timeprecision 1ps;

  function automatic int unsigned mix(int unsigned seed, int unsigned idx);
    logic [31:0] x;
    x = 32'(seed) * 32'h9E37_79B1 + 32'(idx) * 32'h7FEB_352D + 32'h1234_5678;
    x = x ^ (x >> 16);
    x = x * 32'h85EB_CA6B;
    x = x ^ (x >> 13);
    x = x * 32'hC2B2_AE35;
    x = x ^ (x >> 16);
    return int'(x);
  endfunction

  for (genvar i = 0; i < NBITS; i++) begin : g_slice
    localparam int unsigned D0 = BASE_PS + mix(DEVICE_SEED, 2 * i) % SPREAD_PS;
    localparam int unsigned D1R = BASE_PS + mix(DEVICE_SEED, 2 * i + 1) % SPREAD_PS;
    localparam int unsigned D1 = (D1R == D0) ? D1R + 1 : D1R;

    puf_slice #(
      .T0_PS     (D0),
      .T1_PS     (D1),
      .JITTER_PS (JITTER_PS)
    ) u_slice (
      .clear     (clear),
      .start     (start),
      .challenge (challenge[i]),
      .response  (response[i])
    );
  end
endmodule

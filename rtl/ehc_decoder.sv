// ehc_decoder: extended Hamming (SECDED) decoder.
//
// Takes an N = 2^M bit word laid out as by ehc_encoder. The syndrome is the
// XOR of the indices p (1 .. N-1) of all set bits; the overall parity is the
// XOR of all N bits. The decision is the standard one:
//   syndrome 0, parity even       no error
//   parity odd                    single error at position "syndrome"
//                                 (0 = the overall-parity bit); corrected
//   syndrome non-zero, parity even double error: detected, not corrected
// The K data bits are then read from the non-power-of-two positions of the
// corrected word. On a double error data_o is the uncorrected data and must
// not be trusted.
//
// The correct-one/detect-two capability is what the design description asks
// of its extended Hamming code; the decoder structure is this design's.
//
// Interface: code_i (N bits) in; data_o (K bits), corrected_o and
// uncorrectable_o out.
// Timing: purely combinational, no clock.
module ehc_decoder #(
  parameter int unsigned M = 3,
  localparam int unsigned N = 1 << M,
  localparam int unsigned K = N - M - 1
) (
  input  logic [N-1:0] code_i,
  output logic [K-1:0] data_o,
  output logic         corrected_o,
  output logic         uncorrectable_o
);
  timeunit 1ns;
  timeprecision 1ps;

  logic [M-1:0] syndrome;
  logic         parity;
  logic [N-1:0] fixed;

  always_comb begin
    syndrome = '0;
    for (int unsigned p = 1; p < N; p++) begin
      if (code_i[p]) syndrome ^= M'(p);
    end
    parity = ^code_i;
  end

  always_comb begin
    fixed           = code_i;
    corrected_o     = 1'b0;
    uncorrectable_o = 1'b0;
    if (parity) begin
      fixed[syndrome] = ~code_i[syndrome];
      corrected_o     = 1'b1;
    end else if (syndrome != '0) begin
      uncorrectable_o = 1'b1;
    end
  end

  always_comb begin
    int unsigned d;
    data_o = '0;
    d      = 0;
    for (int unsigned p = 3; p < N; p++) begin
      if ((p & (p - 1)) != 0) begin
        data_o[d] = fixed[p];
        d++;
      end
    end
  end
endmodule

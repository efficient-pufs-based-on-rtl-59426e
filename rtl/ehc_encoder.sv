// ehc_encoder: extended Hamming (SECDED) encoder.
//
// Maps K = 2^M - M - 1 data bits to an N = 2^M bit codeword. Codeword bit p,
// for p = 1 .. N-1, is Hamming position p: the M parity bits sit at the
// power-of-two positions, the data bits fill the other positions in
// increasing order (data bit 0 at position 3). Parity bit 2^i is the XOR of
// every other position whose index has bit i set. Bit 0 is the overall
// parity, the XOR of bits 1 .. N-1, which lifts the minimum distance from 3
// to 4 and so adds double-error detection to single-error correction.
//
// The use of an extended Hamming code for the PUF response follows the
// design description; the code length (M = 3, the (8,4) code, by default)
// and the bit layout are this design's choice.
//
// Interface: data_i (K bits) in, code_o (N bits) out.
// Timing: purely combinational, no clock.
module ehc_encoder #(
  parameter int unsigned M = 3,
  localparam int unsigned N = 1 << M,
  localparam int unsigned K = N - M - 1
) (
  input  logic [K-1:0] data_i,
  output logic [N-1:0] code_o
);
  timeunit 1ns;
  timeprecision 1ps;

  always_comb begin
    logic [N-1:0] cw;
    int unsigned  d;
    cw = '0;
    d  = 0;
    // Scatter the data bits over the non-power-of-two positions.
    for (int unsigned p = 3; p < N; p++) begin
      if ((p & (p - 1)) != 0) begin
        cw[p] = data_i[d];
        d++;
      end
    end
    // Hamming parity bits.
    for (int unsigned i = 0; i < M; i++) begin
      for (int unsigned p = 1; p < N; p++) begin
        if (((p >> i) & 1) == 1 && p != (1 << i)) cw[1 << i] ^= cw[p];
      end
    end
    // Overall parity.
    cw[0] = ^cw[N-1:1];
    code_o = cw;
  end
endmodule

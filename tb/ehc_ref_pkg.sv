// ehc_ref_pkg: reference model of the (8,4) extended Hamming code used by
// the testbenches.
//
// The encoder is written out as explicit parity equations rather than the
// loops of the RTL, so the two can be compared:
//   c3 = d0, c5 = d1, c6 = d2, c7 = d3
//   c1 = d0^d1^d3, c2 = d0^d2^d3, c4 = d1^d2^d3, c0 = c1^...^c7
// The decoder is a brute-force nearest-codeword search over all 16
// codewords.
package ehc_ref_pkg;
  timeunit 1ns;
  timeprecision 1ps;

  function automatic logic [7:0] ref_encode84(logic [3:0] d);
    logic [7:0] c;
    c[3] = d[0];
    c[5] = d[1];
    c[6] = d[2];
    c[7] = d[3];
    c[1] = d[0] ^ d[1] ^ d[3];
    c[2] = d[0] ^ d[2] ^ d[3];
    c[4] = d[1] ^ d[2] ^ d[3];
    c[0] = c[1] ^ c[2] ^ c[3] ^ c[4] ^ c[5] ^ c[6] ^ c[7];
    return c;
  endfunction

  // Distance to the nearest codeword and the data word of one nearest
  // codeword.
  function automatic void ref_nearest84(input logic [7:0] w, output int distance,
                                        output logic [3:0] data);
    distance = 99;
    data = '0;
    for (int d = 0; d < 16; d++) begin
      int cnt;
      cnt = $countones(w ^ ref_encode84(4'(d)));
      if (cnt < distance) begin
        distance = cnt;
        data = 4'(d);
      end
    end
  endfunction
endpackage

// code_offset_fe: code-offset fuzzy extractor on the extended Hamming code.
//
// A PUF response is noisy, so it cannot be a key by itself. At enrollment a
// key word is encoded into a codeword c and the helper data h = w XOR c is
// published, w being the PUF response. At regeneration a new response
// w' = w XOR e gives w' XOR h = c XOR e, which the SECDED decoder maps back
// to the key as long as e holds at most one set bit per codeword; two set
// bits are flagged as uncorrectable. The response is split into WORDS
// independent N-bit codewords, each carrying K key bits.
//
// The code-offset construction with helper data follows the design
// description, which pairs it with an extended Hamming code; WORDS and the
// split into words are this design's choice.
//
// Interface: resp_i, key_i, helper_i in; helper_o (enrollment result) and
// key_o, corrected_o, uncorrectable_o (regeneration result) out. Both
// results are computed at once from the same response.
// Timing: purely combinational, no clock.
module code_offset_fe #(
  parameter int unsigned M     = 3,
  parameter int unsigned WORDS = 1,
  localparam int unsigned N = 1 << M,
  localparam int unsigned K = N - M - 1
) (
  input  logic [WORDS*N-1:0] resp_i,
  input  logic [WORDS*K-1:0] key_i,
  input  logic [WORDS*N-1:0] helper_i,
  output logic [WORDS*N-1:0] helper_o,
  output logic [WORDS*K-1:0] key_o,
  output logic [WORDS-1:0]   corrected_o,
  output logic [WORDS-1:0]   uncorrectable_o
);
  timeunit 1ns;
  timeprecision 1ps;

  for (genvar w = 0; w < WORDS; w++) begin : g_word
    logic [N-1:0] code;
    logic [N-1:0] noisy_code;

    ehc_encoder #(.M(M)) u_enc (
      .data_i (key_i[w*K +: K]),
      .code_o (code)
    );

    assign helper_o[w*N +: N] = resp_i[w*N +: N] ^ code;
    assign noisy_code         = resp_i[w*N +: N] ^ helper_i[w*N +: N];

    ehc_decoder #(.M(M)) u_dec (
      .code_i          (noisy_code),
      .data_o          (key_o[w*K +: K]),
      .corrected_o     (corrected_o[w]),
      .uncorrectable_o (uncorrectable_o[w])
    );
  end
endmodule

// ehc_puf_top: PUF key generator with extended Hamming error correction.
//
// An array of race PUF slices produces one device-unique but noisy bit per
// slice. An extended Hamming (SECDED) code-offset fuzzy extractor turns it
// into a stable key: enrollment publishes helper data = response XOR
// Enc(key); regeneration decodes new response XOR helper data back to the
// key, correcting one flipped response bit and flagging two per codeword.
//
//   enroll_i/regen_i -> puf_ctrl --Clear/Start--> puf_array --response-->
//   code_offset_fe -> result registers (helper_o | key_o + flags)
//
// puf_array is a behavioural model (race timing); everything else is
// synthesizable. The slice structure and the use of an extended Hamming code
// follow the design description; the code length (M = 3, one (8,4) codeword
// per WORDS), the sequencing and the register interface are this design's.
//
// Operation: pulse enroll_i (with key_i and challenge_i) or regen_i (with
// helper_i and the same challenge_i) for one cycle while busy_o is low.
// SETTLE_CYCLES + 4 cycles later helper_valid_o (enroll) or key_valid_o
// (regenerate) pulses for one cycle; helper_o, key_o, corrected_o and
// uncorrectable_o then hold until the next operation of the same kind.
// key_i, helper_i and challenge_i must be stable while busy_o is high.
// Start is high for SETTLE_CYCLES + 1 clock periods before the response is
// captured, and that time must exceed the slowest slice race including
// jitter (at most 1.064 ns plus JITTER_PS with the model's default delays).
module ehc_puf_top
  import puf_pkg::*;
#(
  parameter int unsigned M             = 3,
  parameter int unsigned WORDS         = 1,
  parameter int unsigned SETTLE_CYCLES = 4,
  parameter int unsigned DEVICE_SEED   = 1,
  parameter int unsigned JITTER_PS     = 0,
  localparam int unsigned N = 1 << M,
  localparam int unsigned K = N - M - 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               enroll_i,
  input  logic               regen_i,
  input  logic [WORDS*N-1:0] challenge_i,
  input  logic [WORDS*K-1:0] key_i,
  input  logic [WORDS*N-1:0] helper_i,
  output logic [WORDS*N-1:0] helper_o,
  output logic               helper_valid_o,
  output logic [WORDS*K-1:0] key_o,
  output logic               key_valid_o,
  output logic [WORDS-1:0]   corrected_o,
  output logic [WORDS-1:0]   uncorrectable_o,
  output logic               busy_o
);
  timeunit 1ns;
  timeprecision 1ps;

  logic               puf_clear;
  logic               puf_start;
  logic               sample;
  op_e                mode;
  logic [WORDS*N-1:0] response;
  logic [WORDS*N-1:0] fe_helper;
  logic [WORDS*K-1:0] fe_key;
  logic [WORDS-1:0]   fe_corrected;
  logic [WORDS-1:0]   fe_uncorrectable;

  puf_ctrl #(.SETTLE_CYCLES(SETTLE_CYCLES)) u_ctrl (
    .clk         (clk),
    .rst_n       (rst_n),
    .enroll_i    (enroll_i),
    .regen_i     (regen_i),
    .puf_clear_o (puf_clear),
    .puf_start_o (puf_start),
    .sample_o    (sample),
    .mode_o      (mode),
    .busy_o      (busy_o)
  );

  puf_array #(
    .NBITS       (WORDS * N),
    .DEVICE_SEED (DEVICE_SEED),
    .JITTER_PS   (JITTER_PS)
  ) u_puf (
    .clear     (puf_clear),
    .start     (puf_start),
    .challenge (challenge_i),
    .response  (response)
  );

  code_offset_fe #(.M(M), .WORDS(WORDS)) u_fe (
    .resp_i          (response),
    .key_i           (key_i),
    .helper_i        (helper_i),
    .helper_o        (fe_helper),
    .key_o           (fe_key),
    .corrected_o     (fe_corrected),
    .uncorrectable_o (fe_uncorrectable)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      helper_o        <= '0;
      helper_valid_o  <= 1'b0;
      key_o           <= '0;
      key_valid_o     <= 1'b0;
      corrected_o     <= '0;
      uncorrectable_o <= '0;
    end else begin
      helper_valid_o <= sample && (mode == OP_ENROLL);
      key_valid_o    <= sample && (mode == OP_REGEN);
      if (sample && mode == OP_ENROLL) helper_o <= fe_helper;
      if (sample && mode == OP_REGEN) begin
        key_o           <= fe_key;
        corrected_o     <= fe_corrected;
        uncorrectable_o <= fe_uncorrectable;
      end
    end
  end
endmodule

// tb_ehc_puf_top: end-to-end test of the PUF key generator.
//
// Two (8,4) codewords (16 slices), path jitter of 12 ps so that some slices
// give unstable bits, and 2 settle cycles. One enrollment with a random key
// is followed by many regenerations with the returned helper data. The raw
// response of each operation is read from inside the design at the sample
// strobe; the testbench compares it with the enrolled response and, per
// word, predicts the outcome: no flip gives the key and no flag, one flip
// gives the key with corrected set, two flips give uncorrectable. Words with
// three or more flips are beyond the code and only counted. It also checks
// the helper data against response XOR the reference encoding of the key,
// and the request-to-valid latency of SETTLE_CYCLES + 4 cycles. Each
// mechanism (enrollment, clean regeneration, corrected word, detected
// double error) must occur at least once.
module tb_ehc_puf_top;
  timeunit 1ns;
  timeprecision 1ps;
  import ehc_ref_pkg::*;

  localparam int WORDS  = 2;
  localparam int SETTLE = 2;
  localparam int NB     = WORDS * 8;
  localparam int NK     = WORDS * 4;
  localparam int REGENS = 400;

  int checks = 0;
  int failures = 0;

  logic          clk = 1'b0;
  logic          rst_n;
  logic          enroll, regen;
  logic [NB-1:0] challenge, helper_in, helper_out;
  logic [NK-1:0] key_in, key_out;
  logic          helper_valid, key_valid, busy;
  logic [WORDS-1:0] cor, unc;

  ehc_puf_top #(
    .M (3), .WORDS (WORDS), .SETTLE_CYCLES (SETTLE), .DEVICE_SEED (7), .JITTER_PS (12)
  ) dut (
    .clk (clk), .rst_n (rst_n), .enroll_i (enroll), .regen_i (regen),
    .challenge_i (challenge), .key_i (key_in), .helper_i (helper_in),
    .helper_o (helper_out), .helper_valid_o (helper_valid),
    .key_o (key_out), .key_valid_o (key_valid),
    .corrected_o (cor), .uncorrectable_o (unc), .busy_o (busy)
  );

  always #5 clk = ~clk;

  // Raw response captured when the design samples it.
  logic [NB-1:0] raw;
  always @(posedge clk) if (dut.sample) raw <= dut.response;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Pulse a request and wait for the valid strobe; return the latency.
  task automatic op(input logic is_enroll, output int lat);
    @(negedge clk);
    enroll = is_enroll;
    regen  = ~is_enroll;
    @(negedge clk);
    enroll = 1'b0;
    regen  = 1'b0;
    lat = 1;
    while (!(is_enroll ? helper_valid : key_valid) && lat < 100) begin
      @(negedge clk);
      lat++;
    end
  endtask

  initial begin
    logic [NB-1:0] enrolled;
    logic [NK-1:0] key;
    logic [NB-1:0] helper;
    int            lat;
    static int n_clean = 0, n_corr = 0, n_double = 0, n_beyond = 0, n_enroll = 0;

    rst_n     = 1'b0;
    enroll    = 1'b0;
    regen     = 1'b0;
    challenge = NB'($urandom);
    key       = NK'($urandom);
    key_in    = key;
    helper_in = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    op(1'b1, lat);
    n_enroll++;
    enrolled = raw;
    helper   = helper_out;
    checks++;
    if (lat != SETTLE + 4) begin
      failures++;
      $display("enroll latency %0d, expected %0d", lat, SETTLE + 4);
    end
    for (int w = 0; w < WORDS; w++) begin
      checks++;
      if (helper[w*8 +: 8] !== (enrolled[w*8 +: 8] ^ ref_encode84(key[w*4 +: 4]))) begin
        failures++;
        $display("helper word %0d %h, response %h key %h", w, helper[w*8 +: 8],
                 enrolled[w*8 +: 8], key[w*4 +: 4]);
      end
    end

    helper_in = helper;
    key_in    = ~key;  // not used by regeneration
    for (int t = 0; t < REGENS; t++) begin
      op(1'b0, lat);
      checks++;
      if (lat != SETTLE + 4) begin
        failures++;
        $display("regen latency %0d, expected %0d", lat, SETTLE + 4);
      end
      for (int w = 0; w < WORDS; w++) begin
        int flips;
        flips = $countones(raw[w*8 +: 8] ^ enrolled[w*8 +: 8]);
        if (flips >= 3) begin
          n_beyond++;
          continue;
        end
        checks++;
        case (flips)
          0: begin
            n_clean++;
            if (key_out[w*4 +: 4] !== key[w*4 +: 4] || cor[w] || unc[w]) begin
              failures++;
              $display("regen %0d word %0d clean: key %h exp %h c=%b u=%b", t, w,
                       key_out[w*4 +: 4], key[w*4 +: 4], cor[w], unc[w]);
            end
          end
          1: begin
            n_corr++;
            if (key_out[w*4 +: 4] !== key[w*4 +: 4] || !cor[w] || unc[w]) begin
              failures++;
              $display("regen %0d word %0d one flip: key %h exp %h c=%b u=%b", t, w,
                       key_out[w*4 +: 4], key[w*4 +: 4], cor[w], unc[w]);
            end
          end
          default: begin
            n_double++;
            if (cor[w] || !unc[w]) begin
              failures++;
              $display("regen %0d word %0d two flips: c=%b u=%b", t, w, cor[w], unc[w]);
            end
          end
        endcase
      end
    end
    $display("enroll %0d, clean words %0d, corrected %0d, double detected %0d, beyond code %0d",
             n_enroll, n_clean, n_corr, n_double, n_beyond);
    checks++;
    if (n_clean == 0 || n_corr == 0 || n_double == 0) begin
      failures++;
      $display("a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

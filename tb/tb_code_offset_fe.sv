// tb_code_offset_fe: self-checking test of the code-offset fuzzy extractor.
//
// Two (8,4) words. For random responses and keys it checks the enrollment
// helper data against response XOR the reference encoding of the key, then
// flips 0, 1 or 2 random bits per word in the response and checks that
// regeneration returns the key with the right flags: no flag for a clean
// word, corrected for one flip, uncorrectable for two.
module tb_code_offset_fe;
  timeunit 1ns;
  timeprecision 1ps;
  import ehc_ref_pkg::*;

  localparam int WORDS = 2;

  int checks = 0;
  int failures = 0;

  logic [WORDS*8-1:0] resp, helper_in, helper_out;
  logic [WORDS*4-1:0] key_in, key_out;
  logic [WORDS-1:0]   cor, unc;

  code_offset_fe #(.M(3), .WORDS(WORDS)) dut (
    .resp_i (resp), .key_i (key_in), .helper_i (helper_in),
    .helper_o (helper_out), .key_o (key_out),
    .corrected_o (cor), .uncorrectable_o (unc)
  );

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static int seen[3] = '{0, 0, 0};
    for (int t = 0; t < 2000; t++) begin
      logic [WORDS*8-1:0] enrolled, helper;
      logic [WORDS*4-1:0] key;
      int                 nerr[WORDS];
      enrolled  = 16'($urandom);
      key       = 8'($urandom);
      resp      = enrolled;
      key_in    = key;
      helper_in = '0;
      #1;
      for (int w = 0; w < WORDS; w++) begin
        checks++;
        if (helper_out[w*8 +: 8] !== (enrolled[w*8 +: 8] ^ ref_encode84(key[w*4 +: 4]))) begin
          failures++;
          $display("helper word %0d: got %h", w, helper_out[w*8 +: 8]);
        end
      end
      helper = helper_out;
      // Regenerate from a noisy response.
      for (int w = 0; w < WORDS; w++) begin
        int p1, p2;
        logic [7:0] r;
        r       = enrolled[w*8 +: 8];
        nerr[w] = int'($urandom % 3);
        p1      = int'($urandom % 8);
        p2      = (p1 + 1 + int'($urandom % 7)) % 8;
        if (nerr[w] >= 1) r[p1] = ~r[p1];
        if (nerr[w] >= 2) r[p2] = ~r[p2];
        resp[w*8 +: 8] = r;
      end
      key_in    = 8'($urandom);  // must not matter for regeneration
      helper_in = helper;
      #1;
      for (int w = 0; w < WORDS; w++) begin
        seen[nerr[w]]++;
        checks++;
        case (nerr[w])
          0: if (key_out[w*4 +: 4] !== key[w*4 +: 4] || cor[w] || unc[w]) begin
               failures++;
               $display("word %0d clean: key %h exp %h c=%b u=%b", w, key_out[w*4 +: 4],
                        key[w*4 +: 4], cor[w], unc[w]);
             end
          1: if (key_out[w*4 +: 4] !== key[w*4 +: 4] || !cor[w] || unc[w]) begin
               failures++;
               $display("word %0d one error: key %h exp %h c=%b u=%b", w, key_out[w*4 +: 4],
                        key[w*4 +: 4], cor[w], unc[w]);
             end
          default: if (cor[w] || !unc[w]) begin
               failures++;
               $display("word %0d two errors: c=%b u=%b", w, cor[w], unc[w]);
             end
        endcase
      end
    end
    for (int i = 0; i < 3; i++) begin
      checks++;
      if (seen[i] == 0) begin
        failures++;
        $display("case with %0d errors never exercised", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

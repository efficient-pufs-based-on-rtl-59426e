// tb_ehc_puf_top_full: the key generator at its default parameters.
//
// One (8,4) codeword, no path jitter, 4 settle cycles. For several random
// keys and challenges it enrolls, checks the helper data against the raw
// response XOR the reference encoding of the key, then regenerates with
// that helper data and checks that the same key comes back with no error
// flag. Every operation must complete in SETTLE_CYCLES + 4 = 8 cycles.
module tb_ehc_puf_top_full;
  timeunit 1ns;
  timeprecision 1ps;
  import ehc_ref_pkg::*;

  int checks = 0;
  int failures = 0;

  logic       clk = 1'b0;
  logic       rst_n;
  logic       enroll, regen;
  logic [7:0] challenge, helper_in, helper_out;
  logic [3:0] key_in, key_out;
  logic       helper_valid, key_valid, busy;
  logic [0:0] cor, unc;

  ehc_puf_top dut (
    .clk (clk), .rst_n (rst_n), .enroll_i (enroll), .regen_i (regen),
    .challenge_i (challenge), .key_i (key_in), .helper_i (helper_in),
    .helper_o (helper_out), .helper_valid_o (helper_valid),
    .key_o (key_out), .key_valid_o (key_valid),
    .corrected_o (cor), .uncorrectable_o (unc), .busy_o (busy)
  );

  always #5 clk = ~clk;

  logic [7:0] raw;
  always @(posedge clk) if (dut.sample) raw <= dut.response;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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
    int lat;
    rst_n     = 1'b0;
    enroll    = 1'b0;
    regen     = 1'b0;
    challenge = '0;
    key_in    = '0;
    helper_in = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 20; t++) begin
      logic [3:0] key;
      key       = 4'($urandom);
      challenge = 8'($urandom);
      key_in    = key;
      op(1'b1, lat);
      checks++;
      if (lat != 8 || helper_out !== (raw ^ ref_encode84(key))) begin
        failures++;
        $display("enroll %0d: latency %0d helper %h response %h key %h", t, lat, helper_out,
                 raw, key);
      end
      helper_in = helper_out;
      key_in    = ~key;
      op(1'b0, lat);
      checks++;
      if (lat != 8 || key_out !== key || cor[0] || unc[0]) begin
        failures++;
        $display("regen %0d: latency %0d key %h exp %h c=%b u=%b", t, lat, key_out, key,
                 cor[0], unc[0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

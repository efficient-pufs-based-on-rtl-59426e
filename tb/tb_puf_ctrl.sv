// tb_puf_ctrl: self-checking test of the PUF sequencer.
//
// With SETTLE_CYCLES = 3 it issues enroll and regenerate requests and checks
// cycle by cycle, against a schedule worked out from the request cycle,
// that Clear is high in cycle 1, Start in cycles 2 .. SETTLE_CYCLES+2,
// sample in cycle SETTLE_CYCLES+3 and busy from 1 through SETTLE_CYCLES+3.
// It also checks mode_o, that requests made while busy are ignored, and
// that enroll wins over a simultaneous regenerate.
module tb_puf_ctrl;
  timeunit 1ns;
  timeprecision 1ps;
  import puf_pkg::*;

  localparam int S = 3;

  int checks = 0;
  int failures = 0;

  logic clk = 1'b0;
  logic rst_n;
  logic enroll, regen;
  logic clr, start, sample, busy;
  op_e  mode;

  puf_ctrl #(.SETTLE_CYCLES(S)) dut (
    .clk (clk), .rst_n (rst_n), .enroll_i (enroll), .regen_i (regen),
    .puf_clear_o (clr), .puf_start_o (start), .sample_o (sample),
    .mode_o (mode), .busy_o (busy)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Issue a request in cycle 0 and check the outputs in cycles 1 .. S+5.
  // Inside the operation the other request is raised to show it is ignored.
  task automatic run(input logic en, input logic rg, input op_e exp_mode);
    @(negedge clk);
    enroll = en;
    regen  = rg;
    @(negedge clk);
    enroll = 1'b0;
    regen  = 1'b0;
    for (int c = 1; c <= S + 5; c++) begin
      logic e_clr, e_start, e_sample, e_busy;
      e_clr    = (c == 1);
      e_start  = (c >= 2) && (c <= S + 2);
      e_sample = (c == S + 3);
      e_busy   = (c >= 1) && (c <= S + 3);
      checks++;
      if (clr !== e_clr || start !== e_start || sample !== e_sample || busy !== e_busy) begin
        failures++;
        $display("cycle %0d: clr=%b start=%b sample=%b busy=%b expected %b %b %b %b", c,
                 clr, start, sample, busy, e_clr, e_start, e_sample, e_busy);
      end
      if (e_busy) begin
        checks++;
        if (mode !== exp_mode) begin
          failures++;
          $display("cycle %0d: mode %0d expected %0d", c, mode, exp_mode);
        end
      end
      // A request in the middle of the operation must be ignored.
      if (c == 2) begin
        enroll = ~en;
        regen  = ~rg;
      end else begin
        enroll = 1'b0;
        regen  = 1'b0;
      end
      @(negedge clk);
    end
  endtask

  initial begin
    rst_n  = 1'b0;
    enroll = 1'b0;
    regen  = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    checks++;
    if (busy || clr || start || sample) begin
      failures++;
      $display("not idle after reset");
    end
    run(1'b1, 1'b0, OP_ENROLL);
    run(1'b0, 1'b1, OP_REGEN);
    run(1'b1, 1'b1, OP_ENROLL);
    run(1'b0, 1'b1, OP_REGEN);
    // No request: stays idle.
    repeat (5) begin
      @(negedge clk);
      checks++;
      if (busy) begin
        failures++;
        $display("busy without request");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_puf_slice: self-checking test of the PUF slice model.
//
// Two slices, one with the path-0 delay shorter (900 ps against 950 ps) and
// one with it longer (1100 ps against 1000 ps). For both challenge values
// it clears, raises Start and checks: the response is 1 after Clear, is
// still 1 before the faster path has arrived, and afterwards equals ~C
// when path 0 was faster and C when path 1 was faster. A third slice with a
// 10 ps difference and 40 ps jitter must give both outcomes over many
// races.
module tb_puf_slice;
  timeunit 1ns;
  timeprecision 1ps;

  int checks = 0;
  int failures = 0;

  logic clear, start, chal;
  logic r_a, r_b, r_n;

  puf_slice #(.T0_PS(900),  .T1_PS(950))  dut_a (.clear, .start, .challenge(chal), .response(r_a));
  puf_slice #(.T0_PS(1100), .T1_PS(1000)) dut_b (.clear, .start, .challenge(chal), .response(r_b));
  puf_slice #(.T0_PS(1000), .T1_PS(1010), .JITTER_PS(40))
    dut_n (.clear, .start, .challenge(chal), .response(r_n));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic race(input logic c);
    chal  = c;
    start = 1'b0;
    clear = 1'b1;
    #5;
    clear = 1'b0;
    #5;
    checks++;
    if (r_a !== 1'b1 || r_b !== 1'b1) begin
      failures++;
      $display("C=%b: not idle after clear (%b %b)", c, r_a, r_b);
    end
    start = 1'b1;
    #0.8;
    checks++;
    if (r_a !== 1'b1 || r_b !== 1'b1) begin
      failures++;
      $display("C=%b: response changed before any path arrived (%b %b)", c, r_a, r_b);
    end
    #5;
    checks++;
    if (r_a !== ~c || r_b !== c) begin
      failures++;
      $display("C=%b: got %b %b expected %b %b", c, r_a, r_b, ~c, c);
    end
    start = 1'b0;
    #5;
  endtask

  initial begin
    static int ones = 0, zeros = 0;
    clear = 1'b0;
    start = 1'b0;
    chal  = 1'b0;
    #1;
    race(1'b0);
    race(1'b1);
    race(1'b1);
    race(1'b0);
    for (int i = 0; i < 200; i++) begin
      race(1'b0);
      if (r_n) ones++;
      else     zeros++;
    end
    checks++;
    if (ones == 0 || zeros == 0) begin
      failures++;
      $display("noisy slice never flipped: %0d ones %0d zeros", ones, zeros);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

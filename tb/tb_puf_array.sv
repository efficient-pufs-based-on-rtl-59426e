// tb_puf_array: self-checking test of the PUF slice array model.
//
// For three device seeds it reads each slice's two delay parameters and
// predicts the response bit (path 0 faster gives ~C, path 1 faster gives
// C). It checks: the two delays of a slice differ and lie in
// [BASE_PS, BASE_PS + SPREAD_PS]; the response matches the prediction for
// an all-zero, an all-one and a random challenge; repeated races give the
// same response; and different seeds give different responses.
module tb_puf_array;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int NB = 16;

  int checks = 0;
  int failures = 0;

  logic          clear, start;
  logic [NB-1:0] chal;
  logic [NB-1:0] resp[3];
  int unsigned   t0[3][NB];
  int unsigned   t1[3][NB];

  puf_array #(.NBITS(NB), .DEVICE_SEED(1)) dut0 (.clear, .start, .challenge(chal), .response(resp[0]));
  puf_array #(.NBITS(NB), .DEVICE_SEED(2)) dut1 (.clear, .start, .challenge(chal), .response(resp[1]));
  puf_array #(.NBITS(NB), .DEVICE_SEED(3)) dut2 (.clear, .start, .challenge(chal), .response(resp[2]));

  for (genvar i = 0; i < NB; i++) begin : g_peek
    initial begin
      t0[0][i] = dut0.g_slice[i].u_slice.T0_PS;
      t1[0][i] = dut0.g_slice[i].u_slice.T1_PS;
      t0[1][i] = dut1.g_slice[i].u_slice.T0_PS;
      t1[1][i] = dut1.g_slice[i].u_slice.T1_PS;
      t0[2][i] = dut2.g_slice[i].u_slice.T0_PS;
      t1[2][i] = dut2.g_slice[i].u_slice.T1_PS;
    end
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic race(input logic [NB-1:0] c);
    chal  = c;
    start = 1'b0;
    clear = 1'b1;
    #5;
    clear = 1'b0;
    #5;
    start = 1'b1;
    #5;
    for (int d = 0; d < 3; d++) begin
      logic [NB-1:0] exp_r;
      for (int i = 0; i < NB; i++) exp_r[i] = (t0[d][i] < t1[d][i]) ? ~c[i] : c[i];
      checks++;
      if (resp[d] !== exp_r) begin
        failures++;
        $display("seed %0d challenge %h: got %h expected %h", d + 1, c, resp[d], exp_r);
      end
    end
    start = 1'b0;
    #5;
  endtask

  initial begin
    logic [NB-1:0] first[3];
    clear = 1'b0;
    start = 1'b0;
    chal  = '0;
    #1;
    for (int d = 0; d < 3; d++) begin
      for (int i = 0; i < NB; i++) begin
        checks++;
        if (t0[d][i] == t1[d][i] || t0[d][i] < 1000 || t1[d][i] > 1000 + 64) begin
          failures++;
          $display("seed %0d slice %0d: delays %0d %0d", d + 1, i, t0[d][i], t1[d][i]);
        end
      end
    end
    race('0);
    first = resp;
    race('1);
    race(NB'($urandom));
    race('0);
    checks++;
    if (resp != first) begin
      failures++;
      $display("response not repeatable");
    end
    checks++;
    if (first[0] == first[1] || first[1] == first[2] || first[0] == first[2]) begin
      failures++;
      $display("devices not distinct: %h %h %h", first[0], first[1], first[2]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

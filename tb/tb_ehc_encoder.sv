// tb_ehc_encoder: self-checking test of the extended Hamming encoder.
//
// M = 3: all 16 data words against the explicit (8,4) parity equations of
// ehc_ref_pkg. M = 4: all 2048 data words of the (16,11) code, checking
// that the data bits land on positions 3,5,6,7,9..15, that the Hamming
// syndrome (XOR of the indices of set bits) is zero and that the overall
// parity is even; and, on a sample of pairs, that distinct codewords differ
// in at least 4 bits.
module tb_ehc_encoder;
  timeunit 1ns;
  timeprecision 1ps;
  import ehc_ref_pkg::*;

  int checks = 0;
  int failures = 0;

  logic [3:0]  d3;
  logic [7:0]  c3;
  logic [10:0] d4;
  logic [15:0] c4;

  ehc_encoder #(.M(3)) dut3 (.data_i(d3), .code_o(c3));
  ehc_encoder #(.M(4)) dut4 (.data_i(d4), .code_o(c4));

  localparam int DPOS4[11] = '{3, 5, 6, 7, 9, 10, 11, 12, 13, 14, 15};

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] words[2048];
    for (int d = 0; d < 16; d++) begin
      d3 = 4'(d);
      #1;
      checks++;
      if (c3 !== ref_encode84(d3)) begin
        failures++;
        $display("M=3 data %h: got %h expected %h", d3, c3, ref_encode84(d3));
      end
    end
    for (int d = 0; d < 2048; d++) begin
      logic [3:0] syn;
      d4 = 11'(d);
      #1;
      words[d] = c4;
      syn = '0;
      for (int p = 1; p < 16; p++) if (c4[p]) syn ^= 4'(p);
      checks++;
      if (syn != 0 || ^c4 != 1'b0) begin
        failures++;
        $display("M=4 data %h: code %h syndrome %h parity %b", d4, c4, syn, ^c4);
      end
      for (int i = 0; i < 11; i++) begin
        checks++;
        if (c4[DPOS4[i]] !== d4[i]) begin
          failures++;
          $display("M=4 data %h: bit %0d not at position %0d", d4, i, DPOS4[i]);
        end
      end
    end
    for (int t = 0; t < 4000; t++) begin
      int a, b;
      a = int'($urandom % 2048);
      b = int'($urandom % 2048);
      if (a != b) begin
        checks++;
        if ($countones(words[a] ^ words[b]) < 4) begin
          failures++;
          $display("M=4 distance %0d between %h and %h", $countones(words[a] ^ words[b]),
                   words[a], words[b]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

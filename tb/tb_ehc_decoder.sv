// tb_ehc_decoder: self-checking test of the extended Hamming decoder.
//
// M = 3: all 256 received words against a brute-force nearest-codeword
// decoder (ehc_ref_pkg): distance 0 gives the data with no flag, distance 1
// gives the nearest codeword's data with corrected set, distance 2 (the
// largest possible for this code) must raise uncorrectable.
// M = 4: random (16,11) codewords built in the testbench from the syndrome
// rule, with no, one or two random bit errors injected.
module tb_ehc_decoder;
  timeunit 1ns;
  timeprecision 1ps;
  import ehc_ref_pkg::*;

  int checks = 0;
  int failures = 0;

  logic [7:0]  w3;
  logic [3:0]  d3;
  logic        cor3, unc3;
  logic [15:0] w4;
  logic [10:0] d4;
  logic        cor4, unc4;

  ehc_decoder #(.M(3)) dut3 (.code_i(w3), .data_o(d3), .corrected_o(cor3),
                             .uncorrectable_o(unc3));
  ehc_decoder #(.M(4)) dut4 (.code_i(w4), .data_o(d4), .corrected_o(cor4),
                             .uncorrectable_o(unc4));

  localparam int DPOS4[11] = '{3, 5, 6, 7, 9, 10, 11, 12, 13, 14, 15};

  // (16,11) codeword: data at DPOS4, each parity bit 2^i chosen so that
  // the syndrome is zero, then the overall parity made even.
  function automatic logic [15:0] build16(logic [10:0] d);
    logic [15:0] c;
    logic [3:0]  syn;
    c = '0;
    for (int i = 0; i < 11; i++) c[DPOS4[i]] = d[i];
    syn = '0;
    for (int p = 1; p < 16; p++) if (c[p]) syn ^= 4'(p);
    for (int i = 0; i < 4; i++) c[1 << i] = syn[i];
    c[0] = ^c[15:1];
    return c;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static int n_ok = 0, n_cor = 0, n_unc = 0;
    for (int w = 0; w < 256; w++) begin
      int         distance;
      logic [3:0] exp_d;
      w3 = 8'(w);
      #1;
      ref_nearest84(w3, distance, exp_d);
      checks++;
      if (distance == 0) begin
        n_ok++;
        if (d3 !== exp_d || cor3 || unc3) begin
          failures++;
          $display("M=3 %h clean: got d=%h c=%b u=%b", w3, d3, cor3, unc3);
        end
      end else if (distance == 1) begin
        n_cor++;
        if (d3 !== exp_d || !cor3 || unc3) begin
          failures++;
          $display("M=3 %h one error: got d=%h c=%b u=%b exp d=%h", w3, d3, cor3, unc3, exp_d);
        end
      end else begin
        n_unc++;
        if (cor3 || !unc3) begin
          failures++;
          $display("M=3 %h two errors: got c=%b u=%b", w3, cor3, unc3);
        end
      end
    end
    checks++;
    if (n_ok != 16 || n_cor != 128 || n_unc != 112) begin
      failures++;
      $display("M=3 class counts %0d %0d %0d", n_ok, n_cor, n_unc);
    end
    for (int t = 0; t < 3000; t++) begin
      logic [10:0] d;
      logic [15:0] c;
      int          nerr, p1, p2;
      d    = 11'($urandom);
      c    = build16(d);
      nerr = t % 3;
      p1   = int'($urandom % 16);
      p2   = (p1 + 1 + int'($urandom % 15)) % 16;
      if (nerr >= 1) c[p1] = ~c[p1];
      if (nerr >= 2) c[p2] = ~c[p2];
      w4 = c;
      #1;
      checks++;
      if (nerr == 0 && (d4 !== d || cor4 || unc4)) begin
        failures++;
        $display("M=4 clean %h: got %h c=%b u=%b", d, d4, cor4, unc4);
      end
      if (nerr == 1 && (d4 !== d || !cor4 || unc4)) begin
        failures++;
        $display("M=4 one error at %0d, data %h: got %h c=%b u=%b", p1, d, d4, cor4, unc4);
      end
      if (nerr == 2 && (cor4 || !unc4)) begin
        failures++;
        $display("M=4 two errors at %0d,%0d: c=%b u=%b", p1, p2, cor4, unc4);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

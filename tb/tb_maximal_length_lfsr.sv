// tb_maximal_length_lfsr -- self-checking test of the BIST pattern generator.
//
// 10-bit default: reset gives 3FF and the next states are 3FE, 3FC, 3F8, 3F0
// (reference trace); 2100 steps against a model (bit 0 takes bit9^bit6);
// all 1023 non-zero states are visited once per period of 1023.
// 3-bit instance (Q1 xor Q2 into Q0, seed 111): the Q0, Q1, Q2 streams are
// 1001011, 1100101, 1110010 and the states read Q0Q1Q2 run 7,3,1,4,2,5,6.
// The Q2 stream 1110010 must have the two-valued autocorrelation of an
// m-sequence: agreements minus disagreements 7 at shift 0 and -1 elsewhere.
`timescale 1ns/1ps
module tb_maximal_length_lfsr;
  logic clock = 0, reset = 0;
  logic [9:0] data_out;
  logic [2:0] q3;
  int checks = 0, failures = 0;
  logic [9:0] m;
  bit seen [1024];
  int distinct, period;
  logic [9:0] trace [4] = '{10'h3FE, 10'h3FC, 10'h3F8, 10'h3F0};
  logic [6:0] s0, s1, s2;
  int vals [7];
  int exp_vals [7] = '{7, 3, 1, 4, 2, 5, 6};
  int ad;

  maximal_length_lfsr dut (.clock, .reset, .data_out);
  maximal_length_lfsr #(.WIDTH(3), .TAP_A(1), .TAP_B(2), .SEED(3'b111)) dut3 (.clock, .reset, .data_out(q3));

  always #5 clock = ~clock;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clock);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1; @(posedge clock); #1 reset = 0;
    check(data_out == 10'h3FF, "reset loads all ones");
    check(q3 == 3'b111, "3-bit reset loads seed");
    // 3-bit generator, seven states
    for (int i = 0; i < 7; i++) begin
      s0[6-i] = q3[0]; s1[6-i] = q3[1]; s2[6-i] = q3[2];
      vals[i] = {q3[0], q3[1], q3[2]};
      if (i >= 1 && i <= 4) check(data_out == trace[i-1], $sformatf("trace %0d", i));
      @(posedge clock); #1;
    end
    check(s0 == 7'b1001011, $sformatf("Q0 stream %b", s0));
    check(s1 == 7'b1100101, $sformatf("Q1 stream %b", s1));
    check(s2 == 7'b1110010, $sformatf("Q2 stream %b", s2));
    foreach (vals[i]) check(vals[i] == exp_vals[i], $sformatf("3-bit state %0d = %0d", i, vals[i]));
    for (int sh = 0; sh < 7; sh++) begin
      ad = 0;
      for (int k = 0; k < 7; k++) ad += (s2[k] == s2[(k + sh) % 7]) ? 1 : -1;
      check(ad == ((sh == 0) ? 7 : -1), $sformatf("autocorrelation shift %0d = %0d", sh, ad));
    end
    // 10-bit model and period
    reset = 1; @(posedge clock); #1 reset = 0;
    m = 10'h3FF; distinct = 0; period = 0;
    do begin
      if (!seen[m]) distinct++;
      seen[m] = 1;
      m = {m[8:0], m[9] ^ m[6]};
      @(posedge clock); #1; period++;
      check(data_out == m, $sformatf("step %0d", period));
    end while (data_out != 10'h3FF && period < 1100);
    check(period == 1023, $sformatf("period %0d", period));
    check(distinct == 1023 && !seen[0], "all non-zero states visited");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

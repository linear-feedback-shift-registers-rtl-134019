// tb_shift_reg8 -- self-checking test of the 8-bit LFSR.
//
// Checks: asynchronous reset loads 8'h08 without a clock edge; the first
// states after reset are the reference trace 84, 42, A1, D0; 300 further
// steps against a bit-level model written from the tap list (bits 7,3,2,1);
// output_bit is state[0]; enable=0 holds the state; the sequence period is
// 105 clocks (first return to the seed).
`timescale 1ns/1ps
module tb_shift_reg8;
  logic clock = 0, enable = 0, reset = 0;
  logic output_bit;
  logic [7:0] state;
  int checks = 0, failures = 0;

  shift_reg8 dut (.clock, .enable, .reset, .output_bit, .state);

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

  logic [7:0] model;
  logic [7:0] trace [4] = '{8'h84, 8'h42, 8'hA1, 8'hD0};
  int period;

  initial begin
    #2 reset = 1;
    #1 check(state == 8'h08, "async reset loads seed before any clock edge");
    @(posedge clock); #1 reset = 0;
    enable = 1;
    foreach (trace[i]) begin
      @(posedge clock); #1;
      check(state == trace[i], $sformatf("trace step %0d: got %h want %h", i, state, trace[i]));
    end
    model = state;
    for (int i = 0; i < 300; i++) begin
      model = {model[7] ^ model[3] ^ model[2] ^ model[1], model[7:1]};
      @(posedge clock); #1;
      check(state == model, $sformatf("step %0d: got %h want %h", i, state, model));
      check(output_bit == model[0], "output is bit 0");
    end
    enable = 0;
    model = state;
    repeat (5) @(posedge clock);
    #1 check(state == model, "enable low holds the state");
    // period
    reset = 1; #1 reset = 0; enable = 1;
    period = 0;
    do begin @(posedge clock); #1; period++; end while (state != 8'h08 && period < 400);
    check(period == 105, $sformatf("period %0d, expected 105", period));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

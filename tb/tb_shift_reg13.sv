// tb_shift_reg13 -- self-checking test of the 13-bit LFSR.
//
// Checks: asynchronous reset loads 13'h000D; the reference trace 1006, 0803,
// 1401, 0A00; 1000 steps against a model written from the tap list (bits 12,
// 3, 2, 0); enable=0 holds; period 6141 clocks.
`timescale 1ns/1ps
module tb_shift_reg13;
  logic clock = 0, enable = 0, reset = 0;
  logic output_bit;
  logic [12:0] state;
  int checks = 0, failures = 0;

  shift_reg13 dut (.clock, .enable, .reset, .output_bit, .state);

  always #5 clock = ~clock;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clock);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [12:0] model;
  logic [12:0] trace [4] = '{13'h1006, 13'h0803, 13'h1401, 13'h0A00};
  int period;

  initial begin
    #2 reset = 1;
    #1 check(state == 13'h000D, "async reset loads seed");
    @(posedge clock); #1 reset = 0;
    enable = 1;
    foreach (trace[i]) begin
      @(posedge clock); #1;
      check(state == trace[i], $sformatf("trace step %0d: got %h want %h", i, state, trace[i]));
    end
    model = state;
    for (int i = 0; i < 1000; i++) begin
      model = {model[12] ^ model[3] ^ model[2] ^ model[0], model[12:1]};
      @(posedge clock); #1;
      check(state == model && output_bit == model[0], $sformatf("step %0d: got %h want %h", i, state, model));
    end
    enable = 0;
    model = state;
    repeat (5) @(posedge clock);
    #1 check(state == model, "enable low holds the state");
    reset = 1; #1 reset = 0; enable = 1;
    period = 0;
    do begin @(posedge clock); #1; period++; end while (state != 13'h000D && period < 9000);
    check(period == 6141, $sformatf("period %0d, expected 6141", period));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

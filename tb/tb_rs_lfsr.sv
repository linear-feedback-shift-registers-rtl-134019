// tb_rs_lfsr -- self-checking test of the 41-stage, 2-tap fill LFSR.
//
// Model from the polynomial x^41 + x^3 + 1: stage 40 takes stage0^stage3.
// Checks reset to all ones, serial fill of a random 41-bit factor code, 2000
// chips against the model with random enables, and the recurrence
// b[n] = b[n-41] ^ b[n-38] directly on the output stream.
`timescale 1ns/1ps
module tb_rs_lfsr;
  logic clk = 0, rst = 0, enable = 0, fill_en = 0, new_fill = 0;
  logic tap_out;
  int checks = 0, failures = 0;
  logic [40:0] m;
  bit out_hist [$];

  rs_lfsr dut (.clk, .rst, .enable, .fill_en, .new_fill, .tap_out);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic step(input bit en, input bit f, input bit b);
    enable = en; fill_en = f; new_fill = b;
    @(posedge clk); #1;
    if (en) m = {f ? b : (m[0] ^ m[3]), m[40:1]};
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; @(posedge clk); #1 rst = 0; m = '1;
    check(tap_out == 1'b1, "reset loads all ones");
    for (int i = 0; i < 41; i++) step(1'b1, 1'b1, 1'($urandom_range(0, 1)));
    for (int i = 0; i < 2000; i++) begin
      step(1'($urandom_range(0, 4) != 0), 1'b0, 1'b0);
      check(tap_out == m[0], $sformatf("chip %0d", i));
    end
    for (int i = 0; i < 200; i++) begin
      out_hist.push_back(tap_out);
      step(1'b1, 1'b0, 1'b0);
    end
    for (int n = 41; n < 200; n++)
      check(out_hist[n] == (out_hist[n-41] ^ out_hist[n-38]), $sformatf("recurrence at %0d", n));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_rs_code -- self-checking test of the RS code generator.
//
// Two independent models of x^41 + x^3 + 1 registers, A and B. Checks: after
// reset both registers hold all ones so the code is 0; both are primed with
// random factor codes through their own fill inputs; the code equals
// modelA[0] ^ modelB[0] for 2000 chips with random enables; re-filling only
// register B while A keeps running changes only B's contribution.
`timescale 1ns/1ps
module tb_rs_code;
  logic clock = 0, rst = 0, enable = 0;
  logic fill_en_a = 0, fill_en_b = 0, new_fill_a = 0, new_fill_b = 0;
  logic rs_code_out;
  int checks = 0, failures = 0;
  logic [40:0] ma, mb;

  rs_code dut (.clock, .rst, .enable, .fill_en_a, .fill_en_b, .new_fill_a, .new_fill_b, .rs_code_out);

  always #5 clock = ~clock;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic step(input bit en, input bit fa, input bit ba, input bit fb, input bit bb);
    enable = en; fill_en_a = fa; new_fill_a = ba; fill_en_b = fb; new_fill_b = bb;
    @(posedge clock); #1;
    if (en) begin
      ma = {fa ? ba : (ma[0] ^ ma[3]), ma[40:1]};
      mb = {fb ? bb : (mb[0] ^ mb[3]), mb[40:1]};
    end
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clock);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; @(posedge clock); #1 rst = 0; ma = '1; mb = '1;
    check(rs_code_out == 1'b0, "equal reset states give code 0");
    for (int i = 0; i < 41; i++)
      step(1'b1, 1'b1, 1'($urandom_range(0, 1)), 1'b1, 1'($urandom_range(0, 1)));
    for (int i = 0; i < 2000; i++) begin
      step(1'($urandom_range(0, 4) != 0), 1'b0, 1'b0, 1'b0, 1'b0);
      check(rs_code_out == (ma[0] ^ mb[0]), $sformatf("chip %0d", i));
    end
    for (int i = 0; i < 41; i++) step(1'b1, 1'b0, 1'b0, 1'b1, 1'($urandom_range(0, 1)));
    for (int i = 0; i < 500; i++) begin
      step(1'b1, 1'b0, 1'b0, 1'b0, 1'b0);
      check(rs_code_out == (ma[0] ^ mb[0]), $sformatf("after B refill, chip %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

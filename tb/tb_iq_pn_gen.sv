// tb_iq_pn_gen -- self-checking test of the I/Q PN generator.
//
// Models for both channels are written from the polynomials: I stage 16 takes
// stage5^stage0, Q stage 16 takes stage9^stage5^stage4^stage0. Checks reset
// to all ones, 3000 chips with random shift_en, serial fill of random states,
// and that each output has period 131071: the 17-bit window of recent output
// bits first repeats its starting value after exactly 2^17-1 shifts.
`timescale 1ns/1ps
module tb_iq_pn_gen;
  logic clk = 0, reset = 0, shift_en = 0, fill_sel = 0, data_in_i = 0, data_in_q = 0;
  logic pn_out_i, pn_out_q;
  int checks = 0, failures = 0;
  logic [16:0] mi, mq, wi, wq, wi0, wq0;
  int pi, pq, n;

  iq_pn_gen dut (.clk, .reset, .shift_en, .fill_sel, .data_in_i, .data_in_q, .pn_out_i, .pn_out_q);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic step(input bit en, input bit f, input bit bi, input bit bq);
    shift_en = en; fill_sel = f; data_in_i = bi; data_in_q = bq;
    @(posedge clk); #1;
    if (en) begin
      mi = {f ? bi : (mi[5] ^ mi[0]), mi[16:1]};
      mq = {f ? bq : (mq[9] ^ mq[5] ^ mq[4] ^ mq[0]), mq[16:1]};
    end
  endtask

  initial begin : watchdog
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1; @(posedge clk); #1 reset = 0;
    mi = '1; mq = '1;
    check(pn_out_i && pn_out_q, "reset loads all ones");
    for (int i = 0; i < 3000; i++) begin
      step(1'($urandom_range(0, 3) != 0), 1'b0, 1'b0, 1'b0);
      check(pn_out_i == mi[0] && pn_out_q == mq[0], $sformatf("chip %0d", i));
    end
    for (int i = 0; i < 17; i++) step(1'b1, 1'b1, 1'($urandom_range(0, 1)), 1'($urandom_range(0, 1)));
    for (int i = 0; i < 500; i++) begin
      step(1'b1, 1'b0, 1'b0, 1'b0);
      check(pn_out_i == mi[0] && pn_out_q == mq[0], $sformatf("after fill, chip %0d", i));
    end
    // period via the 17-bit output window
    for (int i = 0; i < 17; i++) begin
      wi = {pn_out_i, wi[16:1]}; wq = {pn_out_q, wq[16:1]};
      step(1'b1, 1'b0, 1'b0, 1'b0);
    end
    wi0 = wi; wq0 = wq; pi = 0; pq = 0; n = 0;
    while ((pi == 0 || pq == 0) && n < 140000) begin
      wi = {pn_out_i, wi[16:1]}; wq = {pn_out_q, wq[16:1]};
      step(1'b1, 1'b0, 1'b0, 1'b0);
      n++;
      if (pi == 0 && wi == wi0) pi = n;
      if (pq == 0 && wq == wq0) pq = n;
    end
    check(pi == 131071, $sformatf("I period %0d", pi));
    check(pq == 131071, $sformatf("Q period %0d", pq));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_lfsr_16 -- self-checking test of the 16-bit 4-tap parallel LFSR.
//
// A model keeps the history of bits entering the delay lines; dout[0..3]
// must equal the bits entered 2, 3, 5 and 16 enabled clocks ago, and with
// fill low the entering bit must be the XNOR of those four. Checks serial
// fill of a random state, a fill in the middle of a run (state replaced in
// 16 chips), ce=0 holding, and the period from an all-zero fill (65535).
// A second instance with lines 1, 2, 22 and 32 (a 32-stage register with taps
// 32, 22, 2, 1, its long lines cascaded from two segments) runs alongside
// and is checked the same way against its own history.
`timescale 1ns/1ps
module tb_lfsr_16;
  logic clk = 0, ce = 0, din = 0, fill = 0;
  logic [3:0] dout;
  int checks = 0, failures = 0;
  logic [15:0] h;   // h[k]: bit that entered k+1 enabled clocks ago
  logic nb;
  int period;

  lfsr_16 dut (.clk, .ce, .din, .fill, .dout);

  // 32-stage configuration, driven by the same ce, din and fill
  logic [3:0]  dout32;
  logic [31:0] h32;  // h32[k]: bit that entered the 32-stage lines k+1 clocks ago
  logic        nb32;

  lfsr_16 #(.LEN_U1(1), .LEN_U2(2), .LEN_U3(22), .LEN_U4(32)) dut32 (
    .clk, .ce, .din, .fill, .dout(dout32)
  );

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic step(input bit f, input bit b);
    fill = f; din = b; ce = 1;
    nb   = f ? b : ~(h[1] ^ h[2] ^ h[4] ^ h[15]);
    nb32 = f ? b : ~(h32[0] ^ h32[1] ^ h32[21] ^ h32[31]);
    @(posedge clk); #1;
    h   = {h[14:0], nb};
    h32 = {h32[30:0], nb32};
  endtask

  function automatic logic [3:0] expect_dout();
    return {h[15], h[4], h[2], h[1]};
  endfunction

  function automatic logic [3:0] expect_dout32();
    return {h32[31], h32[21], h32[1], h32[0]};
  endfunction

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (32) step(1'b1, 1'($urandom_range(0, 1)));
    check(dout == expect_dout(), "taps after serial fill");
    check(dout32 == expect_dout32(), "32-stage taps after serial fill");
    for (int i = 0; i < 1000; i++) begin
      step(1'b0, 1'($urandom_range(0, 1)));
      check(dout == expect_dout(), $sformatf("run step %0d: got %b want %b", i, dout, expect_dout()));
      check(dout32 == expect_dout32(),
            $sformatf("32-stage run step %0d: got %b want %b", i, dout32, expect_dout32()));
    end
    // fill in the middle of a run
    repeat (16) step(1'b1, 1'($urandom_range(0, 1)));
    check(dout == expect_dout(), "taps after mid-run fill");
    // ce low holds
    ce = 0; fill = 0;
    repeat (7) @(posedge clk);
    #1 check(dout == expect_dout(), "ce low holds");
    check(dout32 == expect_dout32(), "32-stage ce low holds");
    // period from all zeros (legal for XNOR feedback)
    repeat (16) step(1'b1, 1'b0);
    period = 0;
    do begin step(1'b0, 1'b0); period++; end while (h != 16'h0000 && period < 70000);
    check(period == 65535, $sformatf("period %0d, expected 65535", period));
    check(dout == 4'b0000, "back at the all-zero state");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

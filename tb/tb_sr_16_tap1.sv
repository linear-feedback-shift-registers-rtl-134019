// tb_sr_16_tap1 -- self-checking test of the multicycle tap-access LFSR.
//
// chip_en must pulse once every four clk4x cycles, first in the fourth cycle
// after reset. A model keeps the history of bits shifted into the register;
// at each chip the bit shifted in must be the XOR of the bits entered 2, 3, 5
// and 16 chips ago (four serial XNOR steps from a cleared flip-flop), or din
// while fill is high, and dout must show the 16th stage. Also checks the
// period from a single-one fill (65535 chips = 262140 clk4x cycles).
// Two more instances run the other tap counts: two taps on a 2x clock
// (delays 1 and 15, a 15-stage x^15+x^14+1 register, period 32767 chips,
// chip_en every second cycle) and three taps on a 4x clock with the parity
// flip-flop idle in the first sub-cycle (delays 3, 5, 16; an odd number of
// XNOR steps, so the feedback is the XNOR of the taps).
`timescale 1ns/1ps
module tb_sr_16_tap1;
  logic clk4x = 0, reset = 0, din = 0, fill = 0;
  logic dout, chip_en;
  int checks = 0, failures = 0;
  logic [15:0] h;
  logic nb, exp_dout;
  int gap, period;

  sr_16_tap1 dut (.clk4x, .reset, .din, .fill, .dout, .chip_en);

  logic din2 = 0, fill2 = 0, dout2, chip_en2;
  logic din3 = 0, fill3 = 0, dout3, chip_en3;
  logic [15:0] h2, h3;
  logic nb2, nb3, exp2, exp3;
  int gap2, gap3;

  sr_16_tap1 #(.NTAPS(2), .SUB_W(1), .TAP_ADDR({4'd0, 4'd0, 4'd14, 4'd0})) dut2 (
    .clk4x, .reset, .din(din2), .fill(fill2), .dout(dout2), .chip_en(chip_en2)
  );
  sr_16_tap1 #(.NTAPS(3), .SUB_W(2), .TAP_ADDR({4'd0, 4'd15, 4'd4, 4'd2})) dut3 (
    .clk4x, .reset, .din(din3), .fill(fill3), .dout(dout3), .chip_en(chip_en3)
  );

  always #2 clk4x = ~clk4x;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // One chip: wait for the strobe sub-cycle, drive fill/din, take the edge.
  task automatic chip(input bit f, input bit b, input bit do_check);
    gap = 0;
    while (!chip_en) begin @(posedge clk4x); #1; gap++; end
    if (do_check) check(gap == 3, $sformatf("chip_en spacing %0d cycles, expected 4", gap + 1));
    fill = f; din = b;
    nb = f ? b : (h[1] ^ h[2] ^ h[4] ^ h[15]);
    exp_dout = h[15];
    @(posedge clk4x); #1;
    h = {h[14:0], nb};
    if (do_check) check(dout == exp_dout, "dout is the 16th stage");
  endtask

  // Two taps, 2x clock: b[n] = b[n-1] ^ b[n-15]; dout is the 15th stage.
  task automatic chip2(input bit f, input bit b, input bit do_check);
    gap2 = 0;
    while (!chip_en2) begin @(posedge clk4x); #1; gap2++; end
    if (do_check) check(gap2 == 1, $sformatf("2-tap chip_en spacing %0d, expected 2", gap2 + 1));
    fill2 = f; din2 = b;
    nb2  = f ? b : (h2[0] ^ h2[14]);
    exp2 = h2[14];
    @(posedge clk4x); #1;
    h2 = {h2[14:0], nb2};
    if (do_check) check(dout2 == exp2, "2-tap dout is the 15th stage");
  endtask

  // Three taps, 4x clock: b[n] = ~(b[n-3] ^ b[n-5] ^ b[n-16]).
  task automatic chip3(input bit f, input bit b, input bit do_check);
    gap3 = 0;
    while (!chip_en3) begin @(posedge clk4x); #1; gap3++; end
    if (do_check) check(gap3 == 3, $sformatf("3-tap chip_en spacing %0d, expected 4", gap3 + 1));
    fill3 = f; din3 = b;
    nb3  = f ? b : ~(h3[2] ^ h3[4] ^ h3[15]);
    exp3 = h3[15];
    @(posedge clk4x); #1;
    h3 = {h3[14:0], nb3};
    if (do_check) check(dout3 == exp3, "3-tap dout is the 16th stage");
  endtask

  initial begin : watchdog
    repeat (600000) @(posedge clk4x);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1; #3; reset = 0;
    @(posedge clk4x); #1 check(!chip_en, "no strobe in first sub-cycle");
    @(posedge clk4x); #1 check(!chip_en, "no strobe in second sub-cycle");
    @(posedge clk4x); #1 check(chip_en,  "strobe in fourth sub-cycle after reset");
    repeat (16) chip(1'b1, 1'($urandom_range(0, 1)), 1'b0);
    for (int i = 0; i < 1000; i++) chip(1'b0, 1'b0, 1'b1);
    // period from a single one
    chip(1'b1, 1'b1, 1'b1);
    repeat (15) chip(1'b1, 1'b0, 1'b1);
    period = 0;
    do begin chip(1'b0, 1'b0, 1'b0); period++; end while (h != 16'h8000 && period < 70000);
    check(period == 65535, $sformatf("period %0d chips, expected 65535", period));
    // three taps
    repeat (16) chip3(1'b1, 1'($urandom_range(0, 1)), 1'b0);
    for (int i = 0; i < 1000; i++) chip3(1'b0, 1'b0, 1'b1);
    // two taps: model check, then the period from a single one
    repeat (16) chip2(1'b1, 1'($urandom_range(0, 1)), 1'b0);
    for (int i = 0; i < 1000; i++) chip2(1'b0, 1'b0, 1'b1);
    chip2(1'b1, 1'b1, 1'b1);
    repeat (14) chip2(1'b1, 1'b0, 1'b1);
    period = 0;
    do begin chip2(1'b0, 1'b0, 1'b0); period++; end
    while (h2[14:0] != 15'h4000 && period < 40000);
    check(period == 32767, $sformatf("2-tap period %0d chips, expected 32767", period));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

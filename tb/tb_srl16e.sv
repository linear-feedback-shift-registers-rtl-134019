// tb_srl16e -- self-checking test of the addressable shift register.
//
// Shifts random bits in with random clock enables and, after every clock,
// reads every address 0..15 and compares with a queue model: address a must
// give the bit shifted in a+1 enabled clocks earlier.
`timescale 1ns/1ps
module tb_srl16e;
  logic clk = 0, ce = 0, d = 0, q;
  logic [3:0] a = 0;
  int checks = 0, failures = 0;
  bit hist [$];

  srl16e dut (.clk, .ce, .d, .a, .q);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int cyc = 0; cyc < 400; cyc++) begin
      ce = ($urandom_range(0, 3) != 0);
      d  = 1'($urandom_range(0, 1));
      @(posedge clk);
      if (ce) hist.push_front(d);
      #1;
      if (hist.size() >= 16) begin
        for (int k = 0; k < 16; k++) begin
          a = 4'(k); #0.1;
          checks++;
          if (q !== hist[k]) begin
            failures++;
            $display("FAIL: cycle %0d addr %0d got %b want %b", cyc, k, q, hist[k]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

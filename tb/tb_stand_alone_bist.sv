// tb_stand_alone_bist -- self-checking test of the BIST pair.
//
// The testbench supplies a small circuit under test: the response bit is
// (p0 & p3) ^ p5 ^ (p7 | p9) of the current pattern. One full pattern period
// (1023 clocks) is run; the generator must follow its model and the
// signature must equal the one computed by an independent model of the
// signature register fed with the model's own response. Then the same run
// with the CUT's p5 input stuck at 1 must give a different signature.
`timescale 1ns/1ps
module tb_stand_alone_bist;
  logic clock = 0, reset = 0, serial_in;
  logic [9:0] lfsr_out, signature_out;
  int checks = 0, failures = 0;
  bit stuck = 0;
  logic [9:0] mg, ms, good_sig;

  stand_alone_bist dut (.clock, .reset, .serial_in, .lfsr_out, .signature_out);

  function automatic logic cut(input logic [9:0] p, input bit stuck_at_1);
    logic p5;
    p5 = stuck_at_1 ? 1'b1 : p[5];
    return (p[0] & p[3]) ^ p5 ^ (p[7] | p[9]);
  endfunction

  assign serial_in = cut(lfsr_out, stuck);

  always #5 clock = ~clock;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic session(input bit fault, output logic [9:0] sig);
    stuck = fault;
    reset = 1; @(posedge clock); #1 reset = 0;
    mg = '1; ms = '0;
    check(lfsr_out == mg && signature_out == ms, "reset state");
    for (int i = 0; i < 1023; i++) begin
      ms = {ms[8:0], cut(mg, fault) ^ ms[9] ^ ms[6]};
      mg = {mg[8:0], mg[9] ^ mg[6]};
      @(posedge clock); #1;
      check(lfsr_out == mg, $sformatf("pattern %0d", i));
    end
    check(signature_out == ms, $sformatf("signature %h, model %h", signature_out, ms));
    sig = signature_out;
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clock);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [9:0] bad_sig;
  initial begin
    session(1'b0, good_sig);
    session(1'b1, bad_sig);
    check(bad_sig != good_sig, "stuck-at-1 fault changes the signature");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

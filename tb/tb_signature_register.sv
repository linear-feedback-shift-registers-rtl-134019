// tb_signature_register -- self-checking test of the signature register.
//
// Checks: reset clears to zero; 600 random input bits against a model (bit 0
// takes data_in ^ bit9 ^ bit6); a single flipped input bit anywhere in a
// 300-bit stream always changes the final signature; the signature of
// a XOR b equals sig(a) XOR sig(b) (linearity). A 3-bit instance (the
// textbook signature analyser: IN ^ Q1 ^ Q2 into Q0, cleared to 000) is
// checked against its own model on a random stream.
`timescale 1ns/1ps
module tb_signature_register;
  logic clock = 0, reset = 0, data_in = 0;
  logic [9:0] data_out;
  int checks = 0, failures = 0;
  logic [9:0] m, sig_a, sig_b, sig_ab, sig_good;
  bit sa [300], sb [300];

  signature_register dut (.clock, .reset, .data_in, .data_out);

  logic       data_in3 = 0;
  logic [2:0] data_out3, m3;

  signature_register #(.WIDTH(3), .TAP_A(1), .TAP_B(2)) dut3 (
    .clock, .reset, .data_in(data_in3), .data_out(data_out3)
  );

  always #5 clock = ~clock;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic run(input bit s [300], output logic [9:0] sig);
    reset = 1; @(posedge clock); #1 reset = 0;
    for (int i = 0; i < 300; i++) begin data_in = s[i]; @(posedge clock); #1; end
    sig = data_out;
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clock);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1; @(posedge clock); #1 reset = 0;
    check(data_out == '0, "reset clears");
    check(data_out3 == '0, "3-bit reset clears");
    m = '0; m3 = '0;
    for (int i = 0; i < 600; i++) begin
      data_in  = 1'($urandom_range(0, 1));
      data_in3 = 1'($urandom_range(0, 1));
      m  = {m[8:0], data_in ^ m[9] ^ m[6]};
      m3 = {m3[1:0], data_in3 ^ m3[2] ^ m3[1]};
      @(posedge clock); #1;
      check(data_out == m, $sformatf("bit %0d", i));
      check(data_out3 == m3, $sformatf("3-bit register, bit %0d", i));
    end
    foreach (sa[i]) begin sa[i] = 1'($urandom_range(0, 1)); sb[i] = 1'($urandom_range(0, 1)); end
    run(sa, sig_a); run(sb, sig_b);
    foreach (sa[i]) sb[i] = sa[i] ^ sb[i];
    run(sb, sig_ab);
    check(sig_ab == (sig_a ^ sig_b), "linearity");
    sig_good = sig_a;
    for (int k = 0; k < 300; k += 23) begin
      sa[k] = ~sa[k];
      run(sa, sig_b);
      check(sig_b != sig_good, $sformatf("single error at bit %0d detected", k));
      sa[k] = ~sa[k];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

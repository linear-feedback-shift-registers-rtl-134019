// tb_lfsr_wireless_top -- end-to-end test of every design in the top, at the
// default (full) sizes.
//
// Each design is taken through a complete operation against its own model:
//   8/13-bit LFSRs: asynchronous reset, enable hold, the reference trace, a
//     full period (105 and 6141 steps) back to the seed;
//   parallel 16-bit LFSR: serial fill, ce hold, a full 65535-chip period;
//   multicycle LFSR: reset, chip strobe every 4 clk4x cycles, fill, run;
//   I/Q PN generator: reset, fill_sel, shift_en hold, a full 131071-chip
//     period of both channels;
//   RS code generator: reset, separate fills of A and B, enable hold, run;
//   BIST: one pattern period with a good and with a faulty circuit under test,
//     whose signatures must differ.
// Every mechanism (reset, fill, enable hold, chip strobe, period wrap, fault
// detection) is counted and a mechanism that never happened is a failure.
`timescale 1ns/1ps
module tb_lfsr_wireless_top;
  logic clk = 0, clk4x = 0;
  logic s8_enable = 0, s8_reset = 0, s8_out;   logic [7:0]  s8_state;
  logic s13_enable = 0, s13_reset = 0, s13_out; logic [12:0] s13_state;
  logic p16_ce = 0, p16_din = 0, p16_fill = 0;  logic [3:0]  p16_dout;
  logic mc_reset = 0, mc_din = 0, mc_fill = 0, mc_dout, mc_chip_en;
  logic pn_reset = 0, pn_shift_en = 0, pn_fill_sel = 0, pn_data_in_i = 0, pn_data_in_q = 0;
  logic pn_out_i, pn_out_q;
  logic rs_rst = 0, rs_enable = 0, rs_fill_en_a = 0, rs_fill_en_b = 0;
  logic rs_new_fill_a = 0, rs_new_fill_b = 0, rs_code_out;
  logic bist_reset = 0, bist_serial_in;
  logic [9:0] bist_lfsr_out, bist_signature_out;

  lfsr_wireless_top dut (.*);

  always #5    clk   = ~clk;
  always #1.25 clk4x = ~clk4x;

  int checks = 0, failures = 0;
  int n_reset = 0, n_fill = 0, n_hold = 0, n_strobe = 0, n_wrap = 0, n_fault = 0;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin : watchdog
    repeat (1200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- BIST circuit under test (testbench-side) -------------
  bit stuck = 0;
  function automatic logic cut(input logic [9:0] p, input bit stuck_at_1);
    return (p[0] & p[3]) ^ (stuck_at_1 ? 1'b1 : p[5]) ^ (p[7] | p[9]);
  endfunction
  assign bist_serial_in = cut(bist_lfsr_out, stuck);

  // ---------------- phases ------------------------------------------------
  task automatic phase_s8();
    logic [7:0] m; int p;
    #2 s8_reset = 1; #1;
    check(s8_state == 8'h08, "s8 async reset"); n_reset++;
    @(posedge clk); #1 s8_reset = 0; s8_enable = 1; m = 8'h08; p = 0;
    do begin
      m = {m[7] ^ m[3] ^ m[2] ^ m[1], m[7:1]};
      @(posedge clk); #1; p++;
      check(s8_state == m && s8_out == m[0], "s8 step");
      if (p == 50) begin
        s8_enable = 0; repeat (3) @(posedge clk); #1;
        check(s8_state == m, "s8 hold"); n_hold++; s8_enable = 1;
      end
    end while (s8_state != 8'h08 && p < 300);
    check(p == 105, $sformatf("s8 period %0d", p)); if (p == 105) n_wrap++;
    s8_enable = 0;
  endtask

  task automatic phase_s13();
    logic [12:0] m; int p;
    #2 s13_reset = 1; #1;
    check(s13_state == 13'h000D, "s13 async reset"); n_reset++;
    @(posedge clk); #1 s13_reset = 0; s13_enable = 1; m = 13'h000D; p = 0;
    do begin
      m = {m[12] ^ m[3] ^ m[2] ^ m[0], m[12:1]};
      @(posedge clk); #1; p++;
      check(s13_state == m && s13_out == m[0], "s13 step");
    end while (s13_state != 13'h000D && p < 7000);
    check(p == 6141, $sformatf("s13 period %0d", p)); if (p == 6141) n_wrap++;
    s13_enable = 0;
  endtask

  task automatic phase_p16();
    logic [15:0] h; logic nb; int p;
    p16_ce = 1; p16_fill = 1;
    for (int i = 0; i < 16; i++) begin
      p16_din = 1'($urandom_range(0, 1)); nb = p16_din;
      @(posedge clk); #1; h = {h[14:0], nb};
    end
    n_fill++;
    check(p16_dout == {h[15], h[4], h[2], h[1]}, "p16 taps after fill");
    p16_fill = 0; p = 0;
    do begin
      nb = ~(h[1] ^ h[2] ^ h[4] ^ h[15]);
      @(posedge clk); #1; h = {h[14:0], nb}; p++;
      if (p < 2000) check(p16_dout == {h[15], h[4], h[2], h[1]}, "p16 step");
      if (p == 1000) begin
        p16_ce = 0; repeat (3) @(posedge clk); #1;
        check(p16_dout == {h[15], h[4], h[2], h[1]}, "p16 hold"); n_hold++; p16_ce = 1;
      end
    end while (p < 65535);
    check(p16_dout == {h[15], h[4], h[2], h[1]}, "p16 after a full period");
    p16_ce = 0;
  endtask

  task automatic phase_mc();
    logic [15:0] h; logic nb, ed; int gap;
    mc_reset = 1; #3 mc_reset = 0; n_reset++;
    for (int c = 0; c < 3000; c++) begin
      gap = 0;
      do begin @(posedge clk4x); #0.5; gap++; end while (!mc_chip_en);
      if (c > 0) begin check(gap == 3, $sformatf("mc strobe spacing %0d cycles", gap + 1)); n_strobe++; end
      mc_fill = (c < 16); mc_din = 1'($urandom_range(0, 1));
      if (c == 16) n_fill++;
      nb = mc_fill ? mc_din : (h[1] ^ h[2] ^ h[4] ^ h[15]);
      ed = h[15];
      @(posedge clk4x); #0.5; h = {h[14:0], nb};
      if (c >= 16) check(mc_dout == ed, "mc output");
    end
    mc_fill = 0;
  endtask

  task automatic phase_pn();
    logic [16:0] mi, mq, wi, wq, wi0, wq0; int n, pi, pq;
    pn_reset = 1; @(posedge clk); #1 pn_reset = 0; n_reset++;
    mi = '1; mq = '1;
    pn_shift_en = 1; pn_fill_sel = 1;
    for (int i = 0; i < 17; i++) begin
      pn_data_in_i = 1'($urandom_range(0, 1)); pn_data_in_q = 1'($urandom_range(0, 1));
      if (i == 0) begin pn_data_in_i = 1; pn_data_in_q = 1; end
      @(posedge clk); #1;
      mi = {pn_data_in_i, mi[16:1]}; mq = {pn_data_in_q, mq[16:1]};
    end
    n_fill++; pn_fill_sel = 0;
    pn_shift_en = 0; repeat (4) @(posedge clk); #1;
    check(pn_out_i == mi[0] && pn_out_q == mq[0], "pn hold"); n_hold++;
    pn_shift_en = 1;
    for (int i = 0; i < 17; i++) begin
      wi = {pn_out_i, wi[16:1]}; wq = {pn_out_q, wq[16:1]};
      @(posedge clk); #1;
      mi = {mi[5] ^ mi[0], mi[16:1]}; mq = {mq[9] ^ mq[5] ^ mq[4] ^ mq[0], mq[16:1]};
    end
    wi0 = wi; wq0 = wq; n = 0; pi = 0; pq = 0;
    while ((pi == 0 || pq == 0) && n < 140000) begin
      wi = {pn_out_i, wi[16:1]}; wq = {pn_out_q, wq[16:1]};
      if (n < 3000) check(pn_out_i == mi[0] && pn_out_q == mq[0], "pn step");
      @(posedge clk); #1; n++;
      mi = {mi[5] ^ mi[0], mi[16:1]}; mq = {mq[9] ^ mq[5] ^ mq[4] ^ mq[0], mq[16:1]};
      if (pi == 0 && wi == wi0) pi = n;
      if (pq == 0 && wq == wq0) pq = n;
    end
    check(pi == 131071 && pq == 131071, $sformatf("pn periods %0d %0d", pi, pq));
    if (pi == 131071 && pq == 131071) n_wrap++;
    pn_shift_en = 0;
  endtask

  task automatic phase_rs();
    logic [40:0] ma, mb;
    rs_rst = 1; @(posedge clk); #1 rs_rst = 0; n_reset++;
    ma = '1; mb = '1;
    check(rs_code_out == 1'b0, "rs reset");
    rs_enable = 1;
    rs_fill_en_a = 1;
    for (int i = 0; i < 41; i++) begin
      rs_new_fill_a = 1'($urandom_range(0, 1));
      @(posedge clk); #1;
      ma = {rs_new_fill_a, ma[40:1]}; mb = {mb[0] ^ mb[3], mb[40:1]};
    end
    rs_fill_en_a = 0; rs_fill_en_b = 1;
    for (int i = 0; i < 41; i++) begin
      rs_new_fill_b = 1'($urandom_range(0, 1));
      @(posedge clk); #1;
      ma = {ma[0] ^ ma[3], ma[40:1]}; mb = {rs_new_fill_b, mb[40:1]};
    end
    rs_fill_en_b = 0; n_fill++;
    for (int i = 0; i < 3000; i++) begin
      rs_enable = (i % 7 != 3);
      @(posedge clk); #1;
      if (rs_enable) begin
        ma = {ma[0] ^ ma[3], ma[40:1]}; mb = {mb[0] ^ mb[3], mb[40:1]};
      end else n_hold++;
      check(rs_code_out == (ma[0] ^ mb[0]), "rs code");
    end
    rs_enable = 0;
  endtask

  task automatic bist_session(input bit fault, output logic [9:0] sig);
    logic [9:0] mg, ms;
    stuck = fault;
    bist_reset = 1; @(posedge clk); #1 bist_reset = 0; n_reset++;
    mg = '1; ms = '0;
    for (int i = 0; i < 1023; i++) begin
      ms = {ms[8:0], cut(mg, fault) ^ ms[9] ^ ms[6]};
      mg = {mg[8:0], mg[9] ^ mg[6]};
      @(posedge clk); #1;
      check(bist_lfsr_out == mg, "bist pattern");
    end
    check(bist_lfsr_out == 10'h3FF, "bist pattern period"); n_wrap++;
    check(bist_signature_out == ms, "bist signature");
    sig = bist_signature_out;
  endtask

  logic [9:0] good_sig, bad_sig;

  initial begin
    phase_s8();
    phase_s13();
    phase_p16();
    phase_mc();
    phase_pn();
    phase_rs();
    bist_session(1'b0, good_sig);
    bist_session(1'b1, bad_sig);
    check(good_sig != bad_sig, "bist detects the stuck-at fault");
    if (good_sig != bad_sig) n_fault++;
    $display("mechanisms: reset=%0d fill=%0d hold=%0d chip_strobe=%0d period_wrap=%0d fault_detect=%0d",
             n_reset, n_fill, n_hold, n_strobe, n_wrap, n_fault);
    check(n_reset  > 0, "reset exercised");
    check(n_fill   > 0, "fill exercised");
    check(n_hold   > 0, "enable hold exercised");
    check(n_strobe > 0, "chip strobe exercised");
    check(n_wrap   > 0, "period wrap exercised");
    check(n_fault  > 0, "fault detection exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

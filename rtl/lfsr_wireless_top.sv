// lfsr_wireless_top -- the LFSR designs of this collection side by side.
//
// The designs are independent: each has its own controls and outputs, brought
// out here under a prefix. They share one chip-rate clock, clk; the
// multicycle LFSR runs on its own 4x clock, clk4x.
//   s8_*   8-bit LFSR (shift_reg8)            s13_*  13-bit LFSR (shift_reg13)
//   p16_*  16-bit 4-tap parallel LFSR         mc_*   multicycle tap-access LFSR
//   pn_*   I/Q PN generator                   rs_*   RS code generator
//   bist_* BIST pattern generator + signature register; the circuit under test
//          is external: bist_lfsr_out drives it, its response returns on
//          bist_serial_in.
// Timing of every output is that of its block (see the block's header).
module lfsr_wireless_top (
  input  logic        clk,
  input  logic        clk4x,
  // 8-bit LFSR
  input  logic        s8_enable,
  input  logic        s8_reset,
  output logic        s8_out,
  output logic [7:0]  s8_state,
  // 13-bit LFSR
  input  logic        s13_enable,
  input  logic        s13_reset,
  output logic        s13_out,
  output logic [12:0] s13_state,
  // 16-bit 4-tap parallel LFSR
  input  logic        p16_ce,
  input  logic        p16_din,
  input  logic        p16_fill,
  output logic [3:0]  p16_dout,
  // multicycle tap-access LFSR
  input  logic        mc_reset,
  input  logic        mc_din,
  input  logic        mc_fill,
  output logic        mc_dout,
  output logic        mc_chip_en,
  // I/Q PN generator
  input  logic        pn_reset,
  input  logic        pn_shift_en,
  input  logic        pn_fill_sel,
  input  logic        pn_data_in_i,
  input  logic        pn_data_in_q,
  output logic        pn_out_i,
  output logic        pn_out_q,
  // RS code generator
  input  logic        rs_rst,
  input  logic        rs_enable,
  input  logic        rs_fill_en_a,
  input  logic        rs_fill_en_b,
  input  logic        rs_new_fill_a,
  input  logic        rs_new_fill_b,
  output logic        rs_code_out,
  // BIST
  input  logic        bist_reset,
  input  logic        bist_serial_in,
  output logic [9:0]  bist_lfsr_out,
  output logic [9:0]  bist_signature_out
);

  shift_reg8 u_shift_reg8 (
    .clock (clk), .enable (s8_enable), .reset (s8_reset),
    .output_bit (s8_out), .state (s8_state)
  );

  shift_reg13 u_shift_reg13 (
    .clock (clk), .enable (s13_enable), .reset (s13_reset),
    .output_bit (s13_out), .state (s13_state)
  );

  lfsr_16 u_lfsr_16 (
    .clk (clk), .ce (p16_ce), .din (p16_din), .fill (p16_fill), .dout (p16_dout)
  );

  sr_16_tap1 u_sr_16_tap1 (
    .clk4x (clk4x), .reset (mc_reset), .din (mc_din), .fill (mc_fill),
    .dout (mc_dout), .chip_en (mc_chip_en)
  );

  iq_pn_gen u_iq_pn_gen (
    .clk (clk), .reset (pn_reset), .shift_en (pn_shift_en), .fill_sel (pn_fill_sel),
    .data_in_i (pn_data_in_i), .data_in_q (pn_data_in_q),
    .pn_out_i (pn_out_i), .pn_out_q (pn_out_q)
  );

  rs_code u_rs_code (
    .clock (clk), .rst (rs_rst), .enable (rs_enable),
    .fill_en_a (rs_fill_en_a), .fill_en_b (rs_fill_en_b),
    .new_fill_a (rs_new_fill_a), .new_fill_b (rs_new_fill_b),
    .rs_code_out (rs_code_out)
  );

  stand_alone_bist u_bist (
    .clock (clk), .reset (bist_reset), .serial_in (bist_serial_in),
    .lfsr_out (bist_lfsr_out), .signature_out (bist_signature_out)
  );

endmodule

// iq_pn_gen -- I/Q PN generator: two 17-stage LFSRs for QPSK spreading.
//
// The I channel uses I(x) = x^17 + x^5 + 1 and the Q channel
// Q(x) = x^17 + x^9 + x^5 + x^4 + 1. Each register is numbered 16 down to 0;
// the new bit enters stage 16, the register shifts towards stage 0 and stage 0
// is the channel output. A polynomial term x^k is the output of stage k and
// the trailing 1 is stage 0, so the I parity is stage5^stage0 and the Q parity
// stage9^stage5^stage4^stage0. Both sequences are m-sequences of period
// 131071.
//
// Controls (shared by both channels): shift_en advances both registers by one
// chip; fill_sel replaces each parity bit by data_in_i / data_in_q, so 17
// chips of fill load any starting state serially. Outputs change one clock
// after an enabled edge.
//
// Reset is synchronous and active high and loads all ones into both
// registers; the reference simulation starts from all ones, but whether its
// reset does the loading is not stated, so that part is this design's choice.
module iq_pn_gen
  import lfsr_pkg::*;
#(
  parameter int unsigned   N      = 17,
  parameter logic [N-1:0]  TAPS_I = 17'h00021,   // stages 5, 0
  parameter logic [N-1:0]  TAPS_Q = 17'h00231    // stages 9, 5, 4, 0
) (
  input  logic clk,
  input  logic reset,
  input  logic shift_en,
  input  logic fill_sel,
  input  logic data_in_i,
  input  logic data_in_q,
  output logic pn_out_i,
  output logic pn_out_q
);

  logic [N-1:0] sr_i, sr_q;
  logic         lfsr_in_i, lfsr_in_q;

  assign lfsr_in_i = fill_sel ? data_in_i : parity(MAX_W'(sr_i), MAX_W'(TAPS_I));
  assign lfsr_in_q = fill_sel ? data_in_q : parity(MAX_W'(sr_q), MAX_W'(TAPS_Q));

  always_ff @(posedge clk) begin
    if (reset) begin
      sr_i <= '1;
      sr_q <= '1;
    end else if (shift_en) begin
      sr_i <= {lfsr_in_i, sr_i[N-1:1]};
      sr_q <= {lfsr_in_q, sr_q[N-1:1]};
    end
  end

  assign pn_out_i = sr_i[0];
  assign pn_out_q = sr_q[0];

endmodule

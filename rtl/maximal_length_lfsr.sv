// maximal_length_lfsr -- BIST pattern generator, 10-bit maximal-length LFSR.
//
// Each clock the register shifts from bit 0 towards bit WIDTH-1 and the new
// bit 0 is bit TAP_B XOR bit TAP_A (bits 9 and 6 by default, the polynomial
// x^10 + x^7 + 1), so it steps through all 1023 non-zero 10-bit patterns.
// With WIDTH=3, TAP_A=1, TAP_B=2 it is the classic 3-bit generator
// (Q1 xor Q2 into Q0) whose states, read Q0Q1Q2, run 7,3,1,4,2,5,6.
//
// reset is synchronous and active high and loads SEED (all ones by default,
// as in the reference simulation; the register then runs 3FF, 3FE, 3FC, ...).
// There is no enable: the generator advances on every clock.
module maximal_length_lfsr #(
  parameter int unsigned       WIDTH = 10,
  parameter int unsigned       TAP_A = 6,
  parameter int unsigned       TAP_B = 9,
  parameter logic [WIDTH-1:0]  SEED  = '1
) (
  input  logic             clock,
  input  logic             reset,
  output logic [WIDTH-1:0] data_out
);

  logic lfsr_tap;

  assign lfsr_tap = data_out[TAP_B] ^ data_out[TAP_A];

  always_ff @(posedge clock) begin
    if (reset) data_out <= SEED;
    else       data_out <= {data_out[WIDTH-2:0], lfsr_tap};
  end

endmodule

// shift_reg13 -- 13-bit Fibonacci LFSR, feedback polynomial x^13+x^4+x^3+x+1.
//
// Same structure as shift_reg8: each enabled clock edge shifts the register
// towards bit 0, bit 0 is the serial output and the new bit 12 is the XOR of
// the tap stages. The taps follow the reference simulation trace of this
// design, in which term x^k taps register bit k-1: bits 12, 3, 2 and 0. From
// the seed 13'h000D the register runs 000D, 1006, 0803, 1401, 0A00, ... and
// repeats after 6141 states (not the 8191 of an m-sequence; the mask
// 13'b1_0110_0000_0001, powers counted from the MSB end, gives 8191).
//
// Interface: active-high asynchronous reset loads SEED (three ones, matching
// the three preset flip-flops of the reference implementation), active-high
// enable. Timing: one clock per step.
module shift_reg13
  import lfsr_pkg::*;
#(
  parameter int unsigned       WIDTH = 13,
  parameter logic [WIDTH-1:0]  TAPS  = 13'b1_0000_0000_1101,
  parameter logic [WIDTH-1:0]  SEED  = 13'h000D
) (
  input  logic             clock,
  input  logic             enable,
  input  logic             reset,
  output logic             output_bit,
  output logic [WIDTH-1:0] state
);

  logic new_bit;

  assign new_bit = parity(MAX_W'(state), MAX_W'(TAPS));

  always_ff @(posedge clock or posedge reset) begin
    if (reset)       state <= SEED;
    else if (enable) state <= {new_bit, state[WIDTH-1:1]};
  end

  assign output_bit = state[0];

endmodule

// shift_reg8 -- 8-bit Fibonacci LFSR, feedback polynomial x^8+x^4+x^3+x^2+1.
//
// Every enabled rising clock edge the register shifts one place towards bit 0;
// bit 0 is the serial output and the new bit 7 is the XOR of the tap stages.
// The taps follow the reference simulation trace of this design: polynomial
// term x^k taps register bit k-1, i.e. bits 7, 3, 2 and 1. With the seed
// 8'h08 the register runs 08, 84, 42, A1, D0, ... and repeats after 105
// states; this tap choice does not use bit 0 and is therefore not a
// maximal-length sequence. TAPS = 8'b0111_0001 (bits 0, 4, 5, 6: powers
// counted from the MSB end) gives the 255-state m-sequence instead.
//
// Interface: active-high asynchronous reset loads SEED (the reference design
// maps this to seven clear and one preset flip-flop); active-high enable.
// Timing: state and output change one clock after an enabled edge; no latency
// beyond that. Output naming (output_bit) is this design's choice, since
// "output" is a reserved word.
module shift_reg8
  import lfsr_pkg::*;
#(
  parameter int unsigned       WIDTH = 8,
  parameter logic [WIDTH-1:0]  TAPS  = 8'b1000_1110,
  parameter logic [WIDTH-1:0]  SEED  = 8'h08
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

// srl16e -- addressable shift register with clock enable (SRL16E behaviour).
//
// A DEPTH-stage serial shift register: on a rising clk edge with ce high, d
// enters stage 0 and every stage moves one place on. The output q is stage a,
// so q is the input delayed by a+1 enabled clocks. This is the shift-register
// look-up-table primitive that the parallel, multicycle and fill-state LFSRs
// are built around: a fixed address gives a fixed-length delay line, a
// changing address reads several taps of one register in turn.
//
// Like the FPGA primitive it has no reset; a user loads it by shifting data
// in (see the FILL multiplexers of lfsr_16 and sr_16_tap1). The read is
// combinational from a; the write takes one clock.
module srl16e #(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned AW    = 4
) (
  input  logic          clk,
  input  logic          ce,
  input  logic          d,
  input  logic [AW-1:0] a,
  output logic          q
);

  logic [DEPTH-1:0] sr;

  always_ff @(posedge clk) begin
    if (ce) sr <= {sr[DEPTH-2:0], d};
  end

  assign q = sr[a];

  initial assert (DEPTH <= (1 << AW)) else $error("srl16e: AW too narrow for DEPTH");

endmodule

// rs_lfsr -- 41-stage, 2-tap LFSR with serial fill, one half of rs_code.
//
// Stages are numbered N-1 down to 0; the new bit enters stage N-1 and stage 0
// (the 41st stage, "tap 41") is the output. The parity is stage0 ^ stage TAP,
// which realises x^41 + x^3 + 1 for TAP = 3, a primitive trinomial, so the
// register runs through 2^41 - 1 states. The tap position is this design's
// choice: only the length and the two-tap form are fixed by the reference.
//
// fill_en routes new_fill instead of the parity into the register (the 2:1
// fill multiplexer); N chips of fill load a complete factor code. enable is
// the chip-rate clock enable. rst is synchronous, active high, and loads all
// ones (this design's choice; any non-zero fill also works).
module rs_lfsr #(
  parameter int unsigned N   = 41,
  parameter int unsigned TAP = 3
) (
  input  logic clk,
  input  logic rst,
  input  logic enable,
  input  logic fill_en,
  input  logic new_fill,
  output logic tap_out
);

  logic [N-1:0] sr;
  logic         data_in;

  assign data_in = fill_en ? new_fill : (sr[0] ^ sr[TAP]);

  always_ff @(posedge clk) begin
    if (rst)         sr <= '1;
    else if (enable) sr <= {data_in, sr[N-1:1]};
  end

  assign tap_out = sr[0];

  initial assert (TAP > 0 && TAP < N) else $error("rs_lfsr: TAP out of range");

endmodule

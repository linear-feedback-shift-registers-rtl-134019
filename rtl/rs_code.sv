// rs_code -- RS code generator: XOR of two same-length LFSR sequences.
//
// Two 41-stage, 2-tap LFSRs (rs_lfsr), each primed serially with its own
// factor code, run in lock step; the code bit is the XOR of their 41st
// stages. Different pairs of fill values select different members of the
// resulting code family, which is how individual users get separate codes.
//
// Controls: enable advances both registers; fill_en_a / fill_en_b select the
// serial fill bits new_fill_a / new_fill_b for register A / B. rst is
// synchronous and loads all ones into both. rs_code_out is combinational from
// the two registers, so it changes one clock after an enabled edge.
// Both halves default to the same polynomial, as the reference describes two
// same-length registers told apart only by their fills; TAP_A and TAP_B let a
// user choose a preferred pair instead.
module rs_code #(
  parameter int unsigned N     = 41,
  parameter int unsigned TAP_A = 3,
  parameter int unsigned TAP_B = 3
) (
  input  logic clock,
  input  logic rst,
  input  logic enable,
  input  logic fill_en_a,
  input  logic fill_en_b,
  input  logic new_fill_a,
  input  logic new_fill_b,
  output logic rs_code_out
);

  logic delaya, delayb;

  rs_lfsr #(.N(N), .TAP(TAP_A)) u_lfsr_a (
    .clk (clock), .rst (rst), .enable (enable),
    .fill_en (fill_en_a), .new_fill (new_fill_a), .tap_out (delaya)
  );

  rs_lfsr #(.N(N), .TAP(TAP_B)) u_lfsr_b (
    .clk (clock), .rst (rst), .enable (enable),
    .fill_en (fill_en_b), .new_fill (new_fill_b), .tap_out (delayb)
  );

  assign rs_code_out = delaya ^ delayb;

endmodule

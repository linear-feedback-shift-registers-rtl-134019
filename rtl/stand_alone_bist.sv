// stand_alone_bist -- BIST pair: pattern generator plus signature register.
//
// A maximal-length LFSR produces the test patterns (lfsr_out) for a circuit
// under test, and a signature register compacts the circuit's serial response
// (serial_in) into signature_out. The circuit under test itself lies outside
// this block: lfsr_out goes to it and its response comes back on serial_in.
// Both registers share clock and the synchronous, active-high reset, so a
// test run is: hold reset for one clock, run a known number of clocks,
// compare signature_out with the value a good circuit gives.
module stand_alone_bist #(
  parameter int unsigned WIDTH = 10,
  parameter int unsigned TAP_A = 6,
  parameter int unsigned TAP_B = 9
) (
  input  logic             clock,
  input  logic             reset,
  input  logic             serial_in,
  output logic [WIDTH-1:0] lfsr_out,
  output logic [WIDTH-1:0] signature_out
);

  maximal_length_lfsr #(.WIDTH(WIDTH), .TAP_A(TAP_A), .TAP_B(TAP_B)) generator (
    .clock (clock), .reset (reset), .data_out (lfsr_out)
  );

  signature_register #(.WIDTH(WIDTH), .TAP_A(TAP_A), .TAP_B(TAP_B)) analyser (
    .clock (clock), .reset (reset), .data_in (serial_in), .data_out (signature_out)
  );

endmodule

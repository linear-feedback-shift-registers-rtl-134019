// signature_register -- serial-input signature register (SISR) for BIST.
//
// The pattern generator's LFSR with one more XOR in front of the first stage:
// each clock the register shifts from bit 0 towards bit WIDTH-1 and the new
// bit 0 is data_in ^ bit TAP_B ^ bit TAP_A. After a test sequence the
// register holds a signature that depends on every input bit; a faulty
// circuit under test changes its response stream and, with high probability,
// the signature. Linear: the signature of a XOR b equals sig(a) XOR sig(b)
// from a zero start.
//
// reset is synchronous and active high and clears the register to zero (the
// starting value of the reference's 3-bit example; the 10-bit reference
// simulation does not show it). No enable: it compacts one bit per clock.
module signature_register #(
  parameter int unsigned WIDTH = 10,
  parameter int unsigned TAP_A = 6,
  parameter int unsigned TAP_B = 9
) (
  input  logic             clock,
  input  logic             reset,
  input  logic             data_in,
  output logic [WIDTH-1:0] data_out
);

  logic feedback;

  assign feedback = data_in ^ data_out[TAP_B] ^ data_out[TAP_A];

  always_ff @(posedge clock) begin
    if (reset) data_out <= '0;
    else       data_out <= {data_out[WIDTH-2:0], feedback};
  end

endmodule

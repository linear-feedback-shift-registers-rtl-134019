// sr_16_tap1 -- 16-stage LFSR with multicycle tap access and serial parity.
//
// One addressable 16-stage shift register (srl16e) holds the whole LFSR. It
// shifts once per chip, but its address lines and a single parity flip-flop
// run 2^SUB_W times faster (four times by default). In the last NTAPS
// sub-cycles of a chip the address steps through TAP_ADDR[0..NTAPS-1]
// (by default stages 1, 2, 4 and 15, i.e. delays 2, 3, 5 and 16) and the
// flip-flop folds each tap in with an XNOR gate. In the last sub-cycle the
// last tap is XNORed in combinationally, that result is shifted into the
// register (chip_en high) and the flip-flop is cleared for the next chip.
// Sub-cycles before the first tap are idle: the flip-flop is not enabled and
// holds its cleared value, so three taps run on a 4x clock with the
// flip-flop enabled for three of the four cycles, and two taps on a 2x clock.
//
// An even number of XNOR steps from a cleared flip-flop equals the XOR of
// the taps, an odd number its complement. The default therefore obeys
// b[n] = b[n-2]^b[n-3]^b[n-5]^b[n-16] (period 65535) and an all-zero
// register locks up: load a non-zero state with fill. With an odd NTAPS the
// feedback is the XNOR and the lock-up state is all ones.
//
// fill selects din instead of the parity as the bit shifted in; 16 chips of
// fill load the register. dout is registered: it takes the last tap (the
// one read in the chip_en sub-cycle, stage 16 by default), so it changes once
// per chip. Put the longest tap last in TAP_ADDR so that dout is the output.
//
// Clocking: everything runs on clk4x (the multicycle clock, whatever its
// multiple). The reference design also has a separate chip-rate clock input;
// here the chip rate is the strobe chip_en from a SUB_W-bit sub-cycle
// counter, which keeps the design in one clock domain. The NTAPS and SUB_W
// generalisation follows the reference's rules for two and three taps.
// reset (asynchronous, active high) clears the counter, the parity flip-flop
// and dout; the shift register, like the primitive, has no reset.
module sr_16_tap1 #(
  parameter int unsigned     NTAPS    = 4,
  parameter int unsigned     SUB_W    = 2,
  parameter logic [3:0][3:0] TAP_ADDR = {4'd15, 4'd4, 4'd2, 4'd1}
) (
  input  logic clk4x,
  input  logic reset,
  input  logic din,
  input  logic fill,
  output logic dout,
  output logic chip_en
);

  localparam int unsigned NSUB  = 1 << SUB_W;
  localparam int unsigned FIRST = NSUB - NTAPS;   // sub-cycle of the first tap

  typedef logic [SUB_W-1:0] sub_t;

  // Bit k set: sub-cycle k reads a tap.
  localparam logic [NSUB-1:0] TAP_MASK = ~NSUB'((1 << FIRST) - 1);

  sub_t       sub;
  logic       tap_cycle;
  logic [1:0] tap_idx;
  logic [3:0] addr;
  logic       tap;
  logic       acc;
  logic       parity;
  logic       shift_in;

  always_ff @(posedge clk4x or posedge reset) begin
    if (reset) sub <= '0;
    else       sub <= sub + 1'b1;
  end

  assign tap_cycle = TAP_MASK[sub];
  assign tap_idx   = 2'(sub_t'(sub - sub_t'(FIRST)));   // don't-care when idle
  assign addr      = TAP_ADDR[tap_idx];
  assign chip_en   = (sub == sub_t'(NSUB - 1));
  assign parity    = ~(acc ^ tap);
  assign shift_in  = fill ? din : parity;

  srl16e #(.DEPTH(16), .AW(4)) u_srl (
    .clk (clk4x),
    .ce  (chip_en),
    .d   (shift_in),
    .a   (addr),
    .q   (tap)
  );

  // Serial parity flip-flop: enabled only in tap sub-cycles, cleared in the
  // last sub-cycle of each chip.
  always_ff @(posedge clk4x or posedge reset) begin
    if (reset)          acc <= 1'b0;
    else if (chip_en)   acc <= 1'b0;
    else if (tap_cycle) acc <= parity;
  end

  // Output flip-flop: samples the last tap once per chip.
  always_ff @(posedge clk4x or posedge reset) begin
    if (reset)        dout <= 1'b0;
    else if (chip_en) dout <= tap;
  end

  initial assert (SUB_W >= 1 && SUB_W <= 2 && NTAPS >= 1 && NTAPS <= NSUB)
    else $error("sr_16_tap1: need 1 <= NTAPS <= 2^SUB_W <= 4");

endmodule

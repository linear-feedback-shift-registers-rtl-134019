// lfsr_16 -- 16-stage, 4-tap LFSR built from parallel shift-register LUTs.
//
// Instead of one 16-stage register with four taps, the same new bit is shifted
// into four separate delay lines whose lengths equal the tap positions
// counted from the input: 2, 3, 5 and 16 (register stages 14, 13, 11 and 0
// of a 15-down-to-0 register whose input is stage 15). Because every line
// receives the same bit stream, the end of a line of length k always holds
// what stage k of the full register would hold, so all four taps are
// available at once while each line maps to one shift-register LUT.
// The four line outputs are combined by one XNOR (FB_XNOR=1, as the
// reference implementation does; FB_XNOR=0 gives plain XOR parity). The XNOR
// form locks up only in the all-ones state, so an all-zero start is legal.
// The recurrence is b[n] = ~(b[n-2]^b[n-3]^b[n-5]^b[n-16]), period 65535.
//
// A 2:1 multiplexer before the delay lines selects din instead of the
// feedback while fill is high: 16 enabled clocks with fill=1 set the whole
// state, since the lines themselves have no reset.
//
// A line longer than 16 is a cascade of srl16e: full 16-stage segments
// followed by one segment read at the remaining depth, so the same module
// builds larger LFSRs (for example LEN_U1..U4 = 1, 2, 22, 32 for a 32-stage
// register with taps 32, 22, 2, 1, six segments in all). Lines of 1 to
// MAX_LEN stages are accepted.
//
// Interface: dout[0..3] are the ends of lines U1..U4 (by default 2, 3, 5, 16);
// dout[3] is the LFSR output. ce is the chip-rate clock enable. One enabled
// clock per chip. Using the addressable srl16e for the 2-stage line (the
// reference uses two flip-flops there) is this design's choice.
module lfsr_16 #(
  parameter int unsigned LEN_U1  = 2,
  parameter int unsigned LEN_U2  = 3,
  parameter int unsigned LEN_U3  = 5,
  parameter int unsigned LEN_U4  = 16,
  parameter bit          FB_XNOR = 1'b1
) (
  input  logic       clk,
  input  logic       ce,
  input  logic       din,
  input  logic       fill,
  output logic [3:0] dout
);

  localparam int unsigned LEN [4] = '{LEN_U1, LEN_U2, LEN_U3, LEN_U4};
  localparam int unsigned SEG     = 16;
  localparam int unsigned MAX_LEN = 64;

  logic parity;
  logic shift_in;

  assign parity   = FB_XNOR ? ~(^dout) : ^dout;
  assign shift_in = fill ? din : parity;

  for (genvar t = 0; t < 4; t++) begin : g_tap
    localparam int unsigned NSEG = (LEN[t] + SEG - 1) / SEG;
    localparam int unsigned LAST = LEN[t] - SEG * (NSEG - 1);

    logic [NSEG:0] chain;   // chain[s]: input of segment s; chain[NSEG]: line end
    assign chain[0] = shift_in;

    for (genvar s = 0; s < NSEG; s++) begin : g_seg
      srl16e #(.DEPTH(SEG), .AW(4)) u_line (
        .clk (clk),
        .ce  (ce),
        .d   (chain[s]),
        .a   (4'((s == NSEG - 1) ? LAST - 1 : SEG - 1)),
        .q   (chain[s+1])
      );
    end

    assign dout[t] = chain[NSEG];

    initial assert (LEN[t] >= 1 && LEN[t] <= MAX_LEN)
      else $error("lfsr_16: line length %0d outside 1..%0d", LEN[t], MAX_LEN);
  end

endmodule

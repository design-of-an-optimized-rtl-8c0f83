// preshift_shifter: barrel shifter with hardwired pre-shifting.
//
// When every shift of a micro-rotation (or scaling) set is at least PRE (= l),
// the l LSBs of the register word are always shifted out, so they are never
// wired in: only the (W-l) MSBs feed a barrel shifter of (W-l) bits that
// shifts by k-l (at most MAX_SHIFT-l).  Its output forms the (W-l) LSBs of the
// adder operand; the l MSBs above it are fixed wiring.  The barrel shifter is
// l bits narrower and may lose multiplexer stages.  Those l MSBs carry the sign
// bit, which is 0 for non-negative words as in the original scheme and keeps
// negative coordinates right (this design's choice).
// Interface: din (register word), shamt (total shift k, PRE <= k <= MAX_SHIFT);
// dout = din >>> k.  Purely combinational.
module preshift_shifter #(
  parameter int unsigned W         = cordic_pkg::WIDTH,
  parameter int unsigned PRE       = 1,
  parameter int unsigned MAX_SHIFT = 14,
  localparam int unsigned BW       = W - PRE,
  localparam int unsigned BS       = MAX_SHIFT - PRE,
  localparam int unsigned SHW      = (BS < 1) ? 1 : $clog2(BS + 1)
) (
  input  logic [W-1:0]         din,
  input  cordic_pkg::shift_t   shamt,
  output logic [W-1:0]         dout
);

  logic [BW-1:0]  msbs;      // the (W-l) MSBs loaded into the barrel shifter
  logic [BW-1:0]  shifted;
  logic [SHW-1:0] rel_shamt; // k - l

  assign msbs      = din[W-1:PRE];
  assign rel_shamt = SHW'(shamt - cordic_pkg::shift_t'(PRE));

  barrel_shifter #(.W(BW), .MAX_SHIFT(BS)) u_bs (
    .din  (msbs),
    .shamt(rel_shamt),
    .dout (shifted)
  );

  // l MSBs of the operand are hardwired (sign bit), the rest is the shifter output
  if (PRE == 0) begin : g_nopre
    assign dout = shifted;
  end else begin : g_pre
    assign dout = {{PRE{din[W-1]}}, shifted};
  end

  initial begin
    assert (PRE <= MAX_SHIFT && MAX_SHIFT < W)
      else $error("preshift_shifter: need PRE <= MAX_SHIFT < W");
  end

endmodule

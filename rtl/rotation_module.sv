// rotation_module: one dedicated micro-rotation of a fixed-angle cascade.
//
// Performs X' = X - sigma*(Y >> SHIFT), Y' = Y + sigma*(X >> SHIFT) with
// sigma fixed by DIR (1 = +1).  The shift is pure wiring: each adder reads one
// coordinate directly and the other at its (W-SHIFT) LSB positions, the SHIFT
// MSBs above being fixed to the sign bit (0 for non-negative words; the sign
// fill is this design's choice).  Since the direction never changes, one
// unit is a fixed adder and the other a fixed subtractor; no barrel shifter
// and no sign-bit register are needed.  Combinational, wrapping arithmetic.
module rotation_module #(
  parameter int unsigned W     = cordic_pkg::WIDTH,
  parameter int unsigned SHIFT = 1,
  parameter bit          DIR   = 1'b1
) (
  input  logic [W-1:0] x_in,
  input  logic [W-1:0] y_in,
  output logic [W-1:0] x_out,
  output logic [W-1:0] y_out
);

  logic [W-1:0] x_sh, y_sh;

  assign x_sh = W'($signed(x_in) >>> SHIFT);
  assign y_sh = W'($signed(y_in) >>> SHIFT);

  if (DIR) begin : g_pos
    assign x_out = x_in - y_sh;
    assign y_out = y_in + x_sh;
  end else begin : g_neg
    assign x_out = x_in + y_sh;
    assign y_out = y_in - x_sh;
  end

endmodule

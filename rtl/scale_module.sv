// scale_module: one dedicated shift-add scaling term of a cascade.
//
// Multiplies both coordinates by (1 + delta*2^-SHIFT), delta fixed by DIR
// (1 = +1): X' = X + delta*(X >> SHIFT), Y' likewise.  The shift is wiring with
// the SHIFT MSBs taking the sign bit.  Combinational, wrapping arithmetic.
// Applying the scaling terms as dedicated stages of a pipeline, like the
// micro-rotations, is this design's choice.
module scale_module #(
  parameter int unsigned W     = cordic_pkg::WIDTH,
  parameter int unsigned SHIFT = 3,
  parameter bit          DIR   = 1'b0
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
    assign x_out = x_in + x_sh;
    assign y_out = y_in + y_sh;
  end else begin : g_neg
    assign x_out = x_in - x_sh;
    assign y_out = y_in - y_sh;
  end

endmodule

// fold_map: fixed quarter-turn and mirror used to fold any rotation angle into
// the 0..45 degree range of the micro-rotation sets.
//
// A fixed angle theta is written as theta = QUARTERS*90deg + s*phi with
// 0 < phi <= 45deg and s = +1 or -1.  The core rotator only turns by +phi.
// A turn by -phi is the mirror image of a turn by +phi, because
// R(-phi) = F R(phi) F with F(x, y) = (x, -y).  A quarter turn only swaps and
// negates coordinates.  The whole rotation is therefore
//   out = R(QUARTERS*90deg) F^m  R(phi)  F^m in,   m = (s < 0),
// built from two instances of this module: one before the core (MIRROR = m,
// QUARTERS = 0) and one after it (MIRROR = m, QUARTERS = q).  This module
// computes out = R(QUARTERS*90deg) F^MIRROR in.
// Only wiring and negation are used; a negation of the most negative word
// wraps to itself, so keep inputs inside the range (a choice of this design).
// Combinational.
module fold_map #(
  parameter int unsigned W        = cordic_pkg::WIDTH,
  parameter int unsigned QUARTERS = 1,     // 0..3 quarter turns counter-clockwise
  parameter bit          MIRROR   = 1'b0   // negate y first
) (
  input  logic [W-1:0] x_in,
  input  logic [W-1:0] y_in,
  output logic [W-1:0] x_out,
  output logic [W-1:0] y_out
);

  logic [W-1:0] ym;

  assign ym = MIRROR ? W'(-y_in) : y_in;

  always_comb begin
    unique case (QUARTERS % 4)
      0: begin x_out = x_in;        y_out = ym;        end
      1: begin x_out = W'(-ym);     y_out = x_in;      end
      2: begin x_out = W'(-x_in);   y_out = W'(-ym);   end
      default: begin x_out = ym;    y_out = W'(-x_in); end
    endcase
  end

endmodule

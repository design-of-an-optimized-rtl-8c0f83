// addsub: two's complement adder/subtractor of one CORDIC coordinate.
//
// sum = a + b when sub = 0 and a - b when sub = 1, wrapping to W bits; ovf flags
// signed overflow (the true result does not fit in W bits).  a is the
// coordinate taken straight from its register, b the shifted copy of a
// coordinate.  Combinational.  The overflow flag is this design's reading of
// the ovf outputs of the add/subtract units.
module addsub #(
  parameter int unsigned W = cordic_pkg::WIDTH
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         sub,
  output logic [W-1:0] sum,
  output logic         ovf
);

  logic [W-1:0] b_eff;

  always_comb begin
    b_eff = sub ? ~b : b;
    sum   = a + b_eff + W'(sub);
    // overflow: operands of equal sign give a result of the other sign
    ovf   = (a[W-1] == b_eff[W-1]) && (sum[W-1] != a[W-1]);
  end

endmodule

// barrel_shifter: arithmetic right shift of a W-bit word by 0..MAX_SHIFT places.
//
// Built the classic way: ceil(log2(MAX_SHIFT+1)) stages of W 2:1 multiplexers,
// stage j shifting by 2^j when bit j of the shift amount is set, so the cost
// grows linearly with the word length and logarithmically with the largest
// shift.  Vacated MSBs take the sign bit so two's complement coordinates keep
// their sign (the sign fill is this design's choice).
// Interface: din, shamt in; dout = din >>> shamt.  Purely combinational.
// shamt must not exceed MAX_SHIFT.
module barrel_shifter #(
  parameter int unsigned W         = cordic_pkg::WIDTH,
  parameter int unsigned MAX_SHIFT = 14,
  localparam int unsigned SHW      = (MAX_SHIFT < 1) ? 1 : $clog2(MAX_SHIFT + 1)
) (
  input  logic [W-1:0]   din,
  input  logic [SHW-1:0] shamt,
  output logic [W-1:0]   dout
);

  // stage[j] is the word after the first j multiplexer stages
  logic [W-1:0] stage [SHW+1];

  assign stage[0] = din;

  for (genvar j = 0; j < SHW; j++) begin : g_stage
    localparam int unsigned AMT = (2 ** j < W) ? 2 ** j : W - 1;
    assign stage[j+1] = shamt[j] ? W'($signed(stage[j]) >>> AMT) : stage[j];
  end

  assign dout = stage[SHW];

endmodule

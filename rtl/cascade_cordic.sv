// cascade_cordic: pipelined multi-stage single-rotation CORDIC for a fixed angle.
//
// A chain of M dedicated rotation modules, the i-th hardwired to shift k(i) and
// direction sigma_i, each followed by a register, then M2 dedicated scaling
// stages (1 + delta_j*2^-s(j)), also registered.  The initial vector enters the
// first module and every module feeds the next, so the rotated and scaled
// vector leaves the last stage.  No barrel shifters, ROM or sign-bit register.
//
// Interface / timing: in_valid with x0/y0 may be asserted every clock (one
// vector per clock, no back-pressure); out_valid with x/y follows M+M2 clocks
// later.  A register after every stage and the dedicated scaling stages are
// this design's choices.
module cascade_cordic #(
  parameter int unsigned                 W       = cordic_pkg::WIDTH,
  parameter int unsigned                 M       = cordic_pkg::ROT20_M,
  parameter cordic_pkg::shift_t [M-1:0]  SHIFTS  = cordic_pkg::ROT20_SHIFTS,
  parameter logic [M-1:0]                DIRS    = cordic_pkg::ROT20_DIRS,
  parameter int unsigned                 M2      = cordic_pkg::SCL20_M,
  parameter cordic_pkg::shift_t [M2-1:0] SSHIFTS = cordic_pkg::SCL20_SHIFTS,
  parameter logic [M2-1:0]               SDIRS   = cordic_pkg::SCL20_DIRS
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] x0,
  input  logic [W-1:0] y0,
  output logic         out_valid,
  output logic [W-1:0] x,
  output logic [W-1:0] y
);

  localparam int unsigned N = M + M2;   // pipeline stages

  // stage inputs (index j) and registered stage outputs (index j+1)
  logic [W-1:0] xs [N+1];
  logic [W-1:0] ys [N+1];
  logic         vs [N+1];

  assign xs[0] = x0;
  assign ys[0] = y0;
  assign vs[0] = in_valid;

  for (genvar j = 0; j < N; j++) begin : g_stage
    logic [W-1:0] xc, yc;
    if (j < M) begin : g_rot
      rotation_module #(.W(W), .SHIFT(32'(SHIFTS[j])), .DIR(DIRS[j])) u_rot (
        .x_in(xs[j]), .y_in(ys[j]), .x_out(xc), .y_out(yc));
    end else begin : g_scl
      scale_module #(.W(W), .SHIFT(32'(SSHIFTS[j-M])), .DIR(SDIRS[j-M])) u_scl (
        .x_in(xs[j]), .y_in(ys[j]), .x_out(xc), .y_out(yc));
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        xs[j+1] <= '0;
        ys[j+1] <= '0;
        vs[j+1] <= 1'b0;
      end else begin
        xs[j+1] <= xc;
        ys[j+1] <= yc;
        vs[j+1] <= vs[j];
      end
    end
  end

  assign x         = xs[N];
  assign y         = ys[N];
  assign out_valid = vs[N];

endmodule

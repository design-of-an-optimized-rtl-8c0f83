// bi_rotation_cordic: pipelined fixed-angle CORDIC whose stages each make a
// pair of micro-rotations.
//
// The M dedicated micro-rotations of the angle are grouped two by two: each
// pipeline stage chains two rotation modules (hardwired shifts k(2p), k(2p+1)
// and fixed directions) between its input and its register, so the rotation
// takes ceil(M/2) stages instead of M.  An odd last micro-rotation has a stage
// of its own.  The M2 scaling terms follow in the same way, two per stage.
// The pairing into one stage is this design's reading of a bi-rotation unit.
//
// Interface / timing: one vector per clock on in_valid/x0/y0, no
// back-pressure; out_valid with x/y follows ceil(M/2)+ceil(M2/2) clocks later.
module bi_rotation_cordic #(
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

  localparam int unsigned NR = (M + 1) / 2;    // rotation stages
  localparam int unsigned NS = (M2 + 1) / 2;   // scaling stages
  localparam int unsigned N  = NR + NS;

  logic [W-1:0] xs [N+1];
  logic [W-1:0] ys [N+1];
  logic         vs [N+1];

  assign xs[0] = x0;
  assign ys[0] = y0;
  assign vs[0] = in_valid;

  for (genvar p = 0; p < N; p++) begin : g_stage
    logic [W-1:0] xa, ya, xc, yc;   // after first / second operation
    if (p < NR) begin : g_rot
      rotation_module #(.W(W), .SHIFT(32'(SHIFTS[2*p])), .DIR(DIRS[2*p])) u_rot0 (
        .x_in(xs[p]), .y_in(ys[p]), .x_out(xa), .y_out(ya));
      if (2 * p + 1 < M) begin : g_pair
        rotation_module #(.W(W), .SHIFT(32'(SHIFTS[2*p+1])), .DIR(DIRS[2*p+1])) u_rot1 (
          .x_in(xa), .y_in(ya), .x_out(xc), .y_out(yc));
      end else begin : g_single
        assign xc = xa;
        assign yc = ya;
      end
    end else begin : g_scl
      localparam int unsigned Q = p - NR;
      scale_module #(.W(W), .SHIFT(32'(SSHIFTS[2*Q])), .DIR(SDIRS[2*Q])) u_scl0 (
        .x_in(xs[p]), .y_in(ys[p]), .x_out(xa), .y_out(ya));
      if (2 * Q + 1 < M2) begin : g_pair
        scale_module #(.W(W), .SHIFT(32'(SSHIFTS[2*Q+1])), .DIR(SDIRS[2*Q+1])) u_scl1 (
          .x_in(xa), .y_in(ya), .x_out(xc), .y_out(yc));
      end else begin : g_single
        assign xc = xa;
        assign yc = ya;
      end
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        xs[p+1] <= '0;
        ys[p+1] <= '0;
        vs[p+1] <= 1'b0;
      end else begin
        xs[p+1] <= xc;
        ys[p+1] <= yc;
        vs[p+1] <= vs[p];
      end
    end
  end

  assign x         = xs[N];
  assign y         = ys[N];
  assign out_valid = vs[N];

endmodule

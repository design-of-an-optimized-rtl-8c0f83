// fixed_angle_cordic_top: vector rotation through one fixed, known angle.
//
// Two engines compute the same rotation (20 degrees by default, given as
// 7 micro-rotations and 4 shift-add scaling terms in cordic_pkg):
//  * Iterative engine (it_*): opt_cordic makes one micro-rotation per clock
//    (ROM-selected shift, sign-bit-register direction, hardwired pre-shifting
//    barrel shifters); when it finishes, scaling_circuit multiplies the vector
//    by K_A, one term per clock.  Low area, one vector per ROT_M+SCL_M+2 clocks.
//  * Pipelined engines (pl_* in): cascade_cordic, one dedicated registered
//    stage per micro-rotation and per scaling term (results on cs_*), and
//    bi_rotation_cordic, two operations per stage (results on br_*).  Both
//    take a vector every clock.
// Any fixed angle is folded into the sets' 0..45 degree range: fold_map
// instances mirror the input (MIRROR) and, after the engines, mirror back and
// add QUARTERS quarter turns, so the total turn is
// QUARTERS*90deg +/- the set's angle.  The defaults (0, 0) leave 20 degrees.
// Placing the engines side by side, sharing the input stream of the two
// cascades, and chaining the rotator's done into the scaler's start are this
// design's choices.
//
// Timing: it_start while it_busy is low loads it_x0/it_y0; it_done pulses
// ROT_M+SCL_M+1 clocks after that edge with the result on it_x/it_y (held
// until the next start); it_ovf flags an adder overflow during that operation.
// cs_valid follows pl_valid_in by ROT_M+SCL_M clocks, br_valid by
// ceil(ROT_M/2)+ceil(SCL_M/2) clocks.  Reset: asynchronous, active low.
module fixed_angle_cordic_top #(
  parameter int unsigned                    W          = cordic_pkg::WIDTH,
  parameter int unsigned                    ROT_M      = cordic_pkg::ROT20_M,
  parameter cordic_pkg::shift_t [ROT_M-1:0] ROT_SHIFTS = cordic_pkg::ROT20_SHIFTS,
  parameter logic [ROT_M-1:0]               ROT_DIRS   = cordic_pkg::ROT20_DIRS,
  parameter int unsigned                    SCL_M      = cordic_pkg::SCL20_M,
  parameter cordic_pkg::shift_t [SCL_M-1:0] SCL_SHIFTS = cordic_pkg::SCL20_SHIFTS,
  parameter logic [SCL_M-1:0]               SCL_DIRS   = cordic_pkg::SCL20_DIRS,
  // angle folding: total turn = QUARTERS*90deg + (MIRROR ? -1 : +1) * set angle
  parameter int unsigned                    QUARTERS   = 0,
  parameter bit                             MIRROR     = 1'b0
) (
  input  logic         clk,
  input  logic         rst_n,
  // iterative engine
  input  logic         it_start,
  input  logic [W-1:0] it_x0,
  input  logic [W-1:0] it_y0,
  output logic         it_busy,
  output logic         it_done,
  output logic [W-1:0] it_x,
  output logic [W-1:0] it_y,
  output logic         it_ovf,
  // pipelined engines
  input  logic         pl_valid_in,
  input  logic [W-1:0] pl_x0,
  input  logic [W-1:0] pl_y0,
  output logic         cs_valid,
  output logic [W-1:0] cs_x,
  output logic [W-1:0] cs_y,
  output logic         br_valid,
  output logic [W-1:0] br_x,
  output logic [W-1:0] br_y
);

  logic         rot_busy, rot_done, rot_ovf;
  logic [W-1:0] rot_x, rot_y;
  logic         scl_busy, scl_ovf;

  logic [W-1:0] it_fx, it_fy, pl_fx, pl_fy;            // folded inputs
  logic [W-1:0] scl_x, scl_y, cs_rx, cs_ry, br_rx, br_ry; // core results

  assign it_busy = rot_busy | rot_done | scl_busy;

  fold_map #(.W(W), .QUARTERS(0), .MIRROR(MIRROR)) u_fold_it_in (
    .x_in(it_x0), .y_in(it_y0), .x_out(it_fx), .y_out(it_fy));
  fold_map #(.W(W), .QUARTERS(0), .MIRROR(MIRROR)) u_fold_pl_in (
    .x_in(pl_x0), .y_in(pl_y0), .x_out(pl_fx), .y_out(pl_fy));

  opt_cordic #(.W(W), .M(ROT_M), .SHIFTS(ROT_SHIFTS), .DIRS(ROT_DIRS)) u_rot (
    .clk  (clk),
    .rst_n(rst_n),
    .start(it_start && !it_busy),
    .x0   (it_fx),
    .y0   (it_fy),
    .busy (rot_busy),
    .done (rot_done),
    .x    (rot_x),
    .y    (rot_y),
    .ovf  (rot_ovf)
  );

  scaling_circuit #(.W(W), .M(SCL_M), .SHIFTS(SCL_SHIFTS), .DIRS(SCL_DIRS)) u_scl (
    .clk  (clk),
    .rst_n(rst_n),
    .start(rot_done),
    .x0   (rot_x),
    .y0   (rot_y),
    .busy (scl_busy),
    .done (it_done),
    .x    (scl_x),
    .y    (scl_y),
    .ovf  (scl_ovf)
  );

  assign it_ovf = rot_ovf | scl_ovf;

  cascade_cordic #(
    .W(W), .M(ROT_M), .SHIFTS(ROT_SHIFTS), .DIRS(ROT_DIRS),
    .M2(SCL_M), .SSHIFTS(SCL_SHIFTS), .SDIRS(SCL_DIRS)
  ) u_cascade (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (pl_valid_in),
    .x0       (pl_fx),
    .y0       (pl_fy),
    .out_valid(cs_valid),
    .x        (cs_rx),
    .y        (cs_ry)
  );

  bi_rotation_cordic #(
    .W(W), .M(ROT_M), .SHIFTS(ROT_SHIFTS), .DIRS(ROT_DIRS),
    .M2(SCL_M), .SSHIFTS(SCL_SHIFTS), .SDIRS(SCL_DIRS)
  ) u_birot (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (pl_valid_in),
    .x0       (pl_fx),
    .y0       (pl_fy),
    .out_valid(br_valid),
    .x        (br_rx),
    .y        (br_ry)
  );

  fold_map #(.W(W), .QUARTERS(QUARTERS), .MIRROR(MIRROR)) u_fold_it_out (
    .x_in(scl_x), .y_in(scl_y), .x_out(it_x), .y_out(it_y));
  fold_map #(.W(W), .QUARTERS(QUARTERS), .MIRROR(MIRROR)) u_fold_cs_out (
    .x_in(cs_rx), .y_in(cs_ry), .x_out(cs_x), .y_out(cs_y));
  fold_map #(.W(W), .QUARTERS(QUARTERS), .MIRROR(MIRROR)) u_fold_br_out (
    .x_in(br_rx), .y_in(br_ry), .x_out(br_x), .y_out(br_y));

endmodule

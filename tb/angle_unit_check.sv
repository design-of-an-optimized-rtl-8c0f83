// angle_unit_check: one build of fixed_angle_cordic_top for a given angle,
// with its own checker, for the workload testbench.  On each go pulse it
// runs vector (vx, vy) through the iterative engine and then through both
// cascades, compares every result with x*cos - y*sin, x*sin + y*cos of DEG
// and requires the three engines to agree bit for bit.  checks/failures
// count what it compared; idle is high between vectors.
module angle_unit_check #(
  parameter real                                 DEG        = 20.0,
  parameter int unsigned                         ROT_M      = cordic_pkg::ROT20_M,
  parameter cordic_pkg::shift_t [ROT_M-1:0]      ROT_SHIFTS = cordic_pkg::ROT20_SHIFTS,
  parameter logic [ROT_M-1:0]                    ROT_DIRS   = cordic_pkg::ROT20_DIRS,
  parameter int unsigned                         SCL_M      = cordic_pkg::SCL20_M,
  parameter cordic_pkg::shift_t [SCL_M-1:0]      SCL_SHIFTS = cordic_pkg::SCL20_SHIFTS,
  parameter logic [SCL_M-1:0]                    SCL_DIRS   = cordic_pkg::SCL20_DIRS,
  parameter int unsigned                         QUARTERS   = 0,
  parameter bit                                  MIRROR     = 1'b0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         go,
  input  longint       vx,
  input  longint       vy,
  output logic         idle,
  output int           checks,
  output int           failures
);
  import cordic_ref_pkg::*;

  localparam int W = 25;

  logic         it_start = 0, pl_valid_in = 0;
  logic [W-1:0] it_x0 = '0, it_y0 = '0, pl_x0 = '0, pl_y0 = '0;
  logic         it_busy, it_done, it_ovf, cs_valid, br_valid;
  logic [W-1:0] it_x, it_y, cs_x, cs_y, br_x, br_y;

  fixed_angle_cordic_top #(
    .ROT_M(ROT_M), .ROT_SHIFTS(ROT_SHIFTS), .ROT_DIRS(ROT_DIRS),
    .SCL_M(SCL_M), .SCL_SHIFTS(SCL_SHIFTS), .SCL_DIRS(SCL_DIRS),
    .QUARTERS(QUARTERS), .MIRROR(MIRROR)
  ) dut (.*);

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %0.1f deg: %s", DEG, msg);
    end
  endtask

  task automatic close(string nm, longint ax, longint ay, logic [W-1:0] xw, logic [W-1:0] yw);
    real a, rx, ry, tol;
    longint gx, gy;
    gx  = longint'($signed(xw));
    gy  = longint'($signed(yw));
    a   = deg2rad(DEG);
    rx  = ax * $cos(a) - ay * $sin(a);
    ry  = ax * $sin(a) + ay * $cos(a);
    tol = 64.0 + 3.0e-5 * (absr(ax) + absr(ay));
    chk(absr(gx - rx) < tol && absr(gy - ry) < tol,
        $sformatf("%s (%0d,%0d) -> (%0d,%0d), exact (%f,%f)", nm, ax, ay, gx, gy, rx, ry));
  endtask

  initial begin
    logic [W-1:0] ix, iy;
    longint ax, ay;
    checks = 0; failures = 0; idle = 1;
    forever begin
      @(posedge clk iff go);
      idle = 0;
      ax = vx; ay = vy;
      #1;
      it_x0 = W'(ax); it_y0 = W'(ay); it_start = 1;
      @(posedge clk); #1;
      it_start = 0;
      wait (it_done);
      ix = it_x; iy = it_y;
      close("iterative", ax, ay, ix, iy);
      chk(!it_ovf, "unexpected overflow");
      if (ax == (longint'(1) <<< 20) && ay == 0)
        $display("(1,0) by %0.1f deg: (%0.6f, %0.6f)", DEG,
                 $signed(ix) / 1048576.0, $signed(iy) / 1048576.0);
      @(posedge clk); #1;
      pl_x0 = W'(ax); pl_y0 = W'(ay); pl_valid_in = 1;
      @(posedge clk); #1;
      pl_valid_in = 0;
      fork
        begin wait (cs_valid); chk(cs_x == ix && cs_y == iy, "cascade differs from iterative"); end
        begin wait (br_valid); chk(br_x == ix && br_y == iy, "bi-rotation differs from iterative"); end
      join
      @(posedge clk); #1;
      idle = 1;
    end
  end
endmodule

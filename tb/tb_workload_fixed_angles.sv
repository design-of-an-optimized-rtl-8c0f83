// tb_workload_fixed_angles: the fixed rotations the design is built for, run
// through the whole rotator: the unit vector (1,0) (1.0 = 2^20) and random
// vectors turned by
//   20 deg   default build (7 micro-rotations, 4 scaling terms)
//   30 deg   30-degree set (9 micro-rotations, 5 scaling terms)
//   70 deg   90 - 20: one quarter turn with the 20-degree set mirrored
//   200 deg  180 + 20: two quarter turns after the 20-degree set
//   -30 deg  the 30-degree set mirrored
// In every build the three engines must agree bit for bit and match
// x*cos - y*sin, x*sin + y*cos within the set's angle and gain error.
module tb_workload_fixed_angles;
  import cordic_ref_pkg::*;

  localparam int NB = 5;

  logic   clk = 0, rst_n = 0, go = 0;
  longint vx = 0, vy = 0;
  logic   idle [NB];
  int     c [NB];
  int     f [NB];

  angle_unit_check #(.DEG(20.0)) u20 (
    .clk(clk), .rst_n(rst_n), .go(go), .vx(vx), .vy(vy), .idle(idle[0]), .checks(c[0]), .failures(f[0]));
  angle_unit_check #(.DEG(30.0),
    .ROT_M(9), .ROT_SHIFTS(cordic_pkg::ROT30_SHIFTS), .ROT_DIRS(cordic_pkg::ROT30_DIRS),
    .SCL_M(5), .SCL_SHIFTS(cordic_pkg::SCL30_SHIFTS), .SCL_DIRS(cordic_pkg::SCL30_DIRS)) u30 (
    .clk(clk), .rst_n(rst_n), .go(go), .vx(vx), .vy(vy), .idle(idle[1]), .checks(c[1]), .failures(f[1]));
  angle_unit_check #(.DEG(70.0), .QUARTERS(1), .MIRROR(1'b1)) u70 (
    .clk(clk), .rst_n(rst_n), .go(go), .vx(vx), .vy(vy), .idle(idle[2]), .checks(c[2]), .failures(f[2]));
  angle_unit_check #(.DEG(200.0), .QUARTERS(2)) u200 (
    .clk(clk), .rst_n(rst_n), .go(go), .vx(vx), .vy(vy), .idle(idle[3]), .checks(c[3]), .failures(f[3]));
  angle_unit_check #(.DEG(-30.0),
    .ROT_M(9), .ROT_SHIFTS(cordic_pkg::ROT30_SHIFTS), .ROT_DIRS(cordic_pkg::ROT30_DIRS),
    .SCL_M(5), .SCL_SHIFTS(cordic_pkg::SCL30_SHIFTS), .SCL_DIRS(cordic_pkg::SCL30_DIRS),
    .MIRROR(1'b1)) um30 (
    .clk(clk), .rst_n(rst_n), .go(go), .vx(vx), .vy(vy), .idle(idle[4]), .checks(c[4]), .failures(f[4]));

  always #5 clk = ~clk;

  function automatic int total(input int a [NB]);
    int s = 0;
    foreach (a[i]) s += a[i];
    return s;
  endfunction

  function automatic bit all_idle();
    bit r = 1;
    foreach (idle[i]) r &= idle[i];
    return r;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", total(c), total(f) + 1);
    $finish;
  end

  initial begin
    int fails;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 30; n++) begin
      @(posedge clk); #1;
      vx = (n == 0) ? longint'(1) <<< 20 : rand_word(25, 2);
      vy = (n == 0) ? 0 : rand_word(25, 2);
      go = 1;
      @(posedge clk); #1;
      go = 0;
      @(posedge clk); #1;
      do @(posedge clk); while (!all_idle());
    end
    fails = total(f);
    foreach (c[i]) if (c[i] == 0) fails++;   // every build must have run
    $display("TB_RESULT checks=%0d failures=%0d", total(c), fails);
    $finish;
  end
endmodule

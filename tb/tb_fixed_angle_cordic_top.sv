// tb_fixed_angle_cordic_top: end-to-end test of the fixed-angle rotator at its
// default size (25-bit words, 20 degrees, 7 micro-rotations, 4 scaling terms).
//  1. Iterative engine: random vectors; every result is compared bit-exactly
//     with an integer model (micro-rotations, then scaling) and in real numbers
//     with the exact rotation; it_done must follow the start edge by
//     ROT_M+SCL_M+1 clocks.  A start while busy must be ignored.
//  2. Pipelined engines: a stream with gaps into both cascades; each result is
//     checked against the model, against the other cascade and against the
//     iterative engine's result for the same vector (all three must agree bit
//     for bit), with its latency.
//  3. Repeated rotation: a unit vector is turned 18 times by 20 degrees
//     through the iterative engine and must come back to where it started.
//  4. Overflow: a full-scale vector must raise it_ovf.
// Each mechanism is counted and a mechanism that never happened is a failure.
module tb_fixed_angle_cordic_top;
  import cordic_ref_pkg::*;

  localparam int W     = 25;
  localparam int LAT_IT = 7 + 4 + 1;
  localparam int LAT_CS = 7 + 4;
  localparam int LAT_BR = 4 + 2;

  int checks = 0, failures = 0;
  int n_iter = 0, n_ignored = 0, n_ovf = 0, n_preshift_drop = 0;
  int n_cs = 0, n_br = 0, n_b2b = 0, n_steps = 0;

  logic clk = 0, rst_n = 0;
  logic         it_start = 0;
  logic [W-1:0] it_x0 = '0, it_y0 = '0;
  logic         it_busy, it_done, it_ovf;
  logic [W-1:0] it_x, it_y;
  logic         pl_valid_in = 0;
  logic [W-1:0] pl_x0 = '0, pl_y0 = '0;
  logic         cs_valid, br_valid;
  logic [W-1:0] cs_x, cs_y, br_x, br_y;

  fixed_angle_cordic_top dut (.*);

  always #5 clk = ~clk;

  // pre-shifting at work: the rotator's register LSB (never wired into the
  // l = 1 pre-shifted barrel shifter) is set while it iterates
  always @(posedge clk)
    if (dut.u_rot.busy && (dut.u_rot.x_q[0] || dut.u_rot.y_q[0])) n_preshift_drop++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  function automatic bit model(longint vx, longint vy, output longint ex, output longint ey);
    bit ov = 0;
    ex = vx; ey = vy;
    for (int i = 0; i < 7; i++) ov |= rot_step(ex, ey, R20_K[i], R20_S[i], W);
    for (int i = 0; i < 4; i++) ov |= scl_step(ex, ey, S20_K[i], S20_S[i], W);
    return ov;
  endfunction

  // one operation of the iterative engine; returns the result
  task automatic iterate(longint vx, longint vy, bit poke, output longint gx, output longint gy);
    longint ex, ey;
    bit     eovf;
    int     cyc;
    real    a, rx, ry;
    eovf = model(vx, vy, ex, ey);
    @(posedge clk);
    #1;
    it_x0 = W'(vx); it_y0 = W'(vy); it_start = 1;
    @(posedge clk);
    #1;
    it_start = 0;
    cyc = 0;
    do begin
      if (poke && cyc == 3) begin
        chk(it_busy, "not busy during an operation");
        it_x0 = ~W'(vx); it_start = 1;    // must be ignored
        n_ignored++;
      end else it_start = 0;
      @(posedge clk);
      #1;
      cyc++;
    end while (!it_done && cyc < 100);
    it_start = 0;
    gx = longint'($signed(it_x));
    gy = longint'($signed(it_y));
    n_iter++;
    chk(cyc == LAT_IT, $sformatf("iterative latency %0d, expected %0d", cyc, LAT_IT));
    chk(gx == ex && gy == ey, $sformatf("iterative (%0d,%0d) -> (%0d,%0d), model (%0d,%0d)", vx, vy, gx, gy, ex, ey));
    chk(it_ovf == eovf, $sformatf("it_ovf=%0d, model %0d", it_ovf, eovf));
    if (eovf) n_ovf++;
    else begin
      a  = deg2rad(20.0);
      rx = vx * $cos(a) - vy * $sin(a);
      ry = vx * $sin(a) + vy * $cos(a);
      chk(absr(gx - rx) < 64.0 + 3.0e-5 * (absr(vx) + absr(vy)) &&
          absr(gy - ry) < 64.0 + 3.0e-5 * (absr(vx) + absr(vy)),
          $sformatf("iterative accuracy (%0d,%0d) vs (%f,%f)", gx, gy, rx, ry));
    end
  endtask

  typedef struct { longint vx, vy, ex, ey; int t; } item_t;
  item_t qcs[$], qbr[$];

  task automatic check_pipe(string nm, logic [W-1:0] xw, logic [W-1:0] yw, int lat, int cycle, ref item_t q[$]);
    item_t  it;
    longint gx, gy, ix, iy;
    if (q.size() == 0) begin
      chk(0, {nm, " output with nothing in flight"});
      return;
    end
    it = q.pop_front();
    gx = longint'($signed(xw));
    gy = longint'($signed(yw));
    chk(cycle - it.t == lat, $sformatf("%s latency %0d, expected %0d", nm, cycle - it.t, lat));
    chk(gx == it.ex && gy == it.ey, $sformatf("%s (%0d,%0d) -> (%0d,%0d), model (%0d,%0d)",
        nm, it.vx, it.vy, gx, gy, it.ex, it.ey));
  endtask

  initial begin
    longint gx, gy, cx, cy, px[$], py[$], rx[$], ry[$];
    bit     prev_cs = 0;
    int     cycle = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // 1. iterative engine
    iterate(longint'(1) <<< 20, 0, 0, gx, gy);
    for (int n = 0; n < 40; n++) begin
      longint vx, vy;
      vx = rand_word(W, 2);
      vy = rand_word(W, 2);
      iterate(vx, vy, n % 5 == 1, gx, gy);
      px.push_back(vx); py.push_back(vy); rx.push_back(gx); ry.push_back(gy);
    end

    // 2. pipelined engines: replay the same vectors, then random ones
    for (int n = 0; n < 200; n++) begin
      @(posedge clk);
      #1;
      cycle++;
      if (cs_valid) begin
        n_cs++;
        if (prev_cs) n_b2b++;
        check_pipe("cascade", cs_x, cs_y, LAT_CS, cycle, qcs);
      end
      prev_cs = cs_valid;
      if (br_valid) begin
        n_br++;
        check_pipe("bi-rotation", br_x, br_y, LAT_BR, cycle, qbr);
      end
      if (n < 150 && (n < 40 || $urandom % 4 != 0)) begin
        item_t it;
        if (n < 40) begin
          it.vx = px[n]; it.vy = py[n];
        end else begin
          it.vx = rand_word(W, 2); it.vy = rand_word(W, 2);
        end
        void'(model(it.vx, it.vy, it.ex, it.ey));
        if (n < 40)
          chk(it.ex == rx[n] && it.ey == ry[n], "iterative engine and model disagree on a replayed vector");
        it.t = cycle;
        qcs.push_back(it);
        qbr.push_back(it);
        pl_valid_in = 1; pl_x0 = W'(it.vx); pl_y0 = W'(it.vy);
      end else begin
        pl_valid_in = 0; pl_x0 = W'($urandom); pl_y0 = W'($urandom);
      end
    end
    chk(qcs.size() == 0 && qbr.size() == 0, "pipelined results missing");

    // 3. repeated rotation: 18 x 20 degrees = 360 degrees
    cx = longint'(1) <<< 20; cy = 0;
    for (int s = 0; s < 18; s++) begin
      iterate(cx, cy, 0, gx, gy);
      cx = gx; cy = gy;
      n_steps++;
    end
    cx = cx - (longint'(1) <<< 20);
    chk(cx < 1024 && cx > -1024 && cy < 1024 && cy > -1024,
        $sformatf("after 360 degrees: error (%0d,%0d)", cx, cy));

    // 4. overflow
    iterate((longint'(1) <<< 24) - 1, (longint'(1) <<< 24) - 1, 0, gx, gy);
    iterate(1000, -1000, 0, gx, gy);
    chk(!it_ovf, "it_ovf not cleared by the next operation");

    chk(n_iter > 0,          "no iterative operation");
    chk(n_ignored > 0,       "no start while busy");
    chk(n_ovf > 0,           "no overflow");
    chk(n_preshift_drop > 0, "no pre-shifted iteration dropped a set LSB");
    chk(n_cs > 0 && n_br > 0, "no pipelined result");
    chk(n_b2b > 0,           "no back-to-back cascade results");
    chk(n_steps == 18,       "repeated rotation incomplete");
    $display("mechanisms: iterative=%0d ignored_starts=%0d overflows=%0d preshift_drops=%0d cascade=%0d bi_rotation=%0d back_to_back=%0d steps=%0d",
             n_iter, n_ignored, n_ovf, n_preshift_drop, n_cs, n_br, n_b2b, n_steps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

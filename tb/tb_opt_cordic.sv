// tb_opt_cordic: runs random vectors through the iterative rotator for
// 20 degrees (default) and 30 degrees (9 micro-rotations, no pre-shift), and
// in the configuration of the plain reference circuit (shifts 0,1,...,15 in
// turn, directions of a 20 degree rotation).
// Every result is compared bit-exactly with an integer model of the same
// micro-rotations, the unscaled result divided by the CORDIC gain is compared
// with the exact rotation (by the set's own angle sum for the reference
// configuration), done must come M clocks after the start edge, a
// start while busy must be ignored, and an overflowing operation must raise
// ovf.
module tb_opt_cordic;
  import cordic_ref_pkg::*;

  localparam int W = 25;

  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic         st20 = 0, st30 = 0, stref = 0;
  logic         bref, dref, oref;
  logic [W-1:0] xref, yref;
  logic [W-1:0] x0, y0;
  logic         b20, d20, o20, b30, d30, o30;
  logic [W-1:0] x20, y20, x30, y30;

  opt_cordic dut20 (.clk(clk), .rst_n(rst_n), .start(st20), .x0(x0), .y0(y0),
                    .busy(b20), .done(d20), .x(x20), .y(y20), .ovf(o20));
  opt_cordic #(.M(9), .SHIFTS(cordic_pkg::ROT30_SHIFTS), .DIRS(cordic_pkg::ROT30_DIRS)) dut30 (
                    .clk(clk), .rst_n(rst_n), .start(st30), .x0(x0), .y0(y0),
                    .busy(b30), .done(d30), .x(x30), .y(y30), .ovf(o30));

  opt_cordic #(.M(16),
               .SHIFTS({5'd15, 5'd14, 5'd13, 5'd12, 5'd11, 5'd10, 5'd9, 5'd8,
                        5'd7, 5'd6, 5'd5, 5'd4, 5'd3, 5'd2, 5'd1, 5'd0}),
               .DIRS(16'b1010000001000101)) dutref (
                    .clk(clk), .rst_n(rst_n), .start(stref), .x0(x0), .y0(y0),
                    .busy(bref), .done(dref), .x(xref), .y(yref), .ovf(oref));

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
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

  // run one vector on one instance (sel 0: 20 deg, 1: 30 deg, 2: reference)
  task automatic run(int sel, longint vx, longint vy, bit poke_busy);
    longint ex, ey, gx, gy;
    bit     eovf;
    int     m, cyc;
    real    th, gain, rx, ry;
    m    = (sel == 2) ? 16 : sel ? 9 : 7;
    ex   = vx; ey = vy; eovf = 0; gain = 1.0; th = 0.0;
    for (int i = 0; i < m; i++) begin
      int k, s;
      k = (sel == 2) ? i : sel ? R30_K[i] : R20_K[i];
      s = (sel == 2) ? REF_S[i] : sel ? R30_S[i] : R20_S[i];
      eovf |= rot_step(ex, ey, k, s, W);
      gain *= $sqrt(1.0 + 2.0 ** (-2.0 * k));
      th   += s * $atan(2.0 ** (-1.0 * k));
    end
    @(posedge clk);
    x0 <= W'(vx); y0 <= W'(vy);
    if (sel == 2) stref <= 1; else if (sel) st30 <= 1; else st20 <= 1;
    @(posedge clk);
    st20 <= 0; st30 <= 0; stref <= 0;
    cyc = 0;
    do begin
      if (poke_busy && cyc == 2) begin
        // a start while busy, with other data, must be ignored
        x0 <= ~W'(vx); y0 <= W'(vx);
        if (sel == 2) stref <= 1; else if (sel) st30 <= 1; else st20 <= 1;
      end else begin
        st20 <= 0; st30 <= 0; stref <= 0;
      end
      @(posedge clk);
      #1;
      cyc++;
    end while (!((sel == 2) ? dref : sel ? d30 : d20) && cyc < 100);
    st20 <= 0; st30 <= 0; stref <= 0;
    gx = (sel == 2) ? longint'($signed(xref)) : sel ? longint'($signed(x30)) : longint'($signed(x20));
    gy = (sel == 2) ? longint'($signed(yref)) : sel ? longint'($signed(y30)) : longint'($signed(y20));
    chk(cyc == m, $sformatf("sel%0d latency %0d, expected %0d", sel, cyc, m));
    chk(gx == ex && gy == ey, $sformatf("sel%0d (%0d,%0d) -> (%0d,%0d), model (%0d,%0d)", sel, vx, vy, gx, gy, ex, ey));
    chk(((sel == 2) ? oref : sel ? o30 : o20) == eovf, $sformatf("sel%0d ovf model %0d", sel, eovf));
    if (!eovf) begin
      real a;
      a  = (sel == 2) ? th : deg2rad(sel ? 30.0 : 20.0);
      rx = (vx * $cos(a) - vy * $sin(a)) * gain;
      ry = (vx * $sin(a) + vy * $cos(a)) * gain;
      chk(absr(gx - rx) < 4.0 * m + 2.0e-6 * (absr(vx) + absr(vy)) &&
          absr(gy - ry) < 4.0 * m + 2.0e-6 * (absr(vx) + absr(vy)),
          $sformatf("sel%0d accuracy (%0d,%0d) vs (%f,%f)", sel, gx, gy, rx, ry));
    end
  endtask

  initial begin
    x0 = '0; y0 = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int sel = 0; sel < 3; sel++) begin
      run(sel, longint'(1) <<< 20, 0, 0);          // unit vector (1.0 = 2^20)
      run(sel, 0, longint'(1) <<< 20, 1);
      run(sel, -(longint'(1) <<< 21), 12345, 0);
      for (int n = 0; n < 60; n++) run(sel, rand_word(W, 2), rand_word(W, 2), n % 7 == 0);
      // overflow: both coordinates near full scale
      run(sel, (longint'(1) <<< 24) - 1, (longint'(1) <<< 24) - 1, 0);
      chk((sel == 2) ? oref : sel ? o30 : o20, "overflow not flagged");
      run(sel, 1000, 1000, 0);   // ovf clears on the next operation
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

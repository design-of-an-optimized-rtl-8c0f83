// tb_scaling_circuit: runs random vectors through the iterative scaling
// circuit with the 20-degree terms (default, l = 3) and the 30-degree terms
// (5 terms, l = 1).  Results are compared bit-exactly with an integer model of
// the shift-add terms and, in real numbers, with the input times K_A; done
// must come M clocks after the start edge and ovf must match the model
// (full-scale inputs included).
module tb_scaling_circuit;
  import cordic_ref_pkg::*;

  localparam int W = 25;

  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic         st20 = 0, st30 = 0;
  logic [W-1:0] x0, y0;
  logic         b20, d20, o20, b30, d30, o30;
  logic [W-1:0] x20, y20, x30, y30;

  scaling_circuit dut20 (.clk(clk), .rst_n(rst_n), .start(st20), .x0(x0), .y0(y0),
                         .busy(b20), .done(d20), .x(x20), .y(y20), .ovf(o20));
  scaling_circuit #(.M(5), .SHIFTS(cordic_pkg::SCL30_SHIFTS), .DIRS(cordic_pkg::SCL30_DIRS)) dut30 (
                         .clk(clk), .rst_n(rst_n), .start(st30), .x0(x0), .y0(y0),
                         .busy(b30), .done(d30), .x(x30), .y(y30), .ovf(o30));

  always #5 clk = ~clk;

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

  task automatic run(int sel, longint vx, longint vy);
    longint ex, ey, gx, gy;
    bit     eovf;
    int     m, cyc;
    real    ka;
    m  = sel ? 5 : 4;
    ex = vx; ey = vy; eovf = 0; ka = 1.0;
    for (int i = 0; i < m; i++) begin
      int s, d;
      s = sel ? S30_K[i] : S20_K[i];
      d = sel ? S30_S[i] : S20_S[i];
      eovf |= scl_step(ex, ey, s, d, W);
      ka   *= 1.0 + d * 2.0 ** (-1.0 * s);
    end
    @(posedge clk);
    x0 <= W'(vx); y0 <= W'(vy);
    if (sel) st30 <= 1; else st20 <= 1;
    @(posedge clk);
    st20 <= 0; st30 <= 0;
    cyc = 0;
    do begin
      @(posedge clk);
      #1;
      cyc++;
    end while (!(sel ? d30 : d20) && cyc < 100);
    gx = sel ? longint'($signed(x30)) : longint'($signed(x20));
    gy = sel ? longint'($signed(y30)) : longint'($signed(y20));
    chk(cyc == m, $sformatf("sel%0d latency %0d, expected %0d", sel, cyc, m));
    chk(gx == ex && gy == ey, $sformatf("sel%0d (%0d,%0d) -> (%0d,%0d), model (%0d,%0d)", sel, vx, vy, gx, gy, ex, ey));
    chk((sel ? o30 : o20) == eovf, $sformatf("sel%0d ovf=%0d model %0d", sel, sel ? o30 : o20, eovf));
    if (!eovf)
      chk(absr(gx - vx * ka) < 2.0 * m && absr(gy - vy * ka) < 2.0 * m,
          $sformatf("sel%0d accuracy (%0d,%0d) vs (%f,%f)", sel, gx, gy, vx * ka, vy * ka));
  endtask

  initial begin
    x0 = '0; y0 = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int sel = 0; sel < 2; sel++) begin
      run(sel, longint'(1) <<< 20, 0);
      run(sel, -(longint'(1) <<< 22), 777);
      for (int n = 0; n < 60; n++) run(sel, rand_word(W, 0), rand_word(W, 0));
    end
    // full-scale words: K_A < 1 and every partial product stays below 1, so
    // the model and the circuit must both report no overflow
    run(0, -(longint'(1) <<< 24), (longint'(1) <<< 24) - 1);
    run(1, -(longint'(1) <<< 24), (longint'(1) <<< 24) - 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

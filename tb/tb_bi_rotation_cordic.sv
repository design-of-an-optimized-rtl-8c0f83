// tb_bi_rotation_cordic: streams random vectors (valid on most clocks, with
// gaps) through the bi-rotation pipeline (two operations per stage) for 20 degrees (default) and
// 30 degrees.  Each result is compared bit-exactly with an integer model of
// the micro-rotations followed by the scaling terms, and in real numbers with
// the exact rotation; each must appear exactly LAT clocks after its input,
// in order (ceil(M/2)+ceil(M2/2) clocks), and back-to-back inputs must give back-to-back outputs.
module tb_bi_rotation_cordic;
  import cordic_ref_pkg::*;

  localparam int W     = 25;
  localparam int LAT20 = 4 + 2;
  localparam int LAT30 = 5 + 3;

  int checks = 0, failures = 0, b2b = 0;

  logic clk = 0, rst_n = 0;
  logic         vin = 0;
  logic [W-1:0] x0 = '0, y0 = '0;
  logic         v20, v30;
  logic [W-1:0] x20, y20, x30, y30;

  bi_rotation_cordic dut20 (.clk(clk), .rst_n(rst_n), .in_valid(vin), .x0(x0), .y0(y0),
                        .out_valid(v20), .x(x20), .y(y20));
  bi_rotation_cordic #(.M(9), .SHIFTS(cordic_pkg::ROT30_SHIFTS), .DIRS(cordic_pkg::ROT30_DIRS),
                   .M2(5), .SSHIFTS(cordic_pkg::SCL30_SHIFTS), .SDIRS(cordic_pkg::SCL30_DIRS)) dut30 (
                        .clk(clk), .rst_n(rst_n), .in_valid(vin), .x0(x0), .y0(y0),
                        .out_valid(v30), .x(x30), .y(y30));

  always #5 clk = ~clk;

  typedef struct { longint vx, vy, ex, ey; int t; } item_t;
  item_t q20[$], q30[$];
  int cycle = 0;

  initial begin
    repeat (5000) @(posedge clk);
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

  function automatic item_t model(int sel, longint vx, longint vy, int t);
    item_t it;
    it.vx = vx; it.vy = vy; it.ex = vx; it.ey = vy; it.t = t;
    for (int i = 0; i < (sel ? 9 : 7); i++)
      void'(rot_step(it.ex, it.ey, sel ? R30_K[i] : R20_K[i], sel ? R30_S[i] : R20_S[i], W));
    for (int i = 0; i < (sel ? 5 : 4); i++)
      void'(scl_step(it.ex, it.ey, sel ? S30_K[i] : S20_K[i], sel ? S30_S[i] : S20_S[i], W));
    return it;
  endfunction

  task automatic check_out(int sel, logic [W-1:0] gx_w, logic [W-1:0] gy_w, ref item_t q[$]);
    item_t it;
    longint gx, gy;
    real a, rx, ry, tol;
    gx = longint'($signed(gx_w));
    gy = longint'($signed(gy_w));
    if (q.size() == 0) begin
      chk(0, $sformatf("sel%0d output with nothing in flight", sel));
      return;
    end
    it = q.pop_front();
    chk(cycle - it.t == (sel ? LAT30 : LAT20), $sformatf("sel%0d latency %0d", sel, cycle - it.t));
    chk(gx == it.ex && gy == it.ey, $sformatf("sel%0d (%0d,%0d) -> (%0d,%0d), model (%0d,%0d)",
        sel, it.vx, it.vy, gx, gy, it.ex, it.ey));
    a   = deg2rad(sel ? 30.0 : 20.0);
    rx  = it.vx * $cos(a) - it.vy * $sin(a);
    ry  = it.vx * $sin(a) + it.vy * $cos(a);
    tol = 64.0 + 3.0e-5 * (absr(it.vx) + absr(it.vy));
    chk(absr(gx - rx) < tol && absr(gy - ry) < tol,
        $sformatf("sel%0d accuracy (%0d,%0d) vs (%f,%f)", sel, gx, gy, rx, ry));
  endtask

  initial begin
    bit prev20 = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 400; n++) begin
      @(posedge clk);
      #1;
      cycle++;
      if (v20) check_out(0, x20, y20, q20);
      if (v30) check_out(1, x30, y30, q30);
      if (v20 && prev20) b2b++;
      prev20 = v20;
      if (n < 300 && ($urandom % 8 != 0)) begin
        longint vx, vy;
        vx = (n == 0) ? longint'(1) <<< 20 : rand_word(W, 2);
        vy = (n == 0) ? 0 : rand_word(W, 2);
        vin = 1; x0 = W'(vx); y0 = W'(vy);
        q20.push_back(model(0, vx, vy, cycle));
        q30.push_back(model(1, vx, vy, cycle));
      end else begin
        vin = 0; x0 = W'($urandom); y0 = W'($urandom);
      end
    end
    chk(q20.size() == 0 && q30.size() == 0, "results missing at the end");
    chk(b2b > 50, $sformatf("only %0d back-to-back results", b2b));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

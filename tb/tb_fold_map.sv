// tb_fold_map: every quarter-turn count 0..3 with and without mirroring, on
// random words and the unit vectors; the output must equal the input turned
// by QUARTERS*90 degrees after negating y when MIRROR is set, computed with
// real cos/sin of the multiple of 90 degrees.
module tb_fold_map;
  import cordic_ref_pkg::*;

  localparam int W = 25;

  int checks = 0, failures = 0;

  logic [W-1:0] xi, yi;
  logic [W-1:0] xo [8];
  logic [W-1:0] yo [8];

  for (genvar c = 0; c < 8; c++) begin : g_c
    fold_map #(.QUARTERS(c % 4), .MIRROR(c / 4)) dut (
      .x_in(xi), .y_in(yi), .x_out(xo[c]), .y_out(yo[c]));
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint vx, vy, my;
    real a, ex, ey;
    for (int n = 0; n < 300; n++) begin
      vx = (n == 0) ? longint'(1) <<< 20 : (n == 1) ? 0 : rand_word(W, 1);
      vy = (n == 0) ? 0 : (n == 1) ? longint'(1) <<< 20 : rand_word(W, 1);
      xi = W'(vx); yi = W'(vy);
      #1;
      for (int c = 0; c < 8; c++) begin
        my = (c / 4 == 1) ? -vy : vy;
        a  = deg2rad(90.0 * (c % 4));
        ex = vx * $cos(a) - my * $sin(a);
        ey = vx * $sin(a) + my * $cos(a);
        checks++;
        if (absr($signed(xo[c]) - ex) > 0.5 || absr($signed(yo[c]) - ey) > 0.5) begin
          failures++;
          $display("FAIL q=%0d m=%0d (%0d,%0d) -> (%0d,%0d), expected (%f,%f)", c % 4, c / 4,
                   vx, vy, $signed(xo[c]), $signed(yo[c]), ex, ey);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

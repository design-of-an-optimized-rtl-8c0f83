// tb_rotation_module: each dedicated micro-rotation of the 20-degree set
// (seven hardwired instances, both directions, shifts 1..14) and a zero-shift
// one, driven with random and full-scale words and compared with
// X - sigma*(Y>>k), Y + sigma*(X>>k) computed in 64-bit integers and wrapped.
module tb_rotation_module;
  import cordic_ref_pkg::*;

  localparam int W = 25;
  localparam int NI = 8;

  int checks = 0, failures = 0;

  logic [W-1:0] xi, yi;
  logic [W-1:0] xo [NI];
  logic [W-1:0] yo [NI];

  for (genvar i = 0; i < 7; i++) begin : g_r
    rotation_module #(.SHIFT(R20_K[i]), .DIR(R20_S[i] > 0)) dut (
      .x_in(xi), .y_in(yi), .x_out(xo[i]), .y_out(yo[i]));
  end
  rotation_module #(.SHIFT(0), .DIR(1'b1)) dut0 (.x_in(xi), .y_in(yi), .x_out(xo[7]), .y_out(yo[7]));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint vx, vy, ex, ey;
    bit     ov;
    for (int n = 0; n < 500; n++) begin
      vx = (n == 0) ? -(longint'(1) <<< 24) : rand_word(W, n % 3);
      vy = (n == 1) ? (longint'(1) <<< 24) - 1 : rand_word(W, n % 3);
      xi = W'(vx); yi = W'(vy);
      #1;
      for (int i = 0; i < NI; i++) begin
        ex = vx; ey = vy;
        ov = (i < 7) ? rot_step(ex, ey, R20_K[i], R20_S[i], W) : rot_step(ex, ey, 0, 1, W);
        checks++;
        if (longint'($signed(xo[i])) != ex || longint'($signed(yo[i])) != ey) begin
          failures++;
          $display("FAIL stage %0d (%0d,%0d) -> (%0d,%0d), expected (%0d,%0d)", i, vx, vy,
                   $signed(xo[i]), $signed(yo[i]), ex, ey);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ctrl_rom: reads every word of the 20-degree micro-rotation ROM, the
// 20-degree scaling ROM and the 30-degree micro-rotation ROM and compares
// them with the shift tables; an index past the last word must read 0.
module tb_ctrl_rom;
  import cordic_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [2:0] i7, i4;
  logic [3:0] i9;
  logic [4:0] k7, k4, k9;

  ctrl_rom dut7 (.idx(i7), .shift(k7));
  ctrl_rom #(.M(4), .SHIFTS(cordic_pkg::SCL20_SHIFTS)) dut4 (.idx(i4[1:0]), .shift(k4));
  ctrl_rom #(.M(9), .SHIFTS(cordic_pkg::ROT30_SHIFTS)) dut9 (.idx(i9), .shift(k9));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string n, int i, logic [4:0] got, int exp);
    checks++;
    if (int'(got) != exp) begin
      failures++;
      $display("FAIL %s word %0d = %0d, expected %0d", n, i, got, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 8; i++) begin
      i7 = 3'(i); #1;
      chk("rot20", i, k7, (i < 7) ? R20_K[i] : 0);
    end
    for (int i = 0; i < 4; i++) begin
      i4 = 3'(i); #1;
      chk("scl20", i, k4, S20_K[i]);
    end
    for (int i = 0; i < 16; i++) begin
      i9 = 4'(i); #1;
      chk("rot30", i, k9, (i < 9) ? R30_K[i] : 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_barrel_shifter: checks every shift amount 0..MAX_SHIFT on random and
// corner words against an arithmetic shift computed in 64-bit integers, for
// the default 25-bit/14-shift shifter and a 4-bit/3-shift one.
module tb_barrel_shifter;
  import cordic_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [24:0] din;
  logic [3:0]  shamt;
  logic [24:0] dout;
  logic [3:0]  din4, dout4;
  logic [1:0]  sh4;

  barrel_shifter dut (.din(din), .shamt(shamt), .dout(dout));
  barrel_shifter #(.W(4), .MAX_SHIFT(3)) dut4 (.din(din4), .shamt(sh4), .dout(dout4));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint v, exp;
    for (int n = 0; n < 300; n++) begin
      case (n)
        0: v = 0;
        1: v = -1;
        2: v = wrapw(longint'(1) <<< 24, 25);
        3: v = (longint'(1) <<< 24) - 1;
        default: v = rand_word(25, 0);
      endcase
      for (int s = 0; s <= 14; s++) begin
        din   = 25'(v);
        shamt = 4'(s);
        #1;
        exp = v >>> s;
        checks++;
        if (longint'($signed(dout)) != exp) begin
          failures++;
          $display("FAIL w25 din=%0d s=%0d got=%0d exp=%0d", v, s, $signed(dout), exp);
        end
      end
    end
    for (int a = 0; a < 16; a++)
      for (int s = 0; s < 4; s++) begin
        din4 = 4'(a);
        sh4  = 2'(s);
        #1;
        exp = wrapw(longint'(a), 4) >>> s;
        checks++;
        if (longint'($signed(dout4)) != exp) begin
          failures++;
          $display("FAIL w4 din=%0d s=%0d got=%0d exp=%0d", a, s, $signed(dout4), exp);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

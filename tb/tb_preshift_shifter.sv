// tb_preshift_shifter: drives every legal shift k (PRE <= k <= MAX_SHIFT) on
// random and corner words into pre-shifting shifters with l = 1 (default,
// 20-degree micro-rotations), l = 3 (20-degree scaling terms) and l = 0
// (30-degree micro-rotations), and compares with din >>> k.
module tb_preshift_shifter;
  import cordic_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [24:0] din;
  logic [4:0]  k;
  logic [24:0] d1, d3, d0;

  preshift_shifter                                   dut1 (.din(din), .shamt(k), .dout(d1));
  preshift_shifter #(.W(25), .PRE(3), .MAX_SHIFT(13)) dut3 (.din(din), .shamt(k), .dout(d3));
  preshift_shifter #(.W(25), .PRE(0), .MAX_SHIFT(14)) dut0 (.din(din), .shamt(k), .dout(d0));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string name, logic [24:0] got, longint exp, longint v, int s);
    checks++;
    if (longint'($signed(got)) != exp) begin
      failures++;
      $display("FAIL %s din=%0d k=%0d got=%0d exp=%0d", name, v, s, $signed(got), exp);
    end
  endtask

  initial begin
    longint v;
    for (int n = 0; n < 300; n++) begin
      case (n)
        0: v = -1;
        1: v = wrapw(longint'(1) <<< 24, 25);
        2: v = (longint'(1) <<< 24) - 1;
        3: v = 1;
        default: v = rand_word(25, 0);
      endcase
      for (int s = 0; s <= 14; s++) begin
        din = 25'(v);
        k   = 5'(s);
        #1;
        if (s >= 1)            check("l=1", d1, v >>> s, v, s);
        if (s >= 3 && s <= 13) check("l=3", d3, v >>> s, v, s);
        check("l=0", d0, v >>> s, v, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

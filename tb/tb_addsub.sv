// tb_addsub: 4-bit single-iteration examples (zero shift: X=0001, Y=0000 give
// 0001 and 0001; one shift: 1000+0001 = 1001 and 0010+0100 = 0110), all
// 4-bit operand pairs, and random 25-bit operands; sum and signed overflow are
// compared with 64-bit integer arithmetic.
module tb_addsub;
  import cordic_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [3:0]  a4, b4, s4;
  logic        sub4, o4;
  logic [24:0] a, b, s;
  logic        sub, o;

  addsub #(.W(4)) dut4 (.a(a4), .b(b4), .sub(sub4), .sum(s4), .ovf(o4));
  addsub          dut  (.a(a), .b(b), .sub(sub), .sum(s), .ovf(o));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic vec4(logic [3:0] ia, logic [3:0] ib, logic isub, logic [3:0] exp);
    a4 = ia; b4 = ib; sub4 = isub;
    #1;
    checks++;
    if (s4 !== exp) begin
      failures++;
      $display("FAIL 4-bit %b %s %b = %b, expected %b", ia, isub ? "-" : "+", ib, s4, exp);
    end
  endtask

  initial begin
    longint ra, rb, full;
    // first iteration (zero shift): S1 = X - Y>>0, S2 = Y + X>>0
    vec4(4'b0001, 4'b0000, 1'b1, 4'b0001);
    vec4(4'b0000, 4'b0001, 1'b0, 4'b0001);
    // second iteration (one shift): q21 = 0001, q11 = 0100
    vec4(4'b1000, 4'b0001, 1'b0, 4'b1001);
    vec4(4'b0010, 4'b0100, 1'b0, 4'b0110);
    // exhaustive 4-bit
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++)
        for (int m = 0; m < 2; m++) begin
          a4 = 4'(i); b4 = 4'(j); sub4 = m[0];
          #1;
          ra = wrapw(i, 4); rb = wrapw(j, 4);
          full = m ? ra - rb : ra + rb;
          checks++;
          if (longint'($signed(s4)) != wrapw(full, 4) || o4 != (wrapw(full, 4) != full)) begin
            failures++;
            $display("FAIL 4-bit %0d %0d sub=%0d got %0d ovf=%0d", ra, rb, m, $signed(s4), o4);
          end
        end
    // random 25-bit
    for (int n = 0; n < 2000; n++) begin
      ra = rand_word(25, (n % 3 == 0) ? 0 : 2);
      rb = rand_word(25, (n % 5 == 0) ? 0 : 2);
      a = 25'(ra); b = 25'(rb); sub = n[0];
      #1;
      full = sub ? ra - rb : ra + rb;
      checks++;
      if (longint'($signed(s)) != wrapw(full, 25) || o != (wrapw(full, 25) != full)) begin
        failures++;
        $display("FAIL 25-bit %0d %0d sub=%0d got %0d ovf=%0d", ra, rb, sub, $signed(s), o);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

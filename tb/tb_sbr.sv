// tb_sbr: loads the 20-degree direction word and the 30-degree one, steps
// through them and compares every presented bit with the sign tables; also
// checks that the word holds without step and that load restarts it.
module tb_sbr;
  import cordic_ref_pkg::*;

  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, load = 0, step = 0;
  logic d7, d9;

  sbr dut7 (.clk(clk), .rst_n(rst_n), .load(load), .step(step), .dir(d7));
  sbr #(.M(9), .DIRS(cordic_pkg::ROT30_DIRS)) dut9 (.clk(clk), .rst_n(rst_n), .load(load), .step(step), .dir(d9));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string n, int i, logic got, int sg);
    checks++;
    if (got != (sg > 0)) begin
      failures++;
      $display("FAIL %s bit %0d = %0d, expected sign %0d", n, i, got, sg);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int rep = 0; rep < 2; rep++) begin
      @(posedge clk) begin load <= 1; step <= 0; end
      @(posedge clk) load <= 0;
      // hold without step
      repeat (2) @(posedge clk);
      #1 chk("hold20", 0, d7, R20_S[0]);
      for (int i = 0; i < 9; i++) begin
        #1;
        if (i < 7) chk("rot20", i, d7, R20_S[i]);
        chk("rot30", i, d9, R30_S[i]);
        step <= 1;
        @(posedge clk);
        step <= 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking testbench for mv_max, the K-valued MAX gate.
//
// Drives a 5-input 8-valued gate and a 3-input 4-valued gate with corner
// patterns and 2000 random input vectors. The expected output is found here
// by sorting the inputs; the check also makes sure every value is reached.
// A watchdog ends the run with a failure after 100000 time units.
module tb_mv_max;
  int checks = 0, failures = 0;

  logic [2:0] a8 [5];
  logic [2:0] y8;
  logic [1:0] a4 [3];
  logic [1:0] y4;
  bit   seen [8];

  mv_max #(.K(8), .N(5)) dut8 (.a(a8), .y(y8));
  mv_max #(.K(4), .N(3)) dut4 (.a(a4), .y(y4));

  initial begin
    #100000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_now();
    int s8 [5];
    int s4 [3];
    #1;
    foreach (a8[i]) s8[i] = int'(a8[i]);
    foreach (a4[i]) s4[i] = int'(a4[i]);
    s8.sort();
    s4.sort();
    checks++;
    if (int'(y8) != s8[4]) begin
      failures++;
      $display("FAIL K=8: inputs %p gave %0d", a8, y8);
    end
    seen[y8] = 1'b1;
    checks++;
    if (int'(y4) != s4[2]) begin
      failures++;
      $display("FAIL K=4: inputs %p gave %0d", a4, y4);
    end
  endtask

  initial begin
    // corners: all equal, one extreme value at each position
    for (int v = 0; v < 8; v++) begin
      foreach (a8[i]) a8[i] = 3'(v);
      foreach (a4[i]) a4[i] = 2'(v);
      check_now();
    end
    for (int p = 0; p < 5; p++) begin
      foreach (a8[i]) a8[i] = 3'd3;
      a8[p] = 3'd7;
      foreach (a4[i]) a4[i] = 2'd1;
      a4[p % 3] = 2'd0;
      check_now();
      a8[p] = 3'd0;
      a4[p % 3] = 2'd3;
      check_now();
    end
    for (int n = 0; n < 2000; n++) begin
      foreach (a8[i]) a8[i] = 3'($urandom_range(7));
      foreach (a4[i]) a4[i] = 2'($urandom_range(3));
      check_now();
    end
    foreach (seen[v]) begin
      checks++;
      if (!seen[v]) begin
        failures++;
        $display("FAIL output value %0d never produced", v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

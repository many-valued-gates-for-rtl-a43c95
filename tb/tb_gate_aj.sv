// Self-checking testbench for gate_aj, the GATE(A,j) cell.
//
// Builds every cell GATE(A,j) for K = 8 (64 cells) and a few for K = 4, drives
// every input value into all of them and checks y = A when x = j, else 0.
// The expected value is computed here from A, j and x alone. A watchdog ends
// the run with a failure if it has not finished after 10000 time units.
module tb_gate_aj;
  int checks = 0, failures = 0;

  logic [2:0] x8;
  logic [2:0] y8 [8][8];
  logic [1:0] x4;
  logic [1:0] y4 [4];

  for (genvar a = 0; a < 8; a++) begin : g_a
    for (genvar j = 0; j < 8; j++) begin : g_j
      gate_aj #(.K(8), .A(a), .J(j)) dut (.x(x8), .y(y8[a][j]));
    end
  end
  for (genvar j = 0; j < 4; j++) begin : g_k4
    gate_aj #(.K(4), .A(3 - j), .J(j)) dut (.x(x4), .y(y4[j]));
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int xv = 0; xv < 8; xv++) begin
      x8 = 3'(xv);
      x4 = 2'(xv);
      #1;
      for (int a = 0; a < 8; a++)
        for (int j = 0; j < 8; j++) begin
          int exp_y;
          exp_y = (xv == j) ? a : 0;
          checks++;
          if (int'(y8[a][j]) != exp_y) begin
            failures++;
            $display("FAIL GATE(%0d,%0d) x=%0d: y=%0d, expected %0d", a, j, xv, y8[a][j], exp_y);
          end
        end
      for (int j = 0; j < 4; j++) begin
        int exp_y;
        exp_y = ((xv % 4) == j) ? 3 - j : 0;
        checks++;
        if (int'(y4[j]) != exp_y) begin
          failures++;
          $display("FAIL K=4 GATE(%0d,%0d) x=%0d: y=%0d, expected %0d", 3 - j, j, xv % 4, y4[j], exp_y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

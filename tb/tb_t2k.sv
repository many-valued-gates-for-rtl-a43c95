// Self-checking testbench for t2k, the binary-to-K-valued translator T(2/K).
//
// Drives every input word into translators for K = 2, 4, 8 and 16 and checks
// that the K-valued output equals the word read as an unsigned number with the
// first pin most significant (for K = 8: xi1 = 1, xi2 = 0, xi3 = 1 gives 5).
// A watchdog ends the run with a failure after 10000 time units.
module tb_t2k;
  int checks = 0, failures = 0;

  logic [0:0] x2;  logic [0:0] v2;
  logic [1:0] x4;  logic [1:0] v4;
  logic [2:0] x8;  logic [2:0] v8;
  logic [3:0] x16; logic [3:0] v16;

  t2k #(.K(2))  dut2  (.x(x2),  .v(v2));
  t2k #(.K(4))  dut4  (.x(x4),  .v(v4));
  t2k #(.K(8))  dut8  (.x(x8),  .v(v8));
  t2k #(.K(16)) dut16 (.x(x16), .v(v16));

  initial begin
    #10000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, int got, int exp_v);
    checks++;
    if (got != exp_v) begin
      failures++;
      $display("FAIL %s: got %0d, expected %0d", what, got, exp_v);
    end
  endtask

  initial begin
    // the worked example: pins xi1 xi2 xi3 = 1 0 1
    x8 = 3'b101;
    #1 expect_eq("K=8 example 101", int'(v8), 5);
    for (int w = 0; w < 16; w++) begin
      int b1, b2, b3, b4;
      b1 = (w >> 3) & 1; b2 = (w >> 2) & 1; b3 = (w >> 1) & 1; b4 = w & 1;
      x2  = 1'(w);
      x4  = 2'(w);
      x8  = 3'(w);
      x16 = 4'(w);
      #1;
      expect_eq("K=2",  int'(v2),  b4);
      expect_eq("K=4",  int'(v4),  2 * b3 + b4);
      expect_eq("K=8",  int'(v8),  4 * b2 + 2 * b3 + b4);
      expect_eq("K=16", int'(v16), 8 * b1 + 4 * b2 + 2 * b3 + b4);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

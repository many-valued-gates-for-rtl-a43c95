// Self-checking testbench for tk2, the K-valued-to-binary translator T(K/2).
//
// Drives every value into translators for K = 2, 4, 8 and 16 and checks each
// output pin against the binary digits of the value, first pin most
// significant (for K = 8: f = 4 gives gi1 = 1, gi2 = 0, gi3 = 0).
// A watchdog ends the run with a failure after 10000 time units.
module tb_tk2;
  int checks = 0, failures = 0;

  logic [0:0] f2;  logic [0:0] g2;
  logic [1:0] f4;  logic [1:0] g4;
  logic [2:0] f8;  logic [2:0] g8;
  logic [3:0] f16; logic [3:0] g16;

  tk2 #(.K(2))  dut2  (.f(f2),  .g(g2));
  tk2 #(.K(4))  dut4  (.f(f4),  .g(g4));
  tk2 #(.K(8))  dut8  (.f(f8),  .g(g8));
  tk2 #(.K(16)) dut16 (.f(f16), .g(g16));

  initial begin
    #10000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_bit(string what, int value, int pin, logic got, int exp_b);
    checks++;
    if (int'(got) != exp_b) begin
      failures++;
      $display("FAIL %s f=%0d pin gi%0d: got %0d, expected %0d", what, value, pin, got, exp_b);
    end
  endtask

  initial begin
    // the worked example: f = 4 -> gi1 gi2 gi3 = 1 0 0
    f8 = 3'd4;
    #1;
    expect_bit("K=8 example", 4, 1, g8[2], 1);
    expect_bit("K=8 example", 4, 2, g8[1], 0);
    expect_bit("K=8 example", 4, 3, g8[0], 0);
    for (int w = 0; w < 16; w++) begin
      f2  = 1'(w);
      f4  = 2'(w);
      f8  = 3'(w);
      f16 = 4'(w);
      #1;
      // pin p (1 = first) of a K = 2^n translator carries digit 2^(n-p) of the value
      expect_bit("K=2", w % 2, 1, g2[0], w % 2);
      for (int p = 1; p <= 2; p++) expect_bit("K=4",  w % 4,  p, g4[2 - p],  ((w % 4)  / (1 << (2 - p))) % 2);
      for (int p = 1; p <= 3; p++) expect_bit("K=8",  w % 8,  p, g8[3 - p],  ((w % 8)  / (1 << (3 - p))) % 2);
      for (int p = 1; p <= 4; p++) expect_bit("K=16", w,      p, g16[4 - p], (w / (1 << (4 - p))) % 2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

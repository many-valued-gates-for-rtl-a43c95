// Workload testbench: circuit S for the system (18,6,20) with the
// unminimized 8-PLA(6,2,20), one product line per defined input word
// (mvl_pkg::S18_AND_FULL / S18_OR_FULL), instead of the default minimized
// array.
//
// Checks: every defined word gives its tabulated output and switches on its
// own product line only; 3000 random undefined words give 0 on every output
// and product line. Every product line must be seen on at least once.
// A watchdog ends the run with a failure after 1000000 time units.
module tb_circuit_s_full;
  import mvl_pkg::*;

  int checks = 0, failures = 0;

  localparam int ROWS = 20;
  localparam logic [17:0] TAB_X [ROWS] = '{
    18'b100_011_000_110_011_100, 18'b100_010_111_100_100_101, 18'b111_101_100_011_010_010,
    18'b000_100_100_011_100_111, 18'b101_100_101_011_000_101, 18'b100_011_100_110_010_011,
    18'b000_010_110_100_111_001, 18'b100_110_001_101_110_000, 18'b000_110_100_111_001_001,
    18'b111_110_001_000_110_101, 18'b100_010_110_111_010_010, 18'b100_011_100_110_110_100,
    18'b000_110_001_101_001_011, 18'b100_011_100_001_100_111, 18'b111_000_110_110_000_111,
    18'b111_011_000_110_110_100, 18'b100_011_100_111_001_001, 18'b001_001_110_010_000_111,
    18'b100_111_001_001_000_111, 18'b101_100_100_111_000_110
  };
  localparam logic [5:0] TAB_G [ROWS] = '{
    6'b011_100, 6'b110_110, 6'b010_011, 6'b000_110, 6'b101_101, 6'b010_001,
    6'b010_101, 6'b101_101, 6'b110_110, 6'b111_111, 6'b000_101, 6'b011_101,
    6'b110_100, 6'b000_001, 6'b011_011, 6'b111_111, 6'b100_100, 6'b111_011,
    6'b110_001, 6'b011_010
  };

  logic [17:0] x;
  logic [5:0]  g;
  logic [2:0]  v [6];
  logic [2:0]  f [2];
  logic [2:0]  p [20];

  circuit_s #(.K(8), .M(18), .R(6), .Q(20), .AND_MAT(S18_AND_FULL), .OR_MAT(S18_OR_FULL))
    dut (.x(x), .g(g), .v(v), .f(f), .p(p));

  int line_on [20];

  initial begin
    #1000000;
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
    for (int t = 0; t < ROWS; t++) begin
      x = TAB_X[t];
      #1;
      expect_eq($sformatf("row %0d g", t + 1), int'(g), int'(TAB_G[t]));
      for (int l = 0; l < ROWS; l++) begin
        expect_eq($sformatf("row %0d line %0d", t + 1, l + 1), int'(p[l]), (l == t) ? 7 : 0);
        if (p[l] == 3'd7) line_on[l]++;
      end
    end
    for (int n = 0; n < 3000; n++) begin
      logic [17:0] word;
      bit defined;
      word = (n % 2 == 0) ? TAB_X[$urandom_range(ROWS - 1)] ^ (18'd1 << $urandom_range(17))
                          : 18'($urandom);
      defined = 0;
      foreach (TAB_X[t]) if (TAB_X[t] == word) defined = 1;
      if (defined) continue;
      x = word;
      #1;
      expect_eq($sformatf("undefined %b g", word), int'(g), 0);
      for (int l = 0; l < ROWS; l++) expect_eq($sformatf("undefined %b line %0d", word, l + 1), int'(p[l]), 0);
    end
    for (int l = 0; l < ROWS; l++) begin
      checks++;
      if (line_on[l] == 0) begin
        failures++;
        $display("FAIL product line %0d never on", l + 1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

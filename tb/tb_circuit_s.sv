// End-to-end testbench for circuit_s at its default parameters: the example
// system of partial Boolean functions (18,6,20) realized by six T(2/8)
// translators, the minimized 8-PLA(6,2,21) and two T(8/2) translators.
//
// Checks:
//  * every one of the 20 defined input words gives its tabulated 6-bit output
//    (table kept here as an independent binary copy);
//  * 4000 further words (random, and table rows with one bit flipped) give the
//    output of a behavioural model: octal digits of x, sum-of-products over the
//    programming matrices, binary digits of f;
//  * the K-valued lines v and f equal the octal digits of x and g.
// Mechanisms counted, each of which must occur at least once: every product
// line switched on, two or more active lines merged by an output MAX gate, an
// output left at 0 because no line drives it, every value 0..7 produced by each
// T(2/8) translator, and every value each T(8/2) translator can receive.
// A watchdog ends the run with a failure after 1000000 time units.
module tb_circuit_s;
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
  logic [2:0]  p [21];

  circuit_s dut (.x(x), .g(g), .v(v), .f(f), .p(p));

  int line_on [21];
  int max_merge = 0;
  int no_term = 0;
  int v_seen [6][8];
  int f_seen [2][8];

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

  // Apply x, then compare g, v, f, p with the behavioural model.
  task automatic apply_and_check(logic [17:0] word);
    int dig [6];
    int on [21];
    int fexp [2];
    int drivers [2];
    logic [5:0] gexp;
    x = word;
    #1;
    for (int i = 0; i < 6; i++) dig[i] = int'(word[17 - 3 * i -: 3]);
    fexp = '{0, 0};
    drivers = '{0, 0};
    for (int r = 0; r < 21; r++) begin
      on[r] = 1;
      for (int i = 0; i < 6; i++)
        if (S18_AND_MIN[20-r][5-i] != 8'd8 && int'(S18_AND_MIN[20-r][5-i]) != dig[i]) on[r] = 0;
      for (int k = 0; k < 2; k++)
        if (on[r] == 1 && S18_OR_MIN[20-r][1-k] != 8'd8) begin
          drivers[k]++;
          if (int'(S18_OR_MIN[20-r][1-k]) > fexp[k]) fexp[k] = int'(S18_OR_MIN[20-r][1-k]);
        end
      line_on[r] += on[r];
      expect_eq($sformatf("x=%b line %0d", word, r + 1), int'(p[r]), 7 * on[r]);
    end
    gexp = {3'(fexp[0]), 3'(fexp[1])};
    expect_eq($sformatf("x=%b g", word), int'(g), int'(gexp));
    for (int i = 0; i < 6; i++) begin
      expect_eq($sformatf("x=%b v%0d", word, i + 1), int'(v[i]), dig[i]);
      v_seen[i][v[i]]++;
    end
    for (int k = 0; k < 2; k++) begin
      expect_eq($sformatf("x=%b f%0d", word, k + 1), int'(f[k]), fexp[k]);
      f_seen[k][f[k]]++;
      if (drivers[k] >= 2) max_merge++;
      if (drivers[k] == 0) no_term++;
    end
  endtask

  task automatic expect_seen(string what, int count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    // the defined rows of the system (18,6,20)
    for (int t = 0; t < ROWS; t++) begin
      apply_and_check(TAB_X[t]);
      expect_eq($sformatf("table row %0d g", t + 1), int'(g), int'(TAB_G[t]));
    end
    // the rest of the input space: the functions are partial, so only the
    // behavioural model of the programmed array gives the expected output
    for (int n = 0; n < 4000; n++) begin
      logic [17:0] word;
      if (n % 2 == 0) word = TAB_X[$urandom_range(ROWS - 1)] ^ (18'd1 << $urandom_range(17));
      else            word = 18'($urandom);
      apply_and_check(word);
    end

    for (int r = 0; r < 21; r++) expect_seen($sformatf("product line %0d on", r + 1), line_on[r]);
    expect_seen("output MAX merging two active lines", max_merge);
    expect_seen("output with no active line", no_term);
    for (int i = 0; i < 6; i++)
      for (int c = 0; c < 8; c++) expect_seen($sformatf("T(2/8) #%0d value %0d", i + 1, c), v_seen[i][c]);
    // each T(8/2) must have translated 0 and every constant its PLA column holds
    for (int k = 0; k < 2; k++) begin
      expect_seen($sformatf("T(8/2) #%0d value 0", k + 1), f_seen[k][0]);
      for (int r = 0; r < 21; r++)
        if (S18_OR_MIN[20-r][1-k] != 8'd8)
          expect_seen($sformatf("T(8/2) #%0d value %0d", k + 1, S18_OR_MIN[20-r][1-k]), f_seen[k][3'(S18_OR_MIN[20-r][1-k])]);
    end
    $display("mechanisms: MAX merges=%0d, undriven outputs=%0d", max_merge, no_term);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

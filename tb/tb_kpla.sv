// Self-checking testbench for kpla, the K-valued PLA.
//
// Two 8-PLAs are built for the example system of partial 8-valued functions
// (6,2,20): the minimized 8-PLA(6,2,21) (the module's default) and the
// one-line-per-row 8-PLA(6,2,20). Checks:
//  * all 20 rows of the function table, kept here as an independent copy,
//    give the tabulated outputs f1 f2 on both arrays;
//  * on the unminimized array exactly the matching product line is at 7 and
//    the others at 0;
//  * 3000 random input words give, on both arrays, the outputs and product
//    lines of a behavioural sum-of-products evaluation of the same matrices;
//    off the table the unminimized array outputs 0.
// A watchdog ends the run with a failure after 100000 time units.
module tb_kpla;
  import mvl_pkg::*;

  int checks = 0, failures = 0;

  // The function table (v1..v6 -> f1 f2), one octal digit per value.
  localparam int ROWS = 20;
  localparam int unsigned TAB_V [ROWS] = '{
    'o430634, 'o427445, 'o754322, 'o044347, 'o545305, 'o434623, 'o026471,
    'o461560, 'o064711, 'o761065, 'o426722, 'o434664, 'o061513, 'o434147,
    'o706607, 'o730664, 'o434711, 'o116207, 'o471107, 'o544706 };
  localparam int unsigned TAB_F [ROWS] = '{
    'o34, 'o66, 'o23, 'o06, 'o55, 'o21, 'o25, 'o55, 'o66, 'o77,
    'o05, 'o35, 'o64, 'o01, 'o33, 'o77, 'o44, 'o73, 'o61, 'o32 };

  logic [2:0] v [6];
  logic [2:0] f_min [2];
  logic [2:0] p_min [21];
  logic [2:0] f_full [2];
  logic [2:0] p_full [20];

  kpla dut_min (.v(v), .f(f_min), .p(p_min));
  kpla #(.K(8), .N(6), .S(2), .Q(20), .AND_MAT(S18_AND_FULL), .OR_MAT(S18_OR_FULL))
    dut_full (.v(v), .f(f_full), .p(p_full));

  initial begin
    #100000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int digit(int unsigned word, int pos, int len);
    return int'((word >> (3 * (len - 1 - pos))) & 7);
  endfunction

  task automatic expect_eq(string what, int got, int exp_v);
    checks++;
    if (got != exp_v) begin
      failures++;
      $display("FAIL %s: got %0d, expected %0d", what, got, exp_v);
    end
  endtask

  // Behavioural sum-of-products: line r is on when every programmed literal
  // matches; output k is the largest programmed constant of the lines that are on.
  task automatic check_sop(string what, int q, bit is_min);
    int on [21];
    int fexp [2];
    fexp = '{0, 0};
    for (int r = 0; r < q; r++) begin
      on[r] = 1;
      for (int i = 0; i < 6; i++) begin
        int e;
        e = is_min ? int'(S18_AND_MIN[20-r][5-i]) : int'(S18_AND_FULL[19-r][5-i]);
        if (e != 8 && e != int'(v[i])) on[r] = 0;
      end
      for (int k = 0; k < 2; k++) begin
        int a;
        a = is_min ? int'(S18_OR_MIN[20-r][1-k]) : int'(S18_OR_FULL[19-r][1-k]);
        if (on[r] == 1 && a != 8 && a > fexp[k]) fexp[k] = a;
      end
      expect_eq($sformatf("%s line %0d", what, r + 1),
                is_min ? int'(p_min[r]) : int'(p_full[r]), on[r] * 7);
    end
    for (int k = 0; k < 2; k++)
      expect_eq($sformatf("%s f%0d", what, k + 1),
                is_min ? int'(f_min[k]) : int'(f_full[k]), fexp[k]);
  endtask

  initial begin
    for (int t = 0; t < ROWS; t++) begin
      for (int i = 0; i < 6; i++) v[i] = 3'(digit(TAB_V[t], i, 6));
      #1;
      for (int k = 0; k < 2; k++) begin
        expect_eq($sformatf("row %0d minimized f%0d", t + 1, k + 1), int'(f_min[k]), digit(TAB_F[t], k, 2));
        expect_eq($sformatf("row %0d full f%0d", t + 1, k + 1), int'(f_full[k]), digit(TAB_F[t], k, 2));
      end
      for (int r = 0; r < ROWS; r++)
        expect_eq($sformatf("row %0d full line %0d", t + 1, r + 1), int'(p_full[r]), (r == t) ? 7 : 0);
    end

    for (int n = 0; n < 3000; n++) begin
      bit in_table;
      int unsigned word;
      // every fourth word is a table row with one value changed
      if (n % 4 == 0) begin
        word = TAB_V[$urandom_range(ROWS - 1)];
        word ^= ($urandom_range(1, 7)) << (3 * $urandom_range(5));
      end else begin
        word = $urandom_range('o777777);
      end
      for (int i = 0; i < 6; i++) v[i] = 3'(digit(word, i, 6));
      in_table = 0;
      foreach (TAB_V[t]) if (TAB_V[t] == word) in_table = 1;
      #1;
      check_sop("minimized", 21, 1'b1);
      check_sop("full", 20, 1'b0);
      if (!in_table) begin
        expect_eq("off-table full f1", int'(f_full[0]), 0);
        expect_eq("off-table full f2", int'(f_full[1]), 0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

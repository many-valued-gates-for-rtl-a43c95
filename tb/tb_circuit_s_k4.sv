// Workload testbench: circuit S with K = 4 for a system of partial Boolean
// functions (16,8,100), the size of one 2-PLA(16,8,100) of the chip-area
// example. The circuit is eight T(2/4) translators, a 4-PLA(8,4,100) and four
// T(4/2) translators.
//
// The 100 defined rows are generated here by a fixed hash: input word of row r
// = {9 hash bits, r as 7 bits} (so all rows differ), output word = 8 hash
// bits. The array is programmed without minimization: product line r holds the
// four-valued digits of input row r in the AND plane and of output row r in the
// OR plane (line r+1 at index Q-1-r, digit 1 at the highest index), so a
// defined row switches on its own line only.
// Checks: every defined row gives its output word; 3000 random undefined words
// give 0 on every output and on every product line. Every product line must be
// seen on at least once. A watchdog ends the run with a failure after 1000000
// time units.
module tb_circuit_s_k4;
  int checks = 0, failures = 0;

  localparam int unsigned M = 16, R = 8, Q = 100, N = 8, S = 4;

  typedef logic [Q-1:0][N-1:0][7:0] and_mat_t;
  typedef logic [Q-1:0][S-1:0][7:0] or_mat_t;

  function automatic logic [31:0] mix(int unsigned r, int unsigned salt);
    logic [31:0] h;
    h = 32'(r) * 32'h9E37_79B1 + salt;
    h = h ^ (h >> 15);
    h = h * 32'h85EB_CA6B;
    return h ^ (h >> 13);
  endfunction

  function automatic logic [M-1:0] row_x(int unsigned r);
    logic [31:0] h;
    h = mix(r, 32'h1234_5678);
    return {h[8:0], 7'(r)};
  endfunction

  function automatic logic [R-1:0] row_g(int unsigned r);
    logic [31:0] h;
    h = mix(r, 32'hCAFE_F00D);
    return h[R-1:0];
  endfunction

  function automatic and_mat_t gen_and();
    and_mat_t m;
    for (int r = 0; r < Q; r++) begin
      logic [M-1:0] xw;
      xw = row_x(r);
      for (int i = 0; i < N; i++) m[Q-1-r][N-1-i] = 8'(xw[M-1-2*i -: 2]);
    end
    return m;
  endfunction

  function automatic or_mat_t gen_or();
    or_mat_t m;
    for (int r = 0; r < Q; r++) begin
      logic [R-1:0] gw;
      gw = row_g(r);
      for (int k = 0; k < S; k++) m[Q-1-r][S-1-k] = 8'(gw[R-1-2*k -: 2]);
    end
    return m;
  endfunction

  localparam and_mat_t AND_K4 = gen_and();
  localparam or_mat_t  OR_K4  = gen_or();

  logic [M-1:0] x;
  logic [R-1:0] g;
  logic [1:0]   v [N];
  logic [1:0]   f [S];
  logic [1:0]   p [Q];

  circuit_s #(.K(4), .M(M), .R(R), .Q(Q), .AND_MAT(AND_K4), .OR_MAT(OR_K4))
    dut (.x(x), .g(g), .v(v), .f(f), .p(p));

  int line_on [Q];

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
    for (int r = 0; r < Q; r++) begin
      x = row_x(r);
      #1;
      expect_eq($sformatf("row %0d g", r), int'(g), int'(row_g(r)));
      for (int l = 0; l < Q; l++) begin
        expect_eq($sformatf("row %0d line %0d", r, l), int'(p[l]), (l == r) ? 3 : 0);
        if (p[l] == 2'd3) line_on[l]++;
      end
    end
    for (int n = 0; n < 3000; n++) begin
      logic [M-1:0] word;
      bit defined;
      word = M'($urandom);
      defined = 0;
      for (int r = 0; r < Q; r++) if (row_x(r) == word) defined = 1;
      if (defined) continue;
      x = word;
      #1;
      expect_eq($sformatf("undefined %h g", word), int'(g), 0);
      for (int l = 0; l < Q; l++) expect_eq($sformatf("undefined %h line %0d", word, l), int'(p[l]), 0);
    end
    for (int l = 0; l < Q; l++) begin
      checks++;
      if (line_on[l] == 0) begin
        failures++;
        $display("FAIL product line %0d never on", l);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// K-PLA(n,s,q): programmable logic array of AND-OR type for K-valued signals.
//
// n K-valued inputs v, s K-valued outputs f, q intermediate (product) lines p.
//
// AND plane M(AND): where product line r crosses input vi there is either no
// cell or a cell GATE(K-1, j), which gives K-1 when vi = j and 0 otherwise
// (the literal vi^j). A MIN gate over the cells of the line gives p[r] = K-1
// when all its literals hold and 0 otherwise; a line with no cell at all
// stays at K-1.
// OR plane M(OR): where line r crosses output fk there is either no cell or a
// cell GATE(A, K-1), which passes the constant A when p[r] = K-1. A MAX gate
// over each output column gives fk, the largest A of the active lines
// (0 when none is active).
//
// The cell values are the parameters AND_MAT (value j) and OR_MAT (value A),
// packed arrays of 8-bit entries written line 1 first and, within a line,
// v1 (f1) first: line r+1, input v(i+1) is AND_MAT[Q-1-r][N-1-i]. An entry
// equal to K marks a crossing with no cell.
// They stand for the setting a PLA programmer burns into the array. The
// defaults are the minimized 8-PLA(6,2,21) of the example system (18,6,20).
// Planes, cells and the K marker follow the source; the binary coding of
// K-valued lines is this design's own choice. Purely combinational, no clock.
module kpla #(
  parameter int unsigned K = mvl_pkg::K8,             // number of logic values
  parameter int unsigned N = mvl_pkg::S18_N,          // inputs n
  parameter int unsigned S = mvl_pkg::S18_S,          // outputs s
  parameter int unsigned Q = mvl_pkg::S18_Q_MIN,      // product lines q
  parameter logic [Q-1:0][N-1:0][7:0] AND_MAT = mvl_pkg::S18_AND_MIN,
  parameter logic [Q-1:0][S-1:0][7:0] OR_MAT  = mvl_pkg::S18_OR_MIN,
  localparam int unsigned W = $clog2(K)
) (
  input  logic [W-1:0] v [N],                 // K-valued inputs v1 .. vn
  output logic [W-1:0] f [S],                 // K-valued outputs f1 .. fs
  output logic [W-1:0] p [Q]                  // product lines (K-1 = active)
);

  logic [W-1:0] lit  [Q][N];                  // AND-plane cell outputs
  logic [W-1:0] term [S][Q];                  // OR-plane cell outputs

  for (genvar r = 0; r < Q; r++) begin : g_row
    for (genvar i = 0; i < N; i++) begin : g_and
      localparam int unsigned JV = int'(AND_MAT[Q-1-r][N-1-i]);
      if (JV < K) begin : g_cell
        gate_aj #(.K(K), .A(K - 1), .J(JV)) u_gate (.x(v[i]), .y(lit[r][i]));
      end else begin : g_empty
        assign lit[r][i] = W'(K - 1);         // no cell: neutral input of MIN
      end
    end
    mv_min #(.K(K), .N(N)) u_min (.a(lit[r]), .y(p[r]));

    for (genvar k = 0; k < S; k++) begin : g_or
      localparam int unsigned AV = int'(OR_MAT[Q-1-r][S-1-k]);
      if (AV < K) begin : g_cell
        gate_aj #(.K(K), .A(AV), .J(K - 1)) u_gate (.x(p[r]), .y(term[k][r]));
      end else begin : g_empty
        assign term[k][r] = '0;               // no cell: neutral input of MAX
      end
    end
  end

  for (genvar k = 0; k < S; k++) begin : g_col
    mv_max #(.K(K), .N(Q)) u_max (.a(term[k]), .y(f[k]));
  end

endmodule

// Circuit S: a system of partial Boolean functions (m,r,q) realized with
// many-valued gates.
//
// The m binary inputs are cut into n = ceil(m/log2 K) groups of log2(K) bits;
// a T(2/K) translator turns each group into one K-valued signal v. A K-PLA(n,s,q)
// computes s K-valued outputs f from them, and a T(K/2) translator turns each f
// back into log2(K) binary outputs, of which the first r form g. Inputs are
// grouped in order: x1..x3 form v1 (x1 most significant), x4..x6 form v2, and so
// on; f1 gives g1..g3 (g1 most significant), f2 gives g4..g6.
//
// x[M-1] is x1 and x[0] is xm; g[R-1] is g1 and g[0] is gr. v, f and the
// product lines p are brought out for observation. Purely combinational: g
// follows x after the delay of three gate levels plus the PLA, no clock.
//
// Defaults: K = 8, the example system (18,6,20) and the minimized 8-PLA(6,2,21)
// with six T(2/8) and two T(8/2) translators, as in the source. When m or r is
// not a multiple of log2 K, the missing low input bits of the last group are
// tied to 0 and the surplus output bits are dropped: this is this design's own
// choice.
module circuit_s #(
  parameter int unsigned K = mvl_pkg::K8,             // number of logic values
  parameter int unsigned M = mvl_pkg::S18_M,          // binary inputs m
  parameter int unsigned R = mvl_pkg::S18_R,          // binary outputs r
  parameter int unsigned Q = mvl_pkg::S18_Q_MIN,      // product lines q
  localparam int unsigned W = $clog2(K),
  localparam int unsigned N = (M + W - 1) / W,        // K-valued inputs n
  localparam int unsigned S = (R + W - 1) / W,        // K-valued outputs s
  parameter logic [Q-1:0][N-1:0][7:0] AND_MAT = mvl_pkg::S18_AND_MIN,
  parameter logic [Q-1:0][S-1:0][7:0] OR_MAT  = mvl_pkg::S18_OR_MIN
) (
  input  logic [M-1:0] x,                     // binary inputs, x[M-1] = x1
  output logic [R-1:0] g,                     // binary outputs, g[R-1] = g1
  output logic [W-1:0] v [N],                 // K-valued PLA inputs
  output logic [W-1:0] f [S],                 // K-valued PLA outputs
  output logic [W-1:0] p [Q]                  // PLA product lines
);

  logic [N*W-1:0] x_pad;
  logic [S*W-1:0] g_pad;

  assign x_pad = {x, {(N*W-M){1'b0}}};

  for (genvar i = 0; i < N; i++) begin : g_in
    t2k #(.K(K)) u_t2k (.x(x_pad[N*W-1-W*i -: W]), .v(v[i]));
  end

  kpla #(.K(K), .N(N), .S(S), .Q(Q), .AND_MAT(AND_MAT), .OR_MAT(OR_MAT))
    u_pla (.v(v), .f(f), .p(p));

  for (genvar k = 0; k < S; k++) begin : g_out
    tk2 #(.K(K)) u_tk2 (.f(f[k]), .g(g_pad[S*W-1-W*k -: W]));
  end

  assign g = g_pad[S*W-1 -: R];

endmodule

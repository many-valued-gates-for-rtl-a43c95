// T(2/K): translator from a binary word of log2(K) bits to one K-valued signal.
//
// Structure: a full decoder of the input word followed by programmable cells
// and a MAX gate. Column c (c = 0 .. K-1) is an AND of the input bits, each
// taken true or through a NOT as bit c requires, so exactly one column carries
// 1. Each column drives a GATE(c,1) cell, which turns the 1 into the value c.
// A MAX gate over all columns yields v = c. The most significant input bit
// (x[W-1]) is the first input pin xi1, so x = 3'b101 gives v = 5 for K = 8.
//
// The column structure and the GATE(c,1) cells follow the source; the
// binary coding of the K-valued output is this design's own choice.
// Purely combinational, no clock. K must be a power of two.
module t2k #(
  parameter int unsigned K = 8,               // number of logic values
  localparam int unsigned W = $clog2(K)       // binary input pins = output bits
) (
  input  logic [W-1:0] x,                     // x[W-1] = xi1 ... x[0] = xiW
  output logic [W-1:0] v                      // K-valued output, 0 .. K-1
);

  initial begin
    assert (K >= 2 && (1 << W) == K) else $error("%m: K=%0d is not a power of two", K);
  end

  logic [W-1:0] col_in  [K];                  // decoder column c as a K-valued 0/1
  logic [W-1:0] col_out [K];                  // GATE(c,1) output: c or 0

  for (genvar c = 0; c < K; c++) begin : g_col
    // AND of literals: bit b taken true where c has a 1, inverted where a 0.
    always_comb col_in[c] = W'(&(x ~^ W'(c)));
    gate_aj #(.K(K), .A(c), .J(1)) u_gate (.x(col_in[c]), .y(col_out[c]));
  end

  mv_max #(.K(K), .N(K)) u_max (.a(col_out), .y(v));

endmodule

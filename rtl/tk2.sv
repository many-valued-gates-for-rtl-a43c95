// T(K/2): translator from one K-valued signal to a binary word of log2(K) bits.
//
// Structure: a row of programmable cells followed by binary OR gates. Column j
// (j = 1 .. K-1) holds a GATE(1,j) cell, which outputs 1 exactly when the input
// equals j. Output bit g[b] is the OR of the columns whose index j has bit b
// set. The source also draws a GATE(0,0) cell in column 0; its output is always
// 0 and feeds no OR gate, so it is left out here. The most significant output
// (g[W-1]) is the first output pin gi1, so f = 4 gives g = 3'b100 for K = 8.
//
// The cells and OR wiring follow the source; the binary coding of the
// K-valued input is this design's own choice. Purely combinational, no clock.
// K must be a power of two.
module tk2 #(
  parameter int unsigned K = 8,               // number of logic values
  localparam int unsigned W = $clog2(K)
) (
  input  logic [W-1:0] f,                     // K-valued input, 0 .. K-1
  output logic [W-1:0] g                      // g[W-1] = gi1 ... g[0] = giW
);

  initial begin
    assert (K >= 2 && (1 << W) == K) else $error("%m: K=%0d is not a power of two", K);
  end

  logic [W-1:0] col [K];                      // GATE(1,j) outputs (col[0] unused)
  logic [K-1:0] hit;                          // col[j] as a binary line

  assign col[0] = '0;
  assign hit[0] = 1'b0;
  for (genvar j = 1; j < K; j++) begin : g_col
    gate_aj #(.K(K), .A(1), .J(j)) u_gate (.x(f), .y(col[j]));
    assign hit[j] = col[j][0];
  end

  // OR plane: bit b collects every column j whose binary index has bit b set.
  always_comb begin
    g = '0;
    for (int j = 1; j < K; j++)
      for (int b = 0; b < W; b++)
        if (((j >> b) & 1) == 1) g[b] = g[b] | hit[j];
  end

endmodule

// K-valued MIN gate with N inputs: y = min(a[0], ..., a[N-1]).
//
// MIN is the K-valued counterpart of AND. In the K-PLA it joins the GATE(K-1,j)
// literal cells of one product line, so the line carries K-1 only when every
// literal matches. Inputs and output are binary-coded K-valued lines of
// $clog2(K) bits. Purely combinational; the neutral value is K-1.
module mv_min #(
  parameter int unsigned K = 8,               // number of logic values
  parameter int unsigned N = 2,               // number of inputs, at least 1
  localparam int unsigned W = $clog2(K)
) (
  input  logic [W-1:0] a [N],
  output logic [W-1:0] y
);

  always_comb begin
    y = W'(K - 1);
    for (int i = 0; i < N; i++)
      if (a[i] < y) y = a[i];
  end

endmodule

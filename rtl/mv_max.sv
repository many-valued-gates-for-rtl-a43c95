// K-valued MAX gate with N inputs: y = max(a[0], ..., a[N-1]).
//
// MAX is the K-valued counterpart of OR. It collects the GATE(j,1) outputs of a
// T(2/K) translator and forms each output column of the K-PLA's OR plane.
// Inputs and output are binary-coded K-valued lines of $clog2(K) bits. Purely
// combinational; the neutral value is 0.
module mv_max #(
  parameter int unsigned K = 8,               // number of logic values
  parameter int unsigned N = 2,               // number of inputs, at least 1
  localparam int unsigned W = $clog2(K)
) (
  input  logic [W-1:0] a [N],
  output logic [W-1:0] y
);

  always_comb begin
    y = '0;
    for (int i = 0; i < N; i++)
      if (a[i] > y) y = a[i];
  end

endmodule

// GATE(A,j): the programmable K-valued cell of the translators and the K-PLA.
//
// One K-valued input x, one K-valued output y:  y = A when x = j, y = 0 otherwise.
// A and j are the two programmable constants of the cell; here they are
// parameters, fixed when the circuit is built, as a fuse-programmed cell is
// fixed by its programmer. The behaviour is as the source describes it; the
// binary coding of K-valued lines ($clog2(K) bits, value 0 .. K-1) is this
// design's own choice. Purely combinational, no clock.
module gate_aj #(
  parameter int unsigned K = 8,               // number of logic values
  parameter int unsigned A = 1,               // value output on a match, 0 .. K-1
  parameter int unsigned J = 0,               // input value that is matched, 0 .. K-1
  localparam int unsigned W = $clog2(K)
) (
  input  logic [W-1:0] x,
  output logic [W-1:0] y
);

  initial begin
    assert (A < K && J < K) else $error("gate_aj: A=%0d, J=%0d outside 0..%0d", A, J, K - 1);
  end

  always_comb y = (x == W'(J)) ? W'(A) : '0;

endmodule

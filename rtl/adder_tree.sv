// adder_tree: combinational sum of N signed operands with N - 1 two-input
// adders arranged as a complete binary tree, ceil(log2 N) adders deep.
//
// Operand j is placed at leaf N + j of an implicit heap; node i adds nodes 2i
// and 2i+1, and node 1 is the result. Operands are sign-extended to OW bits
// before the first addition, so OW >= IW + ceil(log2 N) never overflows.
// Used for the n adders of one equivalent multiplier and for the K*K-input
// sum of the filter.
module adder_tree #(
  parameter int unsigned N  = 6,
  parameter int unsigned IW = 44,
  parameter int unsigned OW = IW + ((N > 1) ? $clog2(N) : 0)
) (
  input  logic signed [N-1:0][IW-1:0] in,
  output logic signed [OW-1:0]        sum
);

  logic signed [OW-1:0] node [1:2*N-1];

  always_comb begin
    for (int j = 0; j < N; j++) node[N + j] = OW'(signed'(in[j]));
    for (int i = N - 1; i >= 1; i--) node[i] = node[2*i] + node[2*i + 1];
    sum = node[1];
  end

endmodule

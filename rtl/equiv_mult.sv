// equiv_mult: "equivalent multiplier" computing F * pixel without a
// multiplier, from the pixel's ternary sign code.
//
// The pre-multiplied table of premult_lut supplies, through its multiplexer
// bank, the n+1 terms C_i * F * lambda_i; an adder tree of n adders,
// ceil(log2(n+1)) deep, sums them. The result is the product as a signed
// fixed-point integer with LSB weight 2^Q, exact up to the rounding of the
// table words. Purely combinational; the filtering module registers it.
module equiv_mult #(
  parameter int unsigned M    = 8,
  parameter int unsigned LS   = 44,
  parameter logic [31:0] COEF = 32'h3fb758b4,
  parameter int          Q    = mlsf_pkg::prod_top_exp(COEF, mlsf_pkg::max_part(M)) - (int'(LS) - 2),
  parameter int unsigned NP   = mlsf_pkg::num_parts(M),
  parameter int unsigned PW   = LS + $clog2(NP)
) (
  input  logic        [2*NP-1:0] code,
  output logic signed [PW-1:0]   prod
);

  logic signed [NP-1:0][LS-1:0] term;

  premult_lut #(.M(M), .LS(LS), .COEF(COEF), .Q(Q), .NP(NP)) u_lut (
    .code (code),
    .term (term)
  );

  adder_tree #(.N(NP), .IW(LS), .OW(PW)) u_tree (
    .in  (term),
    .sum (prod)
  );

endmodule

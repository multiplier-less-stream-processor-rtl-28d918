// premult_lut: table of pre-multiplied coefficients for one kernel tap, and
// the multiplexer bank that reads it.
//
// For a fixed FP32 kernel coefficient F the table holds the n+1 products
// F * lambda_i and, in a second half, their two's complements, 2(n+1) words
// of LS bits in all, so that a negative digit selects a stored negative value
// instead of needing a subtractor. Words are signed fixed-point integers with
// a common LSB weight 2^Q (Q is shared by all taps of a kernel and computed
// by the filtering module), i.e. every product is aligned to the exponent of
// the largest one in the kernel. Table contents are computed at elaboration
// from COEF (rounded to nearest where a product is wider than the word).
//
// The mux bank reads all n+1 digits of a coded pixel at once: for digit i it
// returns word i when C_i = +1, word n+1+i when C_i = -1, and zero when
// C_i = 0 (the unused code 2'b10 also reads as zero). Purely combinational.
module premult_lut #(
  parameter int unsigned M    = 8,
  parameter int unsigned LS   = 44,
  parameter logic [31:0] COEF = 32'h3fb758b4,
  parameter int          Q    = mlsf_pkg::prod_top_exp(COEF, mlsf_pkg::max_part(M)) - (int'(LS) - 2),
  parameter int unsigned NP   = mlsf_pkg::num_parts(M)
) (
  input  logic        [2*NP-1:0]       code,
  output logic signed [NP-1:0][LS-1:0] term
);

  import mlsf_pkg::*;

  function automatic logic [2*NP-1:0][LS-1:0] build_table();
    logic [2*NP-1:0][LS-1:0] t;
    longint v;
    for (int i = 0; i < NP; i++) begin
      v = premult_entry(COEF, part_value(M, i), Q);
      t[i]      = LS'(v);
      t[NP + i] = LS'(-v);
    end
    return t;
  endfunction

  localparam logic [2*NP-1:0][LS-1:0] TABLE = build_table();

  always_comb begin
    for (int i = 0; i < NP; i++) begin
      unique case (tdigit_e'(code[2*i +: 2]))
        TD_POS:  term[i] = TABLE[i];
        TD_NEG:  term[i] = TABLE[NP + i];
        default: term[i] = '0;
      endcase
    end
  end

endmodule

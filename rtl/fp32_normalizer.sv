// fp32_normalizer: final stage of the filter, converting the signed
// fixed-point sum (LSB weight 2^Q) into an IEEE-754 single-precision word.
//
// The adders before it carry no exponent: every partial result shares the
// exponent fixed at elaboration, so normalisation happens only here, once
// per output. Steps: take sign and magnitude, find the leading one at bit p,
// shift it to the top, keep 23 fraction bits and round to nearest, ties to
// even (a carry out of the fraction bumps the exponent), biased exponent
// p + Q + 127. Zero gives +0. Results too large for FP32 saturate to
// infinity and results below the normal range are flushed to signed zero;
// neither happens for 8-bit pixels and kernels whose dynamic range fits the
// table words. Rounding and the overflow/underflow policy are this design's
// choice.
//
// The output format defaults to IEEE-754 single precision (EW = 8 exponent
// bits, FW = 23 fraction bits); EW/FW select a narrower IEEE-style format
// (e.g. 5/10 for half precision) for reduced-precision builds, with the same
// rounding and the same overflow/underflow policy.
//
// Timing: one registered stage; `in_valid` at cycle t gives `out_valid` and
// `out_fp` at cycle t + 1, one result per clock.
module fp32_normalizer #(
  parameter int unsigned AW = 50,
  parameter int          Q  = -35,
  parameter int unsigned EW = 8,
  parameter int unsigned FW = 23
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [AW-1:0] in_acc,
  output logic                 out_valid,
  output logic [EW+FW:0]       out_fp
);

  localparam int BIAS = (1 << (EW - 1)) - 1;
  localparam int EMAX = (1 << EW) - 1;

  logic          sgn;
  logic [AW-1:0] mag, norm;
  int            p;
  int            e;
  logic [FW-1:0] frac;
  logic          guard, sticky, rnd;
  logic [FW:0]   frac_r;
  logic [EW+FW:0] fp;

  initial begin
    assert (AW >= FW + 3) else $error("fp32_normalizer: AW too small for FW");
  end

  always_comb begin
    sgn = in_acc[AW-1];
    mag = sgn ? AW'(-in_acc) : AW'(in_acc);
    p = 0;
    for (int b = 0; b < AW; b++) if (mag[b]) p = b;
    norm   = mag << (AW - 1 - p);
    frac   = norm[AW-2 -: FW];
    guard  = norm[AW-2-FW];
    sticky = |norm[AW-3-FW:0];
    rnd    = guard & (sticky | frac[0]);
    frac_r = {1'b0, frac} + (FW+1)'(rnd);
    e      = p + Q + BIAS + int'(frac_r[FW]);
    if (mag == '0)      fp = '0;
    else if (e >= EMAX) fp = {sgn, {EW{1'b1}}, {FW{1'b0}}};
    else if (e <= 0)    fp = {sgn, {(EW+FW){1'b0}}};
    else                fp = {sgn, e[EW-1:0], frac_r[FW-1:0]};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
    if (in_valid) out_fp <= fp;
  end

endmodule

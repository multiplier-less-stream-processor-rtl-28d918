// filtering_module: back half of the filter, computing one FP32 output
// O(x0,y0) = sum over the K x K window of F(h,j) * I from a window of
// ternary-coded pixels, with no multipliers.
//
// Structure: K*K equivalent multipliers, one per kernel tap, each with its
// own table of pre-multiplied coefficients; a K*K-input adder tree; and a
// single normalisation to IEEE-754 at the end. All table words share the
// LSB weight 2^Q, with Q chosen at elaboration so that the largest
// |F| * lambda of the kernel fills an LS-bit signed word (LS = 44 by
// default); sums grow by ceil(log2(n+1)) bits in a multiplier and by
// ceil(log2(K*K)) bits in the final tree, so no partial result ever
// overflows or needs renormalising.
//
// COEFS holds the FP32 kernel, index r*K + c for window row r (top = 0) and
// column c (left = 0); win[r][c] is multiplied by COEFS[r*K + c]. The default
// is the 3x3 Gaussian of mlsf_pkg. `in_x`/`in_y` are carried alongside the
// data unchanged. EW/FW set the output format: IEEE-754 single precision by
// default, or a narrower IEEE-style format for reduced-precision builds.
//
// Timing: three registered stages (products, window sum, normalisation); a
// window at cycle t gives its result at cycle t + 3. One result per clock.
module filtering_module #(
  parameter int unsigned                M     = 8,
  parameter int unsigned                K     = 3,
  parameter int unsigned                LS    = 44,
  parameter logic [K*K-1:0][31:0]       COEFS = mlsf_pkg::GAUSS3_COEFS,
  parameter int unsigned                XW    = 10,
  parameter int unsigned                YW    = 16,
  parameter int unsigned                EW    = 8,
  parameter int unsigned                FW    = 23,
  parameter int unsigned                NP    = mlsf_pkg::num_parts(M),
  parameter int unsigned                LC    = 2 * NP
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        in_valid,
  input  logic [XW-1:0]               in_x,
  input  logic [YW-1:0]               in_y,
  input  logic [K-1:0][K-1:0][LC-1:0] win,
  output logic                        out_valid,
  output logic [XW-1:0]               out_x,
  output logic [YW-1:0]               out_y,
  output logic [EW+FW:0]              out_fp
);

  import mlsf_pkg::*;

  localparam int unsigned NT  = K * K;
  localparam int unsigned PW  = LS + $clog2(NP);
  localparam int unsigned ACW = PW + $clog2(NT);

  // Common LSB exponent of every pre-multiplied word of the kernel.
  function automatic int calc_q();
    int t;
    t = -100000;
    for (int c = 0; c < NT; c++)
      if (prod_top_exp(COEFS[c], max_part(M)) > t) t = prod_top_exp(COEFS[c], max_part(M));
    if (t == -100000) t = 0;
    return t - (int'(LS) - 2);
  endfunction

  localparam int Q = calc_q();

  // Stage 1: the K*K equivalent multipliers.
  logic signed [NT-1:0][PW-1:0] prod, prod_q;

  for (genvar r = 0; r < K; r++) begin : g_r
    for (genvar c = 0; c < K; c++) begin : g_c
      equiv_mult #(
        .M(M), .LS(LS), .COEF(COEFS[r*K + c]), .Q(Q), .NP(NP), .PW(PW)
      ) u_mult (
        .code (win[r][c]),
        .prod (prod[r*K + c])
      );
    end
  end

  logic          v1, v2;
  logic [XW-1:0] x1, x2;
  logic [YW-1:0] y1, y2;

  always_ff @(posedge clk) begin
    if (!rst_n) v1 <= 1'b0;
    else        v1 <= in_valid;
    if (in_valid) begin
      prod_q <= prod;
      x1     <= in_x;
      y1     <= in_y;
    end
  end

  // Stage 2: sum of the window.
  logic signed [ACW-1:0] acc, acc_q;

  adder_tree #(.N(NT), .IW(PW), .OW(ACW)) u_sum (
    .in  (prod_q),
    .sum (acc)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) v2 <= 1'b0;
    else        v2 <= v1;
    if (v1) begin
      acc_q <= acc;
      x2    <= x1;
      y2    <= y1;
    end
  end

  // Stage 3: normalisation to FP32.
  fp32_normalizer #(.AW(ACW), .Q(Q), .EW(EW), .FW(FW)) u_norm (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (v2),
    .in_acc    (acc_q),
    .out_valid (out_valid),
    .out_fp    (out_fp)
  );

  always_ff @(posedge clk) begin
    if (v2) begin
      out_x <= x2;
      out_y <= y2;
    end
  end

endmodule

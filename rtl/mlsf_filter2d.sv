// mlsf_filter2d: multiplier-less 2D convolution stream processor.
//
// Filters an M-bit raster-scan image stream with a K x K kernel of FP32
// coefficients and returns IEEE-754 FP32 results, one per input pixel at
// steady state, without a frame buffer and without multipliers. Each pixel
// is recoded into signed radix-3 digits over the parts {1,3,9,...,R}; every
// product F * pixel then becomes a sum of n+1 pre-computed constants
// +/- F * lambda_i, and all such constants share one exponent so the adders
// are plain integer adders until a single final normalisation.
//
//   memory_module    : Coeff_Gen ROM + RAM-backed K-row stripe buffer, emits
//                      the K x K window of coded pixels for every pixel
//   filtering_module : K*K equivalent multipliers, window adder tree,
//                      FP32 normaliser
//
// Interface: drive `in_pix` with `in_valid` high, in raster order, row width
// W; raise `in_sof` with the first pixel of each frame (after reset the first
// pixel is also taken as the start of a frame). The input may pause at any
// cycle. Outputs appear only for windows wholly inside the image ("valid"
// convolution, (W-K+1) x (H-K+1) results per frame); `out_x`, `out_y` give
// the output position, the window centre.
//
// The result format is IEEE-754 single precision; EW/FW (exponent and
// fraction bits) give the reduced-precision variants, e.g. 5/10 for FP16.
//
// Timing: pixel at cycle t completes a window whose result appears at cycle
// t + 5 (1 ROM, 1 stripe shift, 3 filter stages).
module mlsf_filter2d #(
  parameter int unsigned          M     = 8,
  parameter int unsigned          K     = 3,
  parameter int unsigned          W     = 640,
  parameter int unsigned          LS    = 44,
  parameter int unsigned          YW    = 16,
  parameter int unsigned          EW    = 8,
  parameter int unsigned          FW    = 23,
  parameter logic [K*K-1:0][31:0] COEFS = mlsf_pkg::GAUSS3_COEFS,
  parameter int unsigned          XW    = $clog2(W)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic          in_sof,
  input  logic [M-1:0]  in_pix,
  output logic          out_valid,
  output logic [XW-1:0] out_x,
  output logic [YW-1:0] out_y,
  output logic [EW+FW:0] out_fp
);

  localparam int unsigned NP = mlsf_pkg::num_parts(M);

  // Stream rule: a start-of-frame flag is only meaningful with a pixel.
  a_sof_with_valid: assert property (@(posedge clk) disable iff (!rst_n) in_sof |-> in_valid)
    else $error("in_sof raised without in_valid");
  localparam int unsigned LC = 2 * NP;

  logic                        win_valid;
  logic [XW-1:0]               win_x;
  logic [YW-1:0]               win_y;
  logic [K-1:0][K-1:0][LC-1:0] win;

  memory_module #(.M(M), .K(K), .W(W), .YW(YW), .LC(LC), .XW(XW)) u_mem (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .in_sof    (in_sof),
    .in_pix    (in_pix),
    .win_valid (win_valid),
    .win_x     (win_x),
    .win_y     (win_y),
    .win       (win)
  );

  filtering_module #(
    .M(M), .K(K), .LS(LS), .COEFS(COEFS), .XW(XW), .YW(YW), .EW(EW), .FW(FW),
    .NP(NP), .LC(LC)
  ) u_filt (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (win_valid),
    .in_x      (win_x),
    .in_y      (win_y),
    .win       (win),
    .out_valid (out_valid),
    .out_x     (out_x),
    .out_y     (out_y),
    .out_fp    (out_fp)
  );

endmodule

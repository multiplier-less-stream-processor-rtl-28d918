// memory_module: front half of the filter. Codes the incoming raster-scan
// pixel stream and presents, one clock after each new pixel is stored, the
// K x K window of coded pixels that ends at that pixel.
//
// Data path: coeff_gen turns each M-bit pixel into its 2(n+1)-bit ternary
// sign code (one registered ROM read), and stripe_buffer shifts the code into
// a K-row stripe whose rows are RAM-backed. No frame buffer is used; only
// (K-1) rows of W - K words plus K x K registers.
//
// Flow control (this design's own): the source drives `in_valid` when a
// pixel is present and may pause at any time (the stripe simply holds); there
// is no back-pressure. `in_sof` marks the first pixel of a frame and restarts
// the column/row count; the count also starts at zero after reset. Columns
// wrap every W pixels. A window is flagged valid only when it lies wholly
// inside the image, i.e. when the newest pixel has column >= K-1 and row >=
// K-1; windows that straddle the left image border (the stripe wraps from one
// row end to the next row start) are not flagged. `win_x`, `win_y` give the
// image coordinates of the window centre, the output pixel (x0, y0).
//
// Timing: pixel at cycle t -> window and `win_valid` at cycle t + 2; one
// window per accepted pixel, at the input rate.
module memory_module #(
  parameter int unsigned M  = 8,
  parameter int unsigned K  = 3,
  parameter int unsigned W  = 640,
  parameter int unsigned YW = 16,
  parameter int unsigned LC = 2 * mlsf_pkg::num_parts(M),
  parameter int unsigned XW = $clog2(W)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        in_valid,
  input  logic                        in_sof,
  input  logic [M-1:0]                in_pix,
  output logic                        win_valid,
  output logic [XW-1:0]               win_x,
  output logic [YW-1:0]               win_y,
  output logic [K-1:0][K-1:0][LC-1:0] win
);

  localparam int unsigned C = (K - 1) / 2;

  logic          c_valid, c_sof;
  logic [LC-1:0] c_code;

  coeff_gen #(.M(M), .LC(LC)) u_coeff_gen (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .in_sof    (in_sof),
    .in_pix    (in_pix),
    .out_valid (c_valid),
    .out_sof   (c_sof),
    .out_code  (c_code)
  );

  stripe_buffer #(.LC(LC), .K(K), .W(W)) u_stripe (
    .clk   (clk),
    .rst_n (rst_n),
    .shift (c_valid),
    .din   (c_code),
    .win   (win)
  );

  // Position of the pixel being stored now, and of the next one.
  logic [XW-1:0] ncol, pcol;
  logic [YW-1:0] nrow, prow;

  always_comb begin
    pcol = c_sof ? '0 : ncol;
    prow = c_sof ? '0 : nrow;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ncol      <= '0;
      nrow      <= '0;
      win_valid <= 1'b0;
    end else begin
      win_valid <= c_valid && (pcol >= XW'(K - 1)) && (prow >= YW'(K - 1));
      if (c_valid) begin
        if (pcol == XW'(W - 1)) begin
          ncol <= '0;
          if (prow != '1) nrow <= prow + 1'b1;
          else            nrow <= prow;
        end else begin
          ncol <= pcol + 1'b1;
          nrow <= prow;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (c_valid) begin
      win_x <= pcol - XW'(C);
      win_y <= prow - YW'(C);
    end
  end

endmodule

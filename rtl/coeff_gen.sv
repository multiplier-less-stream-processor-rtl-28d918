// coeff_gen: pixel-to-ternary coder (the "Coeff_Gen" ROM).
//
// Each M-bit unsigned pixel is replaced by its radix-3 Bachet partition code:
// n+1 signed digits C_i in {-1,0,+1}, two bits each (tdigit_e encoding,
// digit i in code[2i+1:2i]), so that pixel = sum C_i * lambda_i with parts
// {1, 3, 9, ..., 3^(n-1), R}. For M = 8 the parts are {1,3,9,27,81,134} and the
// code is 12 bits. After coding, the pixel value itself is no longer needed.
//
// The ROM is a constant table of 2^M words built at elaboration by
// mlsf_pkg::ternary_code(). Where several digit strings give the same value,
// the table uses the last part only when the powers of three alone cannot
// reach the pixel, and balanced ternary for the rest (this is this design's
// choice; it reproduces every row of the partition table it was checked
// against, e.g. 5 -> {-1,-1,+1,0,0,0}, 255 -> all +1).
//
// Timing: one pixel per clock; the code, valid and start-of-frame flag appear
// one cycle after the pixel (registered ROM read). Synchronous active-low reset
// clears the valid flag only.
module coeff_gen #(
  parameter int unsigned M  = 8,
  parameter int unsigned LC = 2 * mlsf_pkg::num_parts(M)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic          in_sof,
  input  logic [M-1:0]  in_pix,
  output logic          out_valid,
  output logic          out_sof,
  output logic [LC-1:0] out_code
);

  localparam int unsigned DEPTH = 1 << M;

  function automatic logic [DEPTH-1:0][LC-1:0] build_rom();
    logic [DEPTH-1:0][LC-1:0] t;
    for (int q = 0; q < DEPTH; q++) t[q] = LC'(mlsf_pkg::ternary_code(M, longint'(q)));
    return t;
  endfunction

  localparam logic [DEPTH-1:0][LC-1:0] ROM = build_rom();

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_sof   <= 1'b0;
    end else begin
      out_valid <= in_valid;
      out_sof   <= in_valid & in_sof;
    end
    if (in_valid) out_code <= ROM[in_pix];
  end

endmodule

// mlsf_pkg: types, constants and elaboration-time functions shared by the
// multiplier-less 2D stream filter.
//
// The filter replaces every multiplication F*I (F a constant FP32 kernel
// coefficient, I an m-bit unsigned pixel) by a sum of pre-multiplied constants.
// A pixel q in [0, r], r = 2^m - 1, is written in the radix-3 "Bachet" partition
//     q = sum_{i=0..n} C_i * lambda_i,   C_i in {-1, 0, +1}
// with n = floor(log3(2r)), lambda_i = 3^i for i < n and the last part
// lambda_n = R = r - (3^0 + ... + 3^(n-1)). For m = 8: parts {1,3,9,27,81,134}.
// Each signed digit is carried in 2 bits, so a coded pixel is 2(n+1) bits
// (12 bits for m = 8).
//
// The pre-multiplied constants F*lambda_i are held as signed fixed-point
// integers that share one binary exponent Q (the weight of their LSB), chosen
// so that the largest |F|*lambda over the kernel just fits below the sign bit
// of an LS-bit word. This is the "common exponent, widened significand" coding:
// adders work on plain integers and only the final result is normalised back
// to FP32. The functions below compute those constants from the FP32 bit
// patterns of the kernel at elaboration time.
package mlsf_pkg;

  // Two-bit code of one ternary sign digit (two's complement of -1/0/+1).
  typedef enum logic [1:0] {
    TD_ZERO = 2'b00,
    TD_POS  = 2'b01,
    TD_NEG  = 2'b11
  } tdigit_e;

  // Default kernel: 3x3 sampled Gaussian (2*pi)^-1 sigma^-2 exp(-(x^2+y^2)/(2 sigma^2))
  // with sigma = 1/3, so that the corner-to-centre ratio is e^-9. Index is
  // row*K + col (row = y offset -1..1, col = x offset -1..1), FP32 bit patterns.
  localparam logic [8:0][31:0] GAUSS3_COEFS = {
    32'h39395bbf, 32'h3c825adc, 32'h39395bbf,   // row +1 (index 8..6)
    32'h3c825adc, 32'h3fb758b4, 32'h3c825adc,   // row  0 (index 5..3)
    32'h39395bbf, 32'h3c825adc, 32'h39395bbf    // row -1 (index 2..0)
  };

  // n = floor(log3(2r)) with r = 2^m - 1; number of parts is n + 1.
  function automatic int num_parts(input int m);
    longint two_r;
    longint p;
    int n;
    two_r = 2 * ((longint'(1) << m) - 1);
    p = 3;
    n = 0;
    while (p <= two_r) begin
      p = p * 3;
      n++;
    end
    return n + 1;
  endfunction

  // Value of part i (0..n) for m-bit inputs.
  function automatic longint part_value(input int m, input int i);
    int n;
    longint s;
    longint p;
    n = num_parts(m) - 1;
    s = 0;
    p = 1;
    for (int k = 0; k < n; k++) begin
      if (k == i) return p;
      s = s + p;
      p = p * 3;
    end
    return ((longint'(1) << m) - 1) - s;
  endfunction

  // Largest part (lambda_n is usually, but not always, the largest).
  function automatic longint max_part(input int m);
    longint mx;
    mx = 0;
    for (int i = 0; i < num_parts(m); i++)
      if (part_value(m, i) > mx) mx = part_value(m, i);
    return mx;
  endfunction

  // Ternary sign code of q: digit i in bits [2i+1:2i] (tdigit_e encoding).
  // The last part is used (+1) only when q exceeds what the powers of three
  // alone reach; the rest is then balanced ternary.
  function automatic logic [63:0] ternary_code(input int m, input longint q);
    int n;
    longint s;
    longint rem;
    longint d;
    logic [63:0] code;
    n = num_parts(m) - 1;
    s = 0;
    for (int k = 0; k < n; k++) s = s + part_value(m, k);
    code = '0;
    rem = q;
    if (q > s) begin
      code[2*n +: 2] = TD_POS;
      rem = q - part_value(m, n);
    end
    for (int k = 0; k < n; k++) begin
      d = ((rem % 3) + 3) % 3;
      if (d == 1) begin
        code[2*k +: 2] = TD_POS;
        rem = (rem - 1) / 3;
      end else if (d == 2) begin
        code[2*k +: 2] = TD_NEG;
        rem = (rem + 1) / 3;
      end else begin
        rem = rem / 3;
      end
    end
    return code;
  endfunction

  // ---- FP32 helpers for the pre-multiplied coefficient tables ----

  // 24-bit significand with the hidden bit (0 for zero and subnormals).
  function automatic longint fp_mant(input logic [31:0] f);
    if (f[30:23] == 8'd0) return longint'(f[22:0]);
    return longint'({1'b1, f[22:0]});
  endfunction

  // Exponent of the significand's LSB: |f| = fp_mant(f) * 2^fp_lsb_exp(f).
  function automatic int fp_lsb_exp(input logic [31:0] f);
    if (f[30:23] == 8'd0) return -149;
    return int'(f[30:23]) - 150;
  endfunction

  function automatic int bit_length(input longint v);
    int b;
    b = 0;
    while (v > 0) begin
      v = v >>> 1;
      b++;
    end
    return b;
  endfunction

  // Exponent of the top bit of |f| * lam (very small for a zero coefficient).
  function automatic int prod_top_exp(input logic [31:0] f, input longint lam);
    if (fp_mant(f) == 0) return -100000;
    return fp_lsb_exp(f) + bit_length(fp_mant(f) * lam) - 1;
  endfunction

  // Signed fixed-point value round(F * lam / 2^q) for one table entry
  // (rounding half away from zero where the product is wider than the word).
  function automatic longint premult_entry(input logic [31:0] f, input longint lam,
                                           input int q);
    longint mag;
    int sh;
    mag = fp_mant(f) * lam;
    sh = fp_lsb_exp(f) - q;
    if (sh >= 0) mag = mag <<< sh;
    else if (-sh >= 62) mag = 0;
    else mag = (mag + (longint'(1) <<< (-sh - 1))) >>> (-sh);
    return f[31] ? -mag : mag;
  endfunction

endpackage

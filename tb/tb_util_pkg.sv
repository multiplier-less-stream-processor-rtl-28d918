// tb_util_pkg: reference models shared by the testbenches of the 2D filter.
//
// Everything here is computed independently of the RTL: the ternary code is
// derived by offsetting the pixel and taking ordinary base-3 digits (digit
// minus one), and FP32 results are compared with double-precision sums of
// coefficient * pixel, using the simulator's own float conversions.
package tb_util_pkg;

  // Parts for 8-bit pixels: 1, 3, 9, 27, 81 and 255 - 121 = 134.
  localparam int NPARTS = 6;
  localparam int PARTS [NPARTS] = '{1, 3, 9, 27, 81, 134};

  // Reference 12-bit code: the last part is used only above 121; the
  // remainder r in [-121, 121] gives base-3 digits of r + 121, minus one.
  function automatic logic [11:0] ref_code(input int q);
    logic [11:0] c;
    int r;
    int d;
    c = '0;
    r = q;
    if (q > 121) begin
      c[11:10] = 2'b01;
      r = q - 134;
    end
    r = r + 121;
    for (int i = 0; i < 5; i++) begin
      d = r % 3;
      r = r / 3;
      c[2*i +: 2] = (d == 0) ? 2'b11 : (d == 1) ? 2'b00 : 2'b01;
    end
    return c;
  endfunction

  // Value represented by a 12-bit code (-1000 flags an illegal digit).
  function automatic int decode(input logic [11:0] c);
    int v;
    v = 0;
    for (int i = 0; i < NPARTS; i++) begin
      case (c[2*i +: 2])
        2'b00: ;
        2'b01: v += PARTS[i];
        2'b11: v -= PARTS[i];
        default: return -1000;
      endcase
    end
    return v;
  endfunction

  function automatic real absr(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

  function automatic real pow2(input int e);
    real v;
    v = 1.0;
    if (e >= 0) for (int i = 0; i < e; i++) v = v * 2.0;
    else        for (int i = 0; i < -e; i++) v = v / 2.0;
    return v;
  endfunction

  // FP32 bit pattern to real (zero, normal and subnormal numbers).
  function automatic real f2r(input logic [31:0] f);
    real v;
    if (f[30:23] == 8'd0) v = real'(f[22:0]) * pow2(-149);
    else                  v = real'({1'b1, f[22:0]}) * pow2(int'(f[30:23]) - 150);
    return f[31] ? -v : v;
  endfunction

  // real to FP32, round to nearest even, via the double's bit fields.
  // Results below the normal range are flushed to zero.
  function automatic logic [31:0] r2f(input real x);
    logic [63:0] b;
    int          fe;
    logic [23:0] fr;
    logic        g, st;
    b = $realtobits(x);
    if (b[62:52] == 11'd0) return {b[63], 31'd0};
    fe = int'(b[62:52]) - 1023 + 127;
    fr = {1'b0, b[51:29]};
    g  = b[28];
    st = |b[27:0];
    if (g && (st || fr[0])) fr = fr + 1'b1;
    if (fr[23]) fe++;
    if (fe >= 255) return {b[63], 8'hff, 23'd0};
    if (fe <= 0)   return {b[63], 31'd0};
    return {b[63], 8'(fe), fr[22:0]};
  endfunction

  // floor(log2(x)) for x > 0.
  function automatic int flog2(input real x);
    int e;
    e = 0;
    while (x >= 2.0) begin x = x / 2.0; e++; end
    while (x < 1.0)  begin x = x * 2.0; e--; end
    return e;
  endfunction

  // Size of one FP32 unit in the last place at magnitude x.
  function automatic real ulp32(input real x);
    if (absr(x) < 1.0e-30) return pow2(-149);
    return pow2(flog2(absr(x)) - 23);
  endfunction

  // real to an IEEE-style format with ew exponent and fw fraction bits
  // (fw <= 23), right-aligned, round to nearest even, below-normal to zero.
  function automatic logic [31:0] r2fp(input real x, input int ew, input int fw);
    logic [63:0] b;
    int          fe, emax;
    longint      fr;
    logic        g, st;
    b = $realtobits(x);
    emax = (1 << ew) - 1;
    if (b[62:52] == 11'd0) return 32'(b[63]) << (ew + fw);
    fe = int'(b[62:52]) - 1023 + (1 << (ew - 1)) - 1;
    fr = longint'(b[51:0]) >>> (52 - fw);
    g  = b[51 - fw];
    st = (b[51:0] & ((64'd1 << (51 - fw)) - 1)) != 0;
    if (g && (st || fr[0])) fr = fr + 1;
    if (fr >= (longint'(1) << fw)) begin
      fr = 0;
      fe++;
    end
    if (fe >= emax) return (32'(b[63]) << (ew + fw)) | (32'(emax) << fw);
    if (fe <= 0)    return 32'(b[63]) << (ew + fw);
    return (32'(b[63]) << (ew + fw)) | (32'(fe) << fw) | 32'(fr);
  endfunction

  // Right-aligned IEEE-style value to real.
  function automatic real fp2r(input logic [31:0] f, input int ew, input int fw);
    int  e;
    real v;
    e = int'((f >> fw) & ((32'd1 << ew) - 1));
    if (e == 0) v = real'(f & ((32'd1 << fw) - 1)) * pow2(2 - (1 << (ew - 1)) - fw);
    else        v = real'((f & ((32'd1 << fw) - 1)) | (32'd1 << fw)) * pow2(e - ((1 << (ew - 1)) - 1) - fw);
    return f[ew + fw] ? -v : v;
  endfunction

  // Unit in the last place at magnitude x for fw fraction bits.
  function automatic real ulpn(input real x, input int fw);
    if (absr(x) < 1.0e-30) return pow2(-149);
    return pow2(flog2(absr(x)) - fw);
  endfunction

  // True when the FP32 result dut is within one ulp of ref plus an absolute
  // allowance abs_tol (rounding of the pre-multiplied tables).
  function automatic bit fp_close(input logic [31:0] dut, input real ref_v, input real abs_tol);
    return absr(f2r(dut) - ref_v) <= ulp32(ref_v) + abs_tol;
  endfunction

endpackage

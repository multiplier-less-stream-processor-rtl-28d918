// tb_equiv_mult: the equivalent multiplier must return F * q / 2^Q for every
// 8-bit pixel q, to within the rounding of its six table words, for a large,
// a tiny and a negative FP32 coefficient.
module tb_equiv_mult;
  import tb_util_pkg::*;
  localparam int LS = 44, PW = 47;
  localparam logic [2:0][31:0] CF = {32'hc0490fdb, 32'h39395bbf, 32'h3fb758b4};
  localparam int QS [3] = '{-35, -35, -34};

  logic [11:0] code;
  logic signed [2:0][PW-1:0] prod;
  int checks = 0, failures = 0;

  for (genvar g = 0; g < 3; g++) begin : g_mult
    equiv_mult #(.M(8), .LS(LS), .COEF(CF[g]), .Q(QS[g]), .PW(PW)) dut (
      .code(code), .prod(prod[g]));
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int q = 0; q < 256; q++) begin
      code = ref_code(q);
      #1;
      for (int g = 0; g < 3; g++) begin
        real target, got;
        target = f2r(CF[g]) * real'(q) / pow2(QS[g]);
        got = real'(longint'(signed'(prod[g])));
        checks++;
        if (absr(got - target) > 3.0) begin
          failures++;
          $display("FAIL q=%0d g=%0d got %f exp %f", q, g, got, target);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

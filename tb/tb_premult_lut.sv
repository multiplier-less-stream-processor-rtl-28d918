// tb_premult_lut: for three coefficients (the Gaussian centre and corner with
// a shared exponent, and a negative value) and every 8-bit pixel code, each
// selected term must equal C_i * F * lambda_i / 2^Q to within half an LSB.
module tb_premult_lut;
  import tb_util_pkg::*;
  localparam int LS = 44;
  localparam logic [2:0][31:0] CF = {32'hc0490fdb, 32'h39395bbf, 32'h3fb758b4};
  localparam int QS [3] = '{-35, -35, -34};

  logic [11:0] code;
  logic signed [2:0][5:0][LS-1:0] term;
  int checks = 0, failures = 0;
  int neg_seen = 0;

  for (genvar g = 0; g < 3; g++) begin : g_lut
    premult_lut #(.M(8), .LS(LS), .COEF(CF[g]), .Q(QS[g])) dut (.code(code), .term(term[g]));
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
      for (int g = 0; g < 3; g++)
        for (int i = 0; i < NPARTS; i++) begin
          real target, got;
          int  d;
          d = (code[2*i +: 2] == 2'b01) ? 1 : (code[2*i +: 2] == 2'b11) ? -1 : 0;
          if (d < 0) neg_seen++;
          target = real'(d) * f2r(CF[g]) * real'(PARTS[i]) / pow2(QS[g]);
          got = real'(longint'(signed'(term[g][i])));
          checks++;
          if (absr(got - target) > 0.5) begin
            failures++;
            $display("FAIL q=%0d g=%0d i=%0d got %f exp %f", q, g, i, got, target);
          end
        end
    end
    checks++;
    if (neg_seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

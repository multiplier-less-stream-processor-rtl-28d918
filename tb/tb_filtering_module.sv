// tb_filtering_module: random windows of 8-bit pixels, coded with the
// reference coder, are filtered by the default 3x3 Gaussian and by a signed
// kernel. Each FP32 result must match the double-precision sum of F * pixel
// to within one FP32 ulp plus the table rounding (27 LSBs of weight 2^Q), come
// out exactly three cycles after its window, and keep its coordinates.
module tb_filtering_module;
  import tb_util_pkg::*;
  localparam int K = 3, XW = 10, YW = 16;
  localparam logic [8:0][31:0] CA = mlsf_pkg::GAUSS3_COEFS;
  // -0.5, 1.25, -0.0078125, 2.0, -3.0, 0.1, 0.0, 7.5, -1.0 (index 0..8)
  localparam logic [8:0][31:0] CB = {32'hbf800000, 32'h40f00000, 32'h00000000,
                                     32'h3dcccccd, 32'hc0400000, 32'h40000000,
                                     32'hbc000000, 32'h3fa00000, 32'hbf000000};

  logic clk = 1'b0;
  logic rst_n, in_valid;
  logic [XW-1:0] in_x;
  logic [YW-1:0] in_y;
  logic [K-1:0][K-1:0][11:0] win;
  logic va, vb;
  logic [XW-1:0] xa, xb;
  logic [YW-1:0] ya, yb;
  logic [31:0] fa, fb;
  int checks = 0, failures = 0;

  filtering_module #(.K(K), .COEFS(CA), .XW(XW), .YW(YW)) dut_a (
    .clk, .rst_n, .in_valid, .in_x, .in_y, .win,
    .out_valid(va), .out_x(xa), .out_y(ya), .out_fp(fa));
  filtering_module #(.K(K), .COEFS(CB), .XW(XW), .YW(YW)) dut_b (
    .clk, .rst_n, .in_valid, .in_x, .in_y, .win,
    .out_valid(vb), .out_x(xb), .out_y(yb), .out_fp(fb));

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real qweight(input logic [8:0][31:0] cf);
    real mx;
    mx = 0.0;
    for (int i = 0; i < 9; i++) if (absr(f2r(cf[i])) > mx) mx = absr(f2r(cf[i]));
    return pow2(flog2(mx * 134.0) - 42);
  endfunction

  typedef struct { int cyc; real ra; real rb; int x; int y; } exp_t;
  exp_t q [$];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) begin
    if (rst_n) begin
      checks++;
      if (va !== vb) begin failures++; $display("FAIL valid mismatch"); end
      if (q.size() > 0 && q[0].cyc == cyc) begin
        exp_t e;
        e = q.pop_front();
        checks += 4;
        if (!va) begin failures++; $display("FAIL missing output at %0d", cyc); end
        if (!fp_close(fa, e.ra, 27.0 * qweight(CA))) begin
          failures++; $display("FAIL A got %h (%g) exp %g", fa, f2r(fa), e.ra);
        end
        if (!fp_close(fb, e.rb, 27.0 * qweight(CB))) begin
          failures++; $display("FAIL B got %h (%g) exp %g", fb, f2r(fb), e.rb);
        end
        if (int'(xa) != e.x || int'(ya) != e.y || xb != xa || yb != ya) begin
          failures++; $display("FAIL coordinates");
        end
      end else if (va) begin
        failures++;
        $display("FAIL unexpected output at %0d", cyc);
      end
    end
  end

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; in_x = '0; in_y = '0; win = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      @(posedge clk);
      #1;
      in_valid = ($urandom % 4) != 0;
      if (in_valid) begin
        exp_t e;
        int pix;
        e.ra = 0.0; e.rb = 0.0;
        for (int r = 0; r < K; r++)
          for (int c = 0; c < K; c++) begin
            pix = (t < 20) ? ((t % 2 != 0) ? 255 : 0) : int'($urandom % 256);
            win[r][c] = ref_code(pix);
            e.ra += f2r(CA[r*K + c]) * real'(pix);
            e.rb += f2r(CB[r*K + c]) * real'(pix);
          end
        in_x = XW'($urandom);
        in_y = YW'($urandom);
        e.x = int'(in_x);
        e.y = int'(in_y);
        e.cyc = cyc + 3;
        q.push_back(e);
      end
    end
    @(posedge clk);
    #1 in_valid = 1'b0;
    repeat (5) @(posedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL outputs missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

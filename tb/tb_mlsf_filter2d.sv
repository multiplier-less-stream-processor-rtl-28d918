// tb_mlsf_filter2d: end-to-end test of the stream filter at a reduced row
// width (W = 16). Three 16 x 7 frames of random pixels, with random input
// pauses and an unfinished extra row n_before one start of frame, go through
// three filters side by side: the default 3x3 Gaussian, a signed kernel and
// a reduced-precision Gaussian build (32-bit table words, FP16 results).
// Every output is compared with a double-precision convolution of the
// frame, must carry the right (x0, y0), appear five cycles after the pixel
// that completes its window, and each frame must give (W-2) x (H-2) outputs.
// The test also counts the mechanisms it exercised (input pauses, windows
// withheld at the row wrap, frame restarts, negative digits, use of the
// largest part) and fails if any never happened.
module tb_mlsf_filter2d;
  import tb_util_pkg::*;
  localparam int K = 3, W = 16, H = 7, XW = 4, YW = 16, NF = 3;
  localparam logic [8:0][31:0] CA = mlsf_pkg::GAUSS3_COEFS;
  localparam logic [8:0][31:0] CB = {32'hbf800000, 32'h40f00000, 32'h00000000,
                                     32'h3dcccccd, 32'hc0400000, 32'h40000000,
                                     32'hbc000000, 32'h3fa00000, 32'hbf000000};

  logic clk = 1'b0;
  logic rst_n, in_valid, in_sof;
  logic [7:0] in_pix;
  logic va, vb;
  logic [XW-1:0] xa, xb;
  logic [YW-1:0] ya, yb;
  logic [31:0] fa, fb;
  int checks = 0, failures = 0;

  mlsf_filter2d #(.W(W), .YW(YW)) dut_a (
    .clk, .rst_n, .in_valid, .in_sof, .in_pix,
    .out_valid(va), .out_x(xa), .out_y(ya), .out_fp(fa));
  mlsf_filter2d #(.W(W), .YW(YW), .COEFS(CB)) dut_b (
    .clk, .rst_n, .in_valid, .in_sof, .in_pix,
    .out_valid(vb), .out_x(xb), .out_y(yb), .out_fp(fb));
  // reduced-precision build: FP16 results from 32-bit table words
  logic vh;
  logic [XW-1:0] xh;
  logic [YW-1:0] yh;
  logic [15:0] fh;
  mlsf_filter2d #(.W(W), .YW(YW), .LS(32), .EW(5), .FW(10)) dut_h (
    .clk, .rst_n, .in_valid, .in_sof, .in_pix,
    .out_valid(vh), .out_x(xh), .out_y(yh), .out_fp(fh));

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real ka [9], kb [9];
  real tola, tolb, tolh;

  function automatic real qweight(input real k [9]);
    real mx;
    mx = 0.0;
    for (int i = 0; i < 9; i++) if (absr(k[i]) > mx) mx = absr(k[i]);
    return pow2(flog2(mx * 134.0) - 42);
  endfunction

  typedef struct { int cyc; real ra; real rb; int x; int y; } exp_t;
  exp_t q [$];
  int img [H+1][W];
  int cyc = 0;
  int outputs = 0;
  int n_pause = 0, n_wrap = 0, n_sof = 0, n_neg = 0, n_top = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) begin
    if (rst_n) begin
      if (q.size() > 0 && q[0].cyc == cyc) begin
        exp_t e;
        e = q.pop_front();
        outputs++;
        checks += 4;
        if (!(va && vb)) begin failures++; $display("FAIL missing output at %0d", cyc); end
        if (!fp_close(fa, e.ra, tola)) begin
          failures++; $display("FAIL A (%0d,%0d) got %g exp %g", e.x, e.y, f2r(fa), e.ra);
        end
        checks++;
        if (!vh || xh != xa || yh != ya ||
            absr(fp2r({16'd0, fh}, 5, 10) - e.ra) > ulpn(e.ra, 10) + tolh) begin
          failures++; $display("FAIL H (%0d,%0d) got %g exp %g", e.x, e.y, fp2r({16'd0, fh}, 5, 10), e.ra);
        end
        if (!fp_close(fb, e.rb, tolb)) begin
          failures++; $display("FAIL B (%0d,%0d) got %g exp %g", e.x, e.y, f2r(fb), e.rb);
        end
        if (int'(xa) != e.x || int'(ya) != e.y || xb != xa || yb != ya) begin
          failures++; $display("FAIL coordinates (%0d,%0d) exp (%0d,%0d)", xa, ya, e.x, e.y);
        end
      end else if (va || vb || vh) begin
        checks++;
        failures++;
        $display("FAIL unexpected output at %0d", cyc);
      end
    end
  end

  task automatic push(input int x, input int y, input bit sof);
    logic [11:0] c;
    while ($urandom % 4 == 0) begin
      @(posedge clk);
      #1 in_valid = 1'b0; in_sof = 1'b0;
      n_pause++;
    end
    @(posedge clk);
    #1;
    img[y][x] = (y == 1 && x < 4) ? ((x % 2 != 0) ? 255 : 0) : int'($urandom % 256);
    in_valid = 1'b1;
    in_sof = sof;
    in_pix = 8'(img[y][x]);
    if (sof) n_sof++;
    c = ref_code(img[y][x]);
    for (int i = 0; i < 6; i++) if (c[2*i +: 2] == 2'b11) n_neg++;
    if (c[11:10] != 2'b00) n_top++;
    if (y >= K - 1) begin
      if (x >= K - 1) begin
        exp_t e;
        e.ra = 0.0; e.rb = 0.0;
        for (int r = 0; r < K; r++)
          for (int cc = 0; cc < K; cc++) begin
            e.ra += ka[r*K + cc] * real'(img[y - K + 1 + r][x - K + 1 + cc]);
            e.rb += kb[r*K + cc] * real'(img[y - K + 1 + r][x - K + 1 + cc]);
          end
        e.x = x - 1;
        e.y = y - 1;
        e.cyc = cyc + 5;
        q.push_back(e);
      end else begin
        n_wrap++;
      end
    end
  endtask

  initial begin
    for (int i = 0; i < 9; i++) begin
      ka[i] = f2r(CA[i]);
      kb[i] = f2r(CB[i]);
    end
    tola = 27.0 * qweight(ka);
    tolb = 27.0 * qweight(kb);
    tolh = tola * pow2(12);
    rst_n = 1'b0; in_valid = 1'b0; in_sof = 1'b0; in_pix = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int f = 0; f < NF; f++) begin
      int n_before;
      n_before = outputs + q.size();
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++)
          push(x, y, x == 0 && y == 0);
      checks++;
      if (outputs + q.size() - n_before != (W - K + 1) * (H - K + 1)) begin
        failures++; $display("FAIL frame %0d output count", f);
      end
      if (f == 0)            // unfinished extra row: 5 pixels, 3 more windows
        for (int x = 0; x < 5; x++) push(x, H, 1'b0);
      @(posedge clk);
      #1 in_valid = 1'b0; in_sof = 1'b0;
    end
    repeat (8) @(posedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL %0d outputs missing", q.size()); end
    $display("mechanisms: pauses=%0d wrap_windows_withheld=%0d frame_starts=%0d negative_digits=%0d largest_part=%0d outputs=%0d",
             n_pause, n_wrap, n_sof, n_neg, n_top, outputs);
    checks += 5;
    if (n_pause == 0) failures++;
    if (n_wrap == 0)  failures++;
    if (n_sof < 2)    failures++;
    if (n_neg == 0)   failures++;
    if (n_top == 0)   failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

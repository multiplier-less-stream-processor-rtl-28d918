// tb_mlsf_filter2d_k5: the filter built for a larger kernel, K = 5, over
// 20-pixel rows (four row RAMs, 25 coefficient tables). The kernel is the
// 5x5 binomial [1 4 6 4 1]^T [1 4 6 4 1] / 256 with the sign of every
// seventh tap flipped, so that orientation errors show. Two 20 x 9 frames
// with random pauses are checked against a double-precision convolution,
// for position, latency (five cycles) and output count.
module tb_mlsf_filter2d_k5;
  import tb_util_pkg::*;
  localparam int K = 5, W = 20, H = 9, XW = 5, YW = 16, NF = 2;

  // FP32 bit pattern of (+/-) n / 256 for a small positive integer n.
  function automatic logic [31:0] fp_of(input int n, input bit neg);
    int e;
    e = 0;
    while ((n >> (e + 1)) != 0) e++;
    return {neg, 8'(e + 127 - 8), 23'((n << (23 - e)) & 32'h7f_ffff)};
  endfunction

  function automatic logic [K*K-1:0][31:0] kernel();
    logic [K*K-1:0][31:0] k;
    int b [5] = '{1, 4, 6, 4, 1};
    for (int r = 0; r < K; r++)
      for (int c = 0; c < K; c++)
        k[r*K + c] = fp_of(b[r] * b[c], ((r*K + c) % 7) == 3);
    return k;
  endfunction

  localparam logic [K*K-1:0][31:0] CK = kernel();

  logic clk = 1'b0;
  logic rst_n, in_valid, in_sof;
  logic [7:0] in_pix;
  logic out_valid;
  logic [XW-1:0] out_x;
  logic [YW-1:0] out_y;
  logic [31:0] out_fp;
  int checks = 0, failures = 0;

  mlsf_filter2d #(.K(K), .W(W), .YW(YW), .COEFS(CK)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real kc [K*K];
  real tol;
  typedef struct { int cyc; real rv; int x; int y; } exp_t;
  exp_t q [$];
  int img [H][W];
  int cyc = 0, outputs = 0, pauses = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) begin
    if (rst_n) begin
      if (q.size() > 0 && q[0].cyc == cyc) begin
        exp_t e;
        e = q.pop_front();
        outputs++;
        checks++;
        if (!out_valid || !fp_close(out_fp, e.rv, tol) || int'(out_x) != e.x || int'(out_y) != e.y) begin
          failures++;
          $display("FAIL (%0d,%0d) got %g at (%0d,%0d) exp %g", e.x, e.y, f2r(out_fp),
                   out_x, out_y, e.rv);
        end
      end else if (out_valid) begin
        checks++;
        failures++;
        $display("FAIL unexpected output at %0d", cyc);
      end
    end
  end

  initial begin
    real mx;
    mx = 0.0;
    for (int i = 0; i < K*K; i++) begin
      kc[i] = f2r(CK[i]);
      if (absr(kc[i]) > mx) mx = absr(kc[i]);
    end
    tol = real'(K * K * 3) * pow2(flog2(mx * 134.0) - 42);
    rst_n = 1'b0; in_valid = 1'b0; in_sof = 1'b0; in_pix = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int f = 0; f < NF; f++)
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          while ($urandom % 5 == 0) begin
            @(posedge clk);
            #1 in_valid = 1'b0; in_sof = 1'b0;
            pauses++;
          end
          @(posedge clk);
          #1;
          img[y][x] = int'($urandom % 256);
          in_valid = 1'b1;
          in_sof = (x == 0 && y == 0);
          in_pix = 8'(img[y][x]);
          if (x >= K - 1 && y >= K - 1) begin
            exp_t e;
            e.rv = 0.0;
            for (int r = 0; r < K; r++)
              for (int c = 0; c < K; c++)
                e.rv += kc[r*K + c] * real'(img[y - K + 1 + r][x - K + 1 + c]);
            e.x = x - (K - 1) / 2;
            e.y = y - (K - 1) / 2;
            e.cyc = cyc + 5;
            q.push_back(e);
          end
        end
    @(posedge clk);
    #1 in_valid = 1'b0; in_sof = 1'b0;
    repeat (8) @(posedge clk);
    checks += 2;
    if (outputs != NF * (W - K + 1) * (H - K + 1) || q.size() != 0) begin
      failures++;
      $display("FAIL output count %0d", outputs);
    end
    if (pauses == 0) failures++;
    $display("K=%0d: %0d outputs, %0d pauses", K, outputs, pauses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

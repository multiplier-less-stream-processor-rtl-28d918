// tb_mlsf_filter2d_wavg: the weighted-average workload. A 3x3 kernel of
// real FP32 weights (0.05 0.10 0.07 / 0.12 0.30 0.11 / 0.06 0.10 0.09, an
// example of a non-Gaussian filter; any FP32 weights can be loaded through
// COEFS) filters a 640-pixel-wide, 12-row frame. Outputs are checked against
// a double-precision convolution, for position, latency and the rate of one
// result per input pixel.
module tb_mlsf_filter2d_wavg;
  import tb_util_pkg::*;
  localparam int K = 3, W = 640, H = 12;
  localparam logic [8:0][31:0] CW = {32'h3db851ec, 32'h3dcccccd, 32'h3d75c28f,
                                     32'h3de147ae, 32'h3e99999a, 32'h3df5c28f,
                                     32'h3d8f5c29, 32'h3dcccccd, 32'h3d4ccccd};

  logic clk = 1'b0;
  logic rst_n, in_valid, in_sof;
  logic [7:0] in_pix;
  logic out_valid;
  logic [9:0] out_x;
  logic [15:0] out_y;
  logic [31:0] out_fp;
  int checks = 0, failures = 0;

  mlsf_filter2d #(.COEFS(CW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real kc [9];
  real tol;
  typedef struct { int cyc; real rv; int x; int y; } exp_t;
  exp_t q [$];
  logic [7:0] img [H][W];
  int cyc = 0, outputs = 0, pauses = 0, reported = 0;
  int first_in = -1, last_out = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) begin
    if (rst_n) begin
      if (q.size() > 0 && q[0].cyc == cyc) begin
        exp_t e;
        bit ok;
        e = q.pop_front();
        outputs++;
        last_out = cyc;
        ok = out_valid && fp_close(out_fp, e.rv, tol) && int'(out_x) == e.x && int'(out_y) == e.y;
        checks++;
        if (!ok) begin
          failures++;
          if (reported < 10)
            $display("FAIL (%0d,%0d) got %g at (%0d,%0d) exp %g", e.x, e.y, f2r(out_fp),
                     out_x, out_y, e.rv);
          reported++;
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
    for (int i = 0; i < 9; i++) begin
      kc[i] = f2r(CW[i]);
      if (absr(kc[i]) > mx) mx = absr(kc[i]);
    end
    tol = 27.0 * pow2(flog2(mx * 134.0) - 42);
    rst_n = 1'b0; in_valid = 1'b0; in_sof = 1'b0; in_pix = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        if ($urandom % 64 == 0) begin
          @(posedge clk);
          #1 in_valid = 1'b0; in_sof = 1'b0;
          pauses++;
        end
        @(posedge clk);
        #1;
        if (first_in < 0) first_in = cyc;
        img[y][x] = 8'($urandom);
        in_valid = 1'b1;
        in_sof = (x == 0 && y == 0);
        in_pix = img[y][x];
        if (x >= K - 1 && y >= K - 1) begin
          exp_t e;
          e.rv = 0.0;
          for (int r = 0; r < K; r++)
            for (int c = 0; c < K; c++)
              e.rv += kc[r*K + c] * real'(img[y - K + 1 + r][x - K + 1 + c]);
          e.x = x - 1;
          e.y = y - 1;
          e.cyc = cyc + 5;
          q.push_back(e);
        end
      end
    @(posedge clk);
    #1 in_valid = 1'b0; in_sof = 1'b0;
    repeat (8) @(posedge clk);
    checks += 2;
    if (outputs != (W - K + 1) * (H - K + 1) || q.size() != 0) begin
      failures++;
      $display("FAIL output count %0d", outputs);
    end
    // one input pixel per cycle apart from the pauses: the frame takes
    // W*H + pauses cycles from first pixel to last result, plus the latency
    if (last_out - first_in != W * H + pauses - 1 + 5) begin
      failures++;
      $display("FAIL frame time %0d cycles", last_out - first_in);
    end
    $display("frame: %0d outputs, %0d pauses, %0d cycles", outputs, pauses, last_out - first_in);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

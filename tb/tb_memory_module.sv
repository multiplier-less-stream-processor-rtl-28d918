// tb_memory_module: streams two 8 x 5 frames (second started by in_sof in
// mid-row position) with random pauses into a memory module with W = 8,
// K = 3. Every flagged window must lie inside the image, carry the right
// centre coordinates, hold the reference codes of the 3x3 neighbourhood and
// appear exactly two cycles after the pixel that completes it; the number of
// windows per frame must be (W-K+1)*(H-K+1).
module tb_memory_module;
  import tb_util_pkg::*;
  localparam int K = 3, W = 8, H = 5, XW = 3, YW = 16;

  logic clk = 1'b0;
  logic rst_n, in_valid, in_sof;
  logic [7:0] in_pix;
  logic win_valid;
  logic [XW-1:0] win_x;
  logic [YW-1:0] win_y;
  logic [K-1:0][K-1:0][11:0] win;
  int checks = 0, failures = 0;

  memory_module #(.M(8), .K(K), .W(W), .YW(YW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  int img [H+1][W];
  int cyc = 0;
  int expect_cyc [$];   // cycle at which each window is due
  int expect_x [$], expect_y [$];
  int seen = 0;

  always @(posedge clk) cyc <= cyc + 1;

  // Window checker.
  always @(negedge clk) begin
    if (rst_n && win_valid) begin
      seen++;
      check(expect_cyc.size() > 0, "unexpected window");
      if (expect_cyc.size() > 0) begin
        int ec, ex, ey;
        ec = expect_cyc.pop_front();
        ex = expect_x.pop_front();
        ey = expect_y.pop_front();
        check(cyc == ec, $sformatf("window latency: at %0d expected %0d", cyc, ec));
        check(int'(win_x) == ex && int'(win_y) == ey,
              $sformatf("centre (%0d,%0d) expected (%0d,%0d)", win_x, win_y, ex, ey));
        for (int r = 0; r < K; r++)
          for (int c = 0; c < K; c++)
            check(win[r][c] == ref_code(img[ey - 1 + r][ex - 1 + c]),
                  $sformatf("window (%0d,%0d) tap %0d,%0d", ex, ey, r, c));
      end
    end
  end

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; in_sof = 1'b0; in_pix = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int f = 0; f < 2; f++) begin
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          // random pause
          while ($urandom % 3 == 0) begin
            @(posedge clk);
            #1 in_valid = 1'b0; in_sof = 1'b0;
          end
          @(posedge clk);
          #1;
          img[y][x] = int'($urandom % 256);
          in_valid = 1'b1;
          in_sof = (x == 0 && y == 0);
          in_pix = 8'(img[y][x]);
          if (x >= K - 1 && y >= K - 1) begin
            expect_cyc.push_back(cyc + 2);
            expect_x.push_back(x - 1);
            expect_y.push_back(y - 1);
          end
        end
      @(posedge clk);
      #1 in_valid = 1'b0; in_sof = 1'b0;
      // a partial extra row before the next start of frame: the design
      // does not know the frame height, so its last pixel completes a window
      if (f == 0)
        for (int x = 0; x < 3; x++) begin
          @(posedge clk);
          #1;
          img[H][x] = int'($urandom % 256);
          in_valid = 1'b1; in_pix = 8'(img[H][x]);
          if (x >= K - 1) begin
            expect_cyc.push_back(cyc + 2);
            expect_x.push_back(x - 1);
            expect_y.push_back(H - 1);
          end
        end
      @(posedge clk);
      #1 in_valid = 1'b0;
    end
    repeat (5) @(posedge clk);
    check(seen == 2 * (W - K + 1) * (H - K + 1) + 1, $sformatf("window count %0d", seen));
    check(expect_cyc.size() == 0, "missing windows");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

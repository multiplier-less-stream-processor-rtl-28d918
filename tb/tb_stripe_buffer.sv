// tb_stripe_buffer: pushes a numbered sequence through two stripe buffers
// (3x3 over 8-word rows and 5x5 over 11-word rows) with random pauses, and
// after every push compares each window word with the word pushed
// (K-1-r)*W + (K-1-c) pushes earlier. During pauses the window must hold.
module tb_stripe_buffer;
  localparam int LC = 12;
  logic clk = 1'b0;
  logic rst_n;
  logic shift;
  logic [LC-1:0] din;
  int checks = 0, failures = 0;
  int pushed = 0;
  logic [LC-1:0] hist [$];

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar g = 0; g < 2; g++) begin : g_cfg
    localparam int K = (g == 0) ? 3 : 5;
    localparam int W = (g == 0) ? 8 : 11;
    logic [K-1:0][K-1:0][LC-1:0] win, win_prev;
    bit have_prev = 1'b0;

    stripe_buffer #(.LC(LC), .K(K), .W(W)) dut (
      .clk(clk), .rst_n(rst_n), .shift(shift), .din(din), .win(win));

    always @(negedge clk) begin
      if (rst_n) begin
        if (!shift_d && have_prev) begin
          checks++;
          if (win !== win_prev) begin
            failures++;
            $display("FAIL K=%0d: window changed during pause", K);
          end
        end else if (pushed >= (K - 1) * W + K) begin
          for (int r = 0; r < K; r++)
            for (int c = 0; c < K; c++) begin
              checks++;
              if (win[r][c] !== hist[pushed - 1 - ((K-1-r)*W + (K-1-c))]) begin
                failures++;
                $display("FAIL K=%0d n=%0d r=%0d c=%0d got %h exp %h", K, pushed, r, c,
                         win[r][c], hist[pushed - 1 - ((K-1-r)*W + (K-1-c))]);
              end
            end
        end
        win_prev = win;
        have_prev = 1'b1;
      end
    end
  end

  // shift as seen by the edge just before the checking negedge
  logic shift_d;

  initial begin
    rst_n = 1'b0; shift = 1'b0; din = '0; shift_d = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 1500; t++) begin
      @(posedge clk);
      shift_d <= shift;
      if (shift) begin
        hist.push_back(din);
        pushed <= pushed + 1;
      end
      @(negedge clk);
      #1;
      shift = ($urandom % 5) != 0;
      din = LC'($urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
